// tb_plx_decode: feeds encoded instructions of every format to the decoder
// and checks the extracted fields, the selected unit and operation, the write
// enables, and that illegal opcodes and subword sizes are marked invalid.
module tb_plx_decode;
  import plx_pkg::*;
  import plx_asm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] instr;
  dec_t d;

  plx_decode dut (.instr, .d);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s instr=%h", what, instr);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [4:0] rd, rs1, rs2;
      logic [12:0] i13;
      logic [2:0] qp, p1, p2;
      logic [7:0] i8;
      logic [1:0] sw;
      rd = 5'($urandom); rs1 = 5'($urandom); rs2 = 5'($urandom); i13 = 13'($urandom);
      qp = 3'($urandom); p1 = 3'($urandom); p2 = 3'($urandom); i8 = 8'($urandom); sw = 2'($urandom);

      instr = f2(OP_ADDI, rd, rs1, i13, qp); #1;
      chk(d.valid && d.unit == U_INT && d.int_op == IA_ADD && d.rd == rd && d.rs1 == rs1 &&
          d.imm13 == i13 && d.qp == qp && d.rd_we, "addi");
      instr = f4a(F_PADD_S, rd, rs1, rs2, sw, qp); #1;
      chk(d.valid && d.unit == U_PALU && d.palu_op == PA_ADD_S && d.rs2 == rs2 && d.sw == sw, "padd.s");
      instr = f4a(F_PAVG, rd, rs1, rs2, sw, qp); #1;
      chk(d.valid == !sw[1], "pavg sizes");
      instr = f4a(F_PMULSHR_A, rd, rs1, rs2, sw, qp); #1;
      chk(d.valid && d.unit == U_PMUL && d.pmul_shr && d.pmul_odd_or_arith && d.sa == sw, "pmulshr.a");
      instr = f4a(F_PSHIFTADD_L, rd, rs1, rs2, sw, qp); #1;
      chk(d.valid == (sw != 0) && d.sw == 2'd1 && d.sa == sw && d.palu_op == PA_SHADD_L, "pshiftadd");
      instr = f4b(G_PSHIFTI_RA, rd, rs1, rs2, sw, qp); #1;
      chk(d.valid == (sw != 0) && d.unit == U_PSHIFT && d.pshift_imm && d.imm5 == rs2 &&
          d.pshift_op == PS_RIGHT_ARITH, "pshifti.ra");
      instr = f4b(G_MUX_ALT, rd, rs1, 0, 0, qp); #1;
      chk(d.valid && d.unit == U_PERM && d.perm_op == PM_ALT, "mux.alt");
      instr = mix(1, rd, rs1, rs2, sw, qp); #1;
      chk(d.valid == (sw != 3) && d.perm_op == PM_MIX_L && d.rs2 == rs2, "mix.l");
      instr = f3(OP_DEPOSIT, rd, rs1, i13[12:6], i13[5:0], qp); #1;
      chk(d.valid && d.unit == U_SB && d.sb_op == SB_DEPOSIT && d.imm7 == i13[12:6] && d.imm6 == i13[5:0], "deposit");
      instr = shrp(rd, rs1, rs2, i8, qp); #1;
      chk(d.valid && d.sb_op == SB_SHRP && d.imm8 == i8, "shrp");
      instr = cmp(REL_GEU, rs1, rs2, p1, p2, qp); #1;
      chk(d.valid && d.pred_write && !d.rd_we && d.rs1 == rs1 && d.rs2 == rs2 && d.p1 == p1 &&
          d.p2 == p2 && d.rel == REL_GEU && d.cmp_op == CP_CMP, "cmp");
      instr = cmpi(REL_LT, rs1, i8, p1, p2, qp); #1;
      chk(d.valid && d.cmp_op == CP_CMPI && d.imm8 == i8 && d.p1 == p1 && d.p2 == p2 && d.rs1 == rs1, "cmpi");
      instr = testbit(rd, i8, p1, p2, qp); #1;
      chk(d.valid && d.cmp_op == CP_TESTBIT && d.rd == rd && d.imm8 == i8, "testbit");
      instr = changepr(1, rs1[3:0], i8, qp); #1;
      chk(d.valid && d.setpr && d.setpr_ld && d.imm4 == rs1[3:0] && d.imm8 == i8, "changepr.ld");
      instr = load(sw, 1, rd, rs1, i13, qp); #1;
      chk(d.valid && d.is_load && d.ls_update && d.sw == sw && d.unit == U_LOAD && d.rd_we, "load.update");
      instr = store(sw, 0, rd, rs1, i13, qp); #1;
      chk(d.valid && d.is_store && !d.ls_update && !d.rd_we, "store");
      instr = f0(OP_JMP_LINK, 23'(i13), qp); #1;
      chk(d.valid && d.br_op == BR_JMP_LINK && d.imm23 == 23'(i13) && !d.rd_we, "jmp.link");
      instr = f1(OP_JMP_REG, rd, 0, qp); #1;
      chk(d.valid && d.br_op == BR_JMP_REG && d.rd == rd, "jmp.reg");
      instr = f1(OP_LOADI_HI, rd, 18'(i13), qp); #1;
      chk(d.valid && d.int_op == IA_LOADI_HI && d.imm18 == 18'(i13) && d.rd_we, "loadi.hi");
      instr = {6'd40 + 6'($urandom_range(0, 0)) - 6'd13, 26'($urandom)}; #1;   // opcode 27: unused
      chk(!d.valid, "unused opcode");
      instr = f4a(func4a_e'(6'd40), rd, rs1, rs2); #1;
      chk(!d.valid, "unused function");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
