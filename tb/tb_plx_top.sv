// tb_plx_top: end-to-end run of the PLX system at its default size.
//
// The program, written into instruction memory through the load port, runs a
// subword-parallel kernel over NITER iterations: a subroutine (called once
// with jmp.link and once with jmp.reg.link, returning through jmp.reg)
// produces pseudo-random 64-bit words with xorshift; the kernel stores them
// (store.update), reads them back (load.update), selects pavg.1 or pmax.2 with
// predicates set by testbit, forms a saturating padd.1.u, accumulates a packed
// 4-byte sum, and loops with cmpi and a predicated jmp. Its predicates live in
// predicate set 1 (changepr.ld); at the end it switches back to set 0 and
// executes trap. The testbench recomputes every stored word and the final
// registers with its own model, checks the cycle count (one instruction per
// cycle), and counts each mechanism: nullified instructions, taken jumps,
// links, set switches, base updates, saturation and halt.
module tb_plx_top;
  import plx_pkg::*;
  import plx_asm_pkg::*;
  localparam int W = 64;
  localparam int NITER = 200;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, prog_we, halted, retire, misaligned;
  logic [9:0] prog_addr;
  logic [31:0] prog_data;
  logic [W-1:0] pc, dbg_reg_val;
  logic [4:0] dbg_reg;
  logic [3:0] pred_set;
  logic [7:0] pred_bits;

  plx_top dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data, .halted, .pc, .retire, .misaligned,
               .dbg_reg, .dbg_reg_val, .pred_set, .pred_bits);

  logic [31:0] prog [64];

  // ---------------- reference model ----------------
  function automatic logic [W-1:0] xs(logic [W-1:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 7);
    x = x ^ (x << 17);
    return x;
  endfunction

  int n_sat_model = 0;
  function automatic logic [W-1:0] addu8(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] r;
    for (int i = 0; i < 8; i++) begin
      int s = int'(x[i*8 +: 8]) + int'(y[i*8 +: 8]);
      if (s > 255) begin s = 255; n_sat_model++; end
      r[i*8 +: 8] = 8'(s);
    end
    return r;
  endfunction
  function automatic logic [W-1:0] avg8(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] r;
    for (int i = 0; i < 8; i++) begin
      int s = int'(x[i*8 +: 8]) + int'(y[i*8 +: 8]);
      r[i*8 +: 8] = 8'((s >> 1) | (s & 1));
    end
    return r;
  endfunction
  function automatic logic [W-1:0] max16(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] r;
    for (int i = 0; i < 4; i++)
      r[i*16 +: 16] = (shortint'(x[i*16 +: 16]) > shortint'(y[i*16 +: 16])) ? x[i*16 +: 16] : y[i*16 +: 16];
    return r;
  endfunction
  function automatic logic [W-1:0] add32(logic [W-1:0] x, logic [W-1:0] y);
    return {x[63:32] + y[63:32], x[31:0] + y[31:0]};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_null, n_jmp, n_link, n_reglink, n_jmpreg, n_setpr, n_setpr_ld, n_ldupd, n_stupd, n_testbit;
  int n_cmpi, n_halt, n_mis, cycles;
  always @(posedge clk) if (rst_n && !halted) begin
    cycles++;
    if (dut.u_core.d.valid && !dut.u_core.qp_val) n_null++;
    if (dut.u_core.exec) begin
      case (dut.u_core.d.br_op)
        BR_JMP:          n_jmp++;
        BR_JMP_LINK:     n_link++;
        BR_JMP_REG:      n_jmpreg++;
        BR_JMP_REG_LINK: n_reglink++;
        BR_TRAP:         n_halt++;
        default: ;
      endcase
      if (dut.u_core.d.setpr) begin n_setpr++; if (dut.u_core.d.setpr_ld) n_setpr_ld++; end
      if (dut.u_core.d.is_load && dut.u_core.d.ls_update) n_ldupd++;
      if (dut.u_core.d.is_store && dut.u_core.d.ls_update) n_stupd++;
      if (dut.u_core.d.pred_write && dut.u_core.d.cmp_op == CP_TESTBIT) n_testbit++;
      if (dut.u_core.d.pred_write && dut.u_core.d.cmp_op == CP_CMPI) n_cmpi++;
    end
    if (misaligned) n_mis++;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic chk_count(int n, string what);
    $display("  %-28s %0d", what, n);
    chk(n > 0, {what, " never happened"});
  endtask

  initial begin
    logic [W-1:0] x, a, b, o, s, sum;
    logic [W-1:0] mem_a [NITER], mem_o [NITER], mem_s [NITER];
    int npred_off;

    prog[0]  = f1(OP_LOADI_LO, 1, 18'h5678);
    prog[1]  = f1(OP_LOADI_HI, 1, 18'h1234);
    prog[2]  = f2(OP_ADDI, 20, 0, -13'sd8);
    prog[3]  = f2(OP_ADDI, 23, 0, -13'sd8);
    prog[4]  = f2(OP_ADDI, 22, 0, 13'd2040);
    prog[5]  = f2(OP_ADDI, 24, 0, 13'd4088);
    prog[6]  = f2(OP_ADDI, 10, 0, 13'(NITER));
    prog[7]  = changepr(1, 4'd1, 8'h00);
    // LOOP = 8
    prog[8]  = f0(OP_JMP_LINK, 23'((26 - 8) * 4));
    prog[9]  = store(2'd3, 1, 1, 20, 13'd8);
    prog[10] = f2(OP_ADDI, 13, 0, 13'((26 - 11) * 4));
    prog[11] = f1(OP_JMP_REG_LINK, 13, 18'd0);
    prog[12] = load(2'd3, 1, 7, 23, 13'd8);
    prog[13] = testbit(7, 8'd0, 3'd1, 3'd2);
    prog[14] = f4a(F_PAVG, 8, 7, 1, 2'd0, 3'd1);
    prog[15] = f4a(F_PMAX, 8, 7, 1, 2'd1, 3'd2);
    prog[16] = store(2'd3, 1, 8, 22, 13'd8);
    prog[17] = f4a(F_PADD_U, 12, 7, 1, 2'd0);
    prog[18] = store(2'd3, 1, 12, 24, 13'd8);
    prog[19] = f4a(F_PADD, 11, 11, 8, 2'd2);
    prog[20] = f2(OP_SUBI, 10, 10, 13'd1);
    prog[21] = cmpi(REL_GT, 10, 8'd0, 3'd3, 3'd4);
    prog[22] = f0(OP_JMP, 23'(-(22 - 8) * 4), 3'd3);
    prog[23] = changepr(0, 4'd0, 8'h00);
    prog[24] = f2(OP_ADDI, 30, 0, 13'd1, 3'd1);
    prog[25] = f0(OP_TRAP, 23'd0);
    // GEN = 26: xorshift step on r1, return through jmp.reg
    prog[26] = f2(OP_SLLI, 2, 1, 13'd13);
    prog[27] = f4a(F_XOR, 1, 1, 2);
    prog[28] = f2(OP_SRLI, 2, 1, 13'd7);
    prog[29] = f4a(F_XOR, 1, 1, 2);
    prog[30] = f2(OP_SLLI, 2, 1, 13'd17);
    prog[31] = f4a(F_XOR, 1, 1, 2);
    prog[32] = f2(OP_SUBI, 9, 31, 13'(33 * 4));
    prog[33] = f1(OP_JMP_REG, 9, 18'd0);
    for (int i = 34; i < 64; i++) prog[i] = f0(OP_TRAP, 23'd0);

    // reference run
    x = 64'h1234_5678; sum = '0; npred_off = 0;
    for (int i = 0; i < NITER; i++) begin
      x = xs(x); a = x;
      x = xs(x); b = x;
      o = a[0] ? avg8(a, b) : max16(a, b);
      s = addu8(a, b);
      sum = add32(sum, o);
      mem_a[i] = a; mem_o[i] = o; mem_s[i] = s;
    end

    // load the program while the core is held in reset
    rst_n = 0; prog_we = 0; prog_addr = 0; prog_data = 0; dbg_reg = 0;
    cycles = 0; n_null = 0; n_jmp = 0; n_link = 0; n_reglink = 0; n_jmpreg = 0; n_setpr = 0;
    n_setpr_ld = 0; n_ldupd = 0; n_stupd = 0; n_testbit = 0; n_cmpi = 0; n_halt = 0; n_mis = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    rst_n = 1;
    wait (halted);
    @(negedge clk);

    chk(cycles == 11 + 31 * NITER, $sformatf("cycle count %0d, expected %0d", cycles, 11 + 31 * NITER));
    for (int i = 0; i < NITER; i++) begin
      chk(dut.u_dmem.mem[i] === mem_a[i], $sformatf("a[%0d]", i));
      chk(dut.u_dmem.mem[256 + i] === mem_o[i], $sformatf("out[%0d] %h vs %h", i, dut.u_dmem.mem[256 + i], mem_o[i]));
      chk(dut.u_dmem.mem[512 + i] === mem_s[i], $sformatf("sat[%0d]", i));
    end
    dbg_reg = 5'd1;  #1 chk(dbg_reg_val === x, "r1 state");
    dbg_reg = 5'd11; #1 chk(dbg_reg_val === sum, "r11 packed sum");
    dbg_reg = 5'd10; #1 chk(dbg_reg_val === 0, "r10 counter");
    dbg_reg = 5'd20; #1 chk(dbg_reg_val === 64'(8 * (NITER - 1)), "r20 pointer");
    dbg_reg = 5'd30; #1 chk(dbg_reg_val === 0, "r30 nullified");
    chk(pred_set === 4'd0, "active predicate set");
    chk(n_mis == 0, "no misaligned access");

    $display("mechanisms:");
    chk_count(n_null, "nullified by predicate");
    chk_count(n_jmp, "taken jmp");
    chk_count(n_link, "jmp.link");
    chk_count(n_reglink, "jmp.reg.link");
    chk_count(n_jmpreg, "jmp.reg");
    chk_count(n_setpr - n_setpr_ld, "changepr");
    chk_count(n_setpr_ld, "changepr.ld");
    chk_count(n_ldupd, "load.update");
    chk_count(n_stupd, "store.update");
    chk_count(n_testbit, "testbit");
    chk_count(n_cmpi, "cmpi");
    chk_count(n_sat_model, "unsigned saturation (lanes)");
    chk_count(n_halt, "trap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
