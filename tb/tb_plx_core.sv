// tb_plx_core: runs a directed PLX program on the core with instruction and
// data memory models and checks the architectural state at the end: results
// of each instruction class, predicated-off instructions leaving no trace,
// predicate-set switching, load/store with base update, jumps with link,
// trap, and one instruction per cycle.
module tb_plx_core;
  import plx_pkg::*;
  import plx_asm_pkg::*;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [9:0] imem_addr, dmem_addr;
  logic [31:0] imem_rdata;
  logic [W-1:0] dmem_rdata, dmem_wdata, pc, dbg_reg_val;
  logic dmem_we, halted, retire, misaligned;
  logic [7:0] dmem_be, pred_bits;
  logic [4:0] dbg_reg;
  logic [3:0] pred_set;

  logic [31:0] imem [1024];
  logic [W-1:0] dmem [1024];

  plx_core #(.W(W)) dut (.clk, .rst_n, .imem_addr, .imem_rdata, .dmem_addr, .dmem_rdata, .dmem_we,
                         .dmem_be, .dmem_wdata, .pc, .halted, .retire, .misaligned, .dbg_reg,
                         .dbg_reg_val, .pred_set, .pred_bits);

  assign imem_rdata = imem[imem_addr];
  assign dmem_rdata = dmem[dmem_addr];
  always_ff @(posedge clk)
    if (dmem_we) for (int k = 0; k < 8; k++) if (dmem_be[k]) dmem[dmem_addr][k*8 +: 8] <= dmem_wdata[k*8 +: 8];

  task automatic chk_reg(int r, logic [W-1:0] exp);
    dbg_reg = 5'(r); #1;
    checks++;
    if (dbg_reg_val !== exp) begin
      failures++;
      $display("FAIL r%0d = %h, expected %h", r, dbg_reg_val, exp);
    end
  endtask

  int cycles;
  logic [W-1:0] r1, r2, r7;

  initial begin
    for (int i = 0; i < 1024; i++) begin imem[i] = '0; dmem[i] = '0; end
    imem[0]  = f1(OP_LOADI_LO, 1, 18'h1234);
    imem[1]  = f1(OP_LOADI_HI, 1, 18'h3ABCD);          // top two bits ignored
    imem[2]  = f2(OP_ADDI, 2, 0, -13'sd5);
    imem[3]  = f2(OP_SUBI, 3, 2, 13'd10);
    imem[4]  = f2(OP_ANDI, 4, 1, 13'h0FF0);
    imem[5]  = f2(OP_ORI, 5, 0, 13'h1FFF);
    imem[6]  = f2(OP_XORI, 6, 1, 13'h00FF);
    imem[7]  = f2(OP_SLLI, 7, 1, 13'd16);
    imem[8]  = f2(OP_SRAI, 8, 2, 13'd1);
    imem[9]  = f2(OP_SRLI, 9, 2, 13'd60);
    imem[10] = shrp(10, 1, 2, 8'd8);
    imem[11] = f3(OP_EXTRACT, 11, 1, 7'd4, 6'd8);
    imem[12] = f3(OP_DEPOSIT, 11, 5, 7'd16, 6'd4);
    imem[13] = f4a(F_PADD_S, 12, 7, 7, 2'd1);
    imem[14] = f4b(G_MUX_REV, 13, 1, 5'd0);
    imem[15] = f4a(F_PMUL_EVEN, 14, 1, 1);
    imem[16] = f4b(G_PSHIFTI_R, 15, 3, 5'd4, 2'd2);
    imem[17] = cmp(REL_LT, 2, 0, 3'd1, 3'd2);
    imem[18] = f2(OP_ADDI, 16, 0, 13'd111, 3'd2);      // (p2) nullified
    imem[19] = f2(OP_ADDI, 17, 0, 13'd222, 3'd1);      // (p1) executes
    imem[20] = cmpi(REL_GTU, 2, 8'd5, 3'd3, 3'd4);
    imem[21] = testbit(1, 8'd2, 3'd5, 3'd6);
    imem[22] = changepr(1, 4'd3, 8'b1000_0100);
    imem[23] = f2(OP_ADDI, 18, 0, 13'd1, 3'd1);        // P1 of set 3 is 0
    imem[24] = f2(OP_ADDI, 19, 0, 13'd2, 3'd2);        // P2 of set 3 is 1
    imem[25] = changepr(0, 4'd0, 8'hFF);               // imm8 ignored
    imem[26] = f2(OP_ADDI, 20, 0, 13'd3, 3'd1);
    imem[27] = f2(OP_ADDI, 21, 0, 13'd64);
    imem[28] = store(2'd3, 0, 1, 21, 13'd0);
    imem[29] = store(2'd1, 1, 2, 21, 13'd8);           // r21 <- 72
    imem[30] = load(2'd3, 0, 22, 21, -13'sd8);
    imem[31] = load(2'd0, 1, 23, 21, 13'd1);           // r21 <- 73
    imem[32] = f0(OP_JMP_LINK, 23'd8);                 // to 34, r31 <- 132
    imem[33] = f2(OP_ADDI, 24, 0, 13'd99);
    imem[34] = f2(OP_ADDI, 25, 0, 13'd7);
    imem[35] = f2(OP_ADDI, 26, 0, 13'd12);
    imem[36] = f1(OP_JMP_REG, 26, 18'd0);              // to 39
    imem[37] = f2(OP_ADDI, 24, 0, 13'd98);
    imem[38] = f0(OP_TRAP, 23'd0);
    imem[39] = f2(OP_ADDI, 27, 0, 13'd5);
    imem[40] = f4a(F_PERM, 28, 1, 30);
    imem[41] = {6'd27, 26'd0};                         // unused opcode: no-op
    imem[42] = f0(OP_TRAP, 23'd0);
    imem[43] = f2(OP_ADDI, 24, 0, 13'd97);

    rst_n = 0; dbg_reg = 0; cycles = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (!halted) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (cycles != 40) begin failures++; $display("FAIL cycles %0d, expected 40", cycles); end

    r1 = 64'hABCD_1234; r2 = -64'sd5; r7 = r1 << 16;
    chk_reg(0, 0);
    chk_reg(1, r1);
    chk_reg(2, r2);
    chk_reg(3, -64'sd15);
    chk_reg(4, r1 & 64'h0FF0);
    chk_reg(5, 64'h1FFF);
    chk_reg(6, r1 ^ 64'hFF);
    chk_reg(7, r7);
    chk_reg(8, -64'sd3);
    chk_reg(9, 64'hF);
    chk_reg(10, (r2 >> 8) | (r1 << 56));
    chk_reg(11, ((r1 >> 4) & 64'hFF) | (64'hF << 16));
    chk_reg(12, 64'h0000_8000_2468_0000);
    chk_reg(13, 64'h3412_CDAB_0000_0000);
    chk_reg(14, 64'h1234 * 64'h1234);
    chk_reg(15, 64'h0FFF_FFFF_0FFF_FFFF);
    chk_reg(16, 0);
    chk_reg(17, 222);
    chk_reg(18, 0);
    chk_reg(19, 2);
    chk_reg(20, 3);
    chk_reg(21, 73);
    chk_reg(22, r1);
    chk_reg(23, 64'hFF);
    chk_reg(24, 0);
    chk_reg(25, 7);
    chk_reg(27, 5);
    chk_reg(28, 64'h1234_1234_1234_1234);
    chk_reg(31, 132);
    checks++;
    if (dmem[8] !== r1 || dmem[9] !== 64'hFFFB) begin failures++; $display("FAIL dmem %h %h", dmem[8], dmem[9]); end
    // predicate set 0: P1=1 P2=0 (cmp.lt), P3=1 P4=0 (cmpi.gtu), P5=1 P6=0 (testbit)
    checks++;
    if (pred_set !== 4'd0 || pred_bits !== 8'b0010_1011) begin
      failures++; $display("FAIL predicates set %0d bits %b", pred_set, pred_bits);
    end
    checks++;
    if (pc !== 64'(42 * 4)) begin failures++; $display("FAIL pc %0d", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
