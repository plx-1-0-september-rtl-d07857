// tb_plx_top32: the PLX system built with 32-bit registers (W = 32), the
// smaller register size the ISA allows. A directed program checks the byte
// permutations on four bytes, perm on two halfwords, signed saturation,
// pmul.even, shrp ignoring the two top bits of its amount, 1/2/4-byte memory
// accesses, testbit past the word end, slli using only the low five bits of
// its amount, and jmp.link; then the cycle count.
module tb_plx_top32;
  import plx_pkg::*;
  import plx_asm_pkg::*;
  localparam int W = 32;
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
  logic [31:0] prog [32];
  int cycles;

  plx_top #(.W(W)) dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data, .halted, .pc, .retire,
                        .misaligned, .dbg_reg, .dbg_reg_val, .pred_set, .pred_bits);

  task automatic chk_reg(int r, logic [W-1:0] exp);
    dbg_reg = 5'(r); #1;
    checks++;
    if (dbg_reg_val !== exp) begin
      failures++;
      $display("FAIL r%0d = %h, expected %h", r, dbg_reg_val, exp);
    end
  endtask

  initial begin
    prog[0]  = f1(OP_LOADI_LO, 1, 18'h5678);
    prog[1]  = f1(OP_LOADI_HI, 1, 18'h1234);
    prog[2]  = f2(OP_ADDI, 2, 0, -13'sd2);
    prog[3]  = f4b(G_MUX_REV, 3, 1, 5'd0);
    prog[4]  = f4b(G_MUX_SHUF, 4, 1, 5'd0);
    prog[5]  = f4b(G_MUX_BRCST, 5, 1, 5'd0);
    prog[6]  = f4b(G_MUX_MIX, 6, 1, 5'd0);
    prog[7]  = f4a(F_PADD_S, 7, 1, 1, 2'd1);
    prog[8]  = f4a(F_PMUL_EVEN, 8, 1, 2);
    prog[9]  = f2(OP_ADDI, 10, 0, 13'd1);
    prog[10] = f4a(F_PERM, 9, 1, 10);
    prog[11] = shrp(11, 1, 2, 8'hC8);
    prog[12] = f2(OP_ADDI, 12, 0, 13'd16);
    prog[13] = store(2'd2, 0, 1, 12, 13'd0);
    prog[14] = store(2'd0, 1, 2, 12, 13'd5);
    prog[15] = load(2'd1, 0, 13, 0, 13'd18);
    prog[16] = load(2'd0, 0, 14, 0, 13'd21);
    prog[17] = testbit(1, 8'd33, 3'd1, 3'd2);
    prog[18] = f2(OP_ADDI, 15, 0, 13'd7, 3'd2);
    prog[19] = f2(OP_ADDI, 16, 0, 13'd9, 3'd1);
    prog[20] = f4b(G_PSHIFTI_RA, 17, 2, 5'd1, 2'd2);
    prog[21] = f2(OP_SLLI, 18, 1, 13'd36);
    prog[22] = f0(OP_JMP_LINK, 23'd8);
    prog[23] = f2(OP_ADDI, 19, 0, 13'd1);
    prog[24] = f0(OP_TRAP, 23'd0);
    for (int i = 25; i < 32; i++) prog[i] = f0(OP_TRAP, 23'd0);

    rst_n = 0; prog_we = 0; prog_addr = 0; prog_data = 0; dbg_reg = 0; cycles = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0; rst_n = 1;
    while (!halted) begin @(posedge clk); #1; cycles++; end

    checks++;
    if (cycles != 24) begin failures++; $display("FAIL cycles %0d, expected 24", cycles); end
    chk_reg(1, 32'h1234_5678);
    chk_reg(2, 32'hFFFF_FFFE);
    chk_reg(3, 32'h7856_3412);
    chk_reg(4, 32'h1256_3478);
    chk_reg(5, 32'h7878_7878);
    chk_reg(6, 32'h1256_3478);
    chk_reg(7, 32'h2468_7FFF);
    chk_reg(8, 32'hFFFF_5310);
    chk_reg(9, 32'h5678_1234);
    chk_reg(11, 32'h78FF_FFFF);
    chk_reg(12, 21);
    chk_reg(13, 32'h1234);
    chk_reg(14, 32'h0000_00FE);
    chk_reg(15, 7);
    chk_reg(16, 0);
    chk_reg(17, 32'hFFFF_FFFF);
    chk_reg(18, 32'h2345_6780);
    chk_reg(19, 0);
    chk_reg(31, 92);
    checks++;
    if (pred_bits !== 8'b0000_0101) begin failures++; $display("FAIL predicates %b", pred_bits); end
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
