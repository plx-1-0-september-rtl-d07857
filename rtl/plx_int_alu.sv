// plx_int_alu: scalar immediate ALU of the PLX processor.
//
// addi / subi add or subtract the sign-extended 13-bit immediate to Rs1;
// andi / ori / xori combine Rs1 with the zero-extended 13-bit immediate.
// loadi.hi / loadi.lo place the low 16 bits of the 18-bit immediate into bits
// 31:16 or 15:0 of Rd; the other bits of Rd keep their old value (rd_old),
// which is this design's reading, the ISA only names the bits written.
// Combinational.
module plx_int_alu
  import plx_pkg::*;
#(
  parameter int W = 64
) (
  input  logic [W-1:0] a,       // Rs1
  input  logic [W-1:0] rd_old,  // current Rd (loadi)
  input  logic [12:0]  imm13,
  input  logic [17:0]  imm18,
  input  int_op_e      op,
  output logic [W-1:0] r
);
  logic [W-1:0] sext13, zext13;

  always_comb begin
    sext13 = W'($signed(imm13));
    zext13 = W'(imm13);
    r      = rd_old;
    unique case (op)
      IA_ADD:      r = a + sext13;
      IA_SUB:      r = a - sext13;
      IA_AND:      r = a & zext13;
      IA_OR:       r = a | zext13;
      IA_XOR:      r = a ^ zext13;
      IA_LOADI_HI: r[31:16] = imm18[15:0];
      default:     r[15:0]  = imm18[15:0];
    endcase
  end
endmodule
