// plx_shift_bitfield: whole-register shifter and bit-field unit of PLX.
//
//  * slli / srai / srli shift Rs1 by the low log2(W) bits of imm13 (the ISA:
//    only the low-order bits of a too-large immediate are used).
//  * shrp concatenates Rs1 (upper) and Rs2 (lower), shifts the 2W-bit pair
//    right by imm8 and keeps the low W bits; imm8 bits above log2(2W) are
//    ignored, as the ISA says for 32- and 64-bit registers.
//  * extract takes the imm6-bit field of Rs1 starting at bit imm7 and returns
//    it right-aligned with zeros above.
//  * deposit writes the low imm6 bits of Rs1 into Rd starting at bit imm7 and
//    leaves the other bits of Rd (rd_old) unchanged.
// Field bits that fall beyond bit W-1 are dropped (extract returns zeros for
// them); a length of 0 selects an empty field. Those edge rules are this
// design's own. Combinational.
module plx_shift_bitfield
  import plx_pkg::*;
#(
  parameter int W = 64
) (
  input  logic [W-1:0] a,       // Rs1
  input  logic [W-1:0] b,       // Rs2 (shrp)
  input  logic [W-1:0] rd_old,  // current Rd (deposit)
  input  logic [12:0]  imm13,
  input  logic [7:0]   imm8,
  input  logic [6:0]   imm7,
  input  logic [5:0]   imm6,
  input  sb_op_e       op,
  output logic [W-1:0] r
);
  localparam int LW = $clog2(W);

  logic [LW-1:0]  sh;
  logic [LW:0]    shp;
  logic [2*W-1:0] pair;
  logic [W-1:0]   mask, field;

  always_comb begin
    sh    = imm13[LW-1:0];
    shp   = imm8[LW:0];
    pair  = {a, b} >> shp;
    mask  = (W'(1) << imm6) - W'(1);
    if (32'(imm6) >= W) mask = '1;
    field = (a >> imm7) & mask;
    unique case (op)
      SB_SLL:     r = a << sh;
      SB_SRA:     r = W'($signed(a) >>> sh);
      SB_SRL:     r = a >> sh;
      SB_SHRP:    r = pair[W-1:0];
      SB_EXTRACT: r = field;
      default:    r = (rd_old & ~(mask << imm7)) | ((a & mask) << imm7);
    endcase
  end
endmodule
