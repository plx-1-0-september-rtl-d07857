// plx_compare: predicate generator of the PLX processor.
//
// Produces the value written to predicate P1 (P2 receives its complement):
//  * cmp.rel  compares Rs1 with Rs2,
//  * cmpi.rel compares Rs1 with the sign-extended 8-bit immediate,
//    using one of eq, ne, lt, le, gt, ge (signed), ltu, leu, gtu, geu;
//  * testbit  returns bit imm8 of Rd, or 0 when imm8 is not below W.
// Relation codes above geu give 0 (this design's choice). Combinational.
module plx_compare
  import plx_pkg::*;
#(
  parameter int W = 64
) (
  input  logic [W-1:0] a,       // Rs1 (cmp/cmpi) or Rd (testbit)
  input  logic [W-1:0] b,       // Rs2
  input  logic [7:0]   imm8,
  input  rel_e         rel,
  input  cmp_op_e      op,
  output logic         p1
);
  logic [W-1:0] y;
  logic         eq, lt, ltu;

  always_comb begin
    y   = (op == CP_CMPI) ? W'($signed(imm8)) : b;
    eq  = a == y;
    lt  = $signed(a) < $signed(y);
    ltu = a < y;
    p1  = 1'b0;
    if (op == CP_TESTBIT) begin
      p1 = (32'(imm8) < W) ? a[imm8[$clog2(W)-1:0]] : 1'b0;
    end else begin
      case (rel)
        REL_EQ:  p1 = eq;
        REL_NE:  p1 = !eq;
        REL_LT:  p1 = lt;
        REL_LE:  p1 = lt || eq;
        REL_GT:  p1 = !(lt || eq);
        REL_GE:  p1 = !lt;
        REL_LTU: p1 = ltu;
        REL_LEU: p1 = ltu || eq;
        REL_GTU: p1 = !(ltu || eq);
        REL_GEU: p1 = !ltu;
        default: p1 = 1'b0;
      endcase
    end
  end
endmodule
