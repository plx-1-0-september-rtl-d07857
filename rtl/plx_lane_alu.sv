// plx_lane_alu: one subword lane of the packed ALU, BITS wide.
//
// Computes every packed ALU operation of PLX for a single subword: modular,
// unsigned-saturating and signed-saturating add and subtract, add-increment,
// subtract-decrement, the three averages, the bitwise logic operations,
// equal / signed greater-than compares (all-ones or all-zeros result), signed
// max / min and shift-and-add with signed saturation. Purely combinational.
// The rounding of pavg and psubavg follows the ISA: the (BITS+1)-bit sum or
// difference is shifted right by one with the carry (borrow) as the new top
// bit, and the result's low bit is the OR of the two low bits of the unshifted
// sum (difference). pavg.raz adds one before the shift. For pshiftadd the
// shifted operand is kept at full precision (BITS+3 bits) and only the sum is
// saturated; that precision choice is this design's own.
module plx_lane_alu
  import plx_pkg::*;
#(
  parameter int BITS = 8
) (
  input  logic [BITS-1:0] a,
  input  logic [BITS-1:0] b,
  input  palu_op_e        op,
  input  logic [1:0]      sa,     // pshiftadd shift amount (1..3)
  output logic [BITS-1:0] r
);
  localparam logic signed [BITS+3:0] SMAX = (BITS+4)'((1 << (BITS-1)) - 1);
  localparam logic signed [BITS+3:0] SMIN = -(BITS+4)'(1 << (BITS-1));

  logic [BITS:0]            usum, udiff, usum1;
  logic signed [BITS+3:0]   ssum, sdiff, shl, shr, shadd_l, shadd_r;
  logic                     sgt;

  function automatic logic [BITS-1:0] sat_s(input logic signed [BITS+3:0] v);
    if (v > SMAX)      return SMAX[BITS-1:0];
    else if (v < SMIN) return SMIN[BITS-1:0];
    else               return v[BITS-1:0];
  endfunction

  always_comb begin
    usum    = {1'b0, a} + {1'b0, b};
    usum1   = usum + 1'b1;
    udiff   = {1'b0, a} - {1'b0, b};
    ssum    = (BITS+4)'($signed(a)) + (BITS+4)'($signed(b));
    sdiff   = (BITS+4)'($signed(a)) - (BITS+4)'($signed(b));
    shl     = (BITS+4)'($signed(a)) <<< sa;
    shr     = (BITS+4)'($signed(a)) >>> sa;
    shadd_l = shl + (BITS+4)'($signed(b));
    shadd_r = shr + (BITS+4)'($signed(b));
    sgt     = $signed(a) > $signed(b);
    unique case (op)
      PA_ADD:     r = usum[BITS-1:0];
      PA_ADD_U:   r = usum[BITS] ? '1 : usum[BITS-1:0];
      PA_ADD_S:   r = sat_s(ssum);
      PA_ADDINCR: r = usum1[BITS-1:0];
      PA_SUB:     r = udiff[BITS-1:0];
      PA_SUB_U:   r = udiff[BITS] ? '0 : udiff[BITS-1:0];
      PA_SUB_S:   r = sat_s(sdiff);
      PA_SUBDECR: r = a - b - 1'b1;
      PA_AVG:     r = {usum[BITS:2], usum[1] | usum[0]};
      PA_AVG_RAZ: r = usum1[BITS:1];
      PA_SUBAVG:  r = {udiff[BITS:2], udiff[1] | udiff[0]};
      PA_AND:     r = a & b;
      PA_ANDCM:   r = a & ~b;
      PA_OR:      r = a | b;
      PA_XOR:     r = a ^ b;
      PA_NOT:     r = ~a;
      PA_CMPEQ:   r = (a == b) ? '1 : '0;
      PA_CMPGT:   r = sgt ? '1 : '0;
      PA_MAX:     r = sgt ? a : b;
      PA_MIN:     r = sgt ? b : a;
      PA_SHADD_L: r = sat_s(shadd_l);
      PA_SHADD_R: r = sat_s(shadd_r);
      default:    r = '0;
    endcase
  end
endmodule
