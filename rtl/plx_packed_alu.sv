// plx_packed_alu: subword-parallel ALU of the PLX processor.
//
// Splits the two W-bit operands into 1-, 2-, 4- or 8-byte subwords (sw code
// 0..3 = log2 of the byte count) and applies the same operation to every
// subword pair in parallel; one plx_lane_alu is built for every lane of every
// subword size and the sw code selects which set drives the result. Lanes
// never carry into their neighbours. Combinational, one result per cycle.
// Operations: padd (modular, .u, .s), paddincr, psub (modular, .u, .s),
// psubdecr, pavg, pavg.raz, psubavg, and, andcm, or, xor, not, pcmp.eq,
// pcmp.gt, pmax, pmin, pshiftadd.l/.r (sa = 1..3). The ISA restricts some
// operations to some subword sizes (pavg, psubavg, pmax, pmin: 1 and 2 bytes;
// pshiftadd: 2 bytes); that restriction is enforced by the decoder, this unit
// computes any size it is given. Subword sizes wider than W give zero.
module plx_packed_alu
  import plx_pkg::*;
#(
  parameter int W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  palu_op_e     op,
  input  logic [1:0]   sw,
  input  logic [1:0]   sa,
  output logic [W-1:0] r
);
  logic [W-1:0] res [4];

  for (genvar k = 0; k < 4; k++) begin : g_size
    localparam int BITS = 8 << k;
    localparam int N    = W / BITS;
    if (N > 0) begin : g_on
      for (genvar i = 0; i < N; i++) begin : g_lane
        plx_lane_alu #(.BITS(BITS)) u_lane (
          .a (a[i*BITS +: BITS]),
          .b (b[i*BITS +: BITS]),
          .op(op),
          .sa(sa),
          .r (res[k][i*BITS +: BITS])
        );
      end
    end else begin : g_off
      assign res[k] = '0;
    end
  end

  assign r = res[sw];
endmodule
