// plx_packed_shift: packed shifter of the PLX processor.
//
// Shifts every subword of the operand by the same amount: left logical,
// right logical or right arithmetic (pshift.l/.r/.ra and pshifti.l/.r/.ra).
// The amount is either the whole of Rs2 (pshift) or a 5-bit immediate
// (pshifti); the caller passes it zero-extended in amt. An amount of at least
// the subword width clears the subword (logical shifts) or fills it with its
// sign bit (arithmetic shift); that rule is this design's own, the ISA does not
// say. Subword size code sw: 1 = 2, 2 = 4, 3 = 8 bytes (the ISA defines these
// three; code 0 shifts bytes). Combinational.
module plx_packed_shift
  import plx_pkg::*;
#(
  parameter int W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] amt,
  input  pshift_op_e   op,
  input  logic [1:0]   sw,
  output logic [W-1:0] r
);
  logic [W-1:0] res [4];

  for (genvar k = 0; k < 4; k++) begin : g_size
    localparam int BITS = 8 << k;
    localparam int N    = W / BITS;
    if (N > 0) begin : g_on
      always_comb begin
        res[k] = '0;
        for (int i = 0; i < N; i++) begin
          logic [BITS-1:0] x;
          logic            big;
          x   = a[i*BITS +: BITS];
          big = amt >= W'(BITS);
          unique case (op)
            PS_LEFT:  res[k][i*BITS +: BITS] = big ? '0 : x << amt[6:0];
            PS_RIGHT: res[k][i*BITS +: BITS] = big ? '0 : x >> amt[6:0];
            default:  res[k][i*BITS +: BITS] = big ? {BITS{x[BITS-1]}}
                                                   : BITS'($signed(x) >>> amt[6:0]);
          endcase
        end
      end
    end else begin : g_off
      assign res[k] = '0;
    end
  end

  assign r = res[sw];
endmodule
