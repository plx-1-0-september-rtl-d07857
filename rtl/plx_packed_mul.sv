// plx_packed_mul: packed 16-bit multiplier of the PLX processor.
//
// pmul.odd / pmul.even multiply the odd- or even-indexed signed 16-bit
// subwords of the two operands (index 0 is the least significant subword) and
// write the full 32-bit products side by side: the product of subword pair
// 2j+1 (odd) or 2j (even) lands in 32-bit field j of the result.
// pmulshr multiplies every 16-bit subword pair, unsigned (pmulshr) or signed
// (pmulshr.a), shifts each 32-bit product right by 0, 8, 15 or 16 bits
// (sa code 0..3), logically or arithmetically, and keeps the low 16 bits.
// Combinational; a pipelined multiplier would be an implementation choice the
// ISA leaves open.
module plx_packed_mul
  import plx_pkg::*;
#(
  parameter int W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         shr,       // 1: pmulshr, 0: pmul.odd/even
  input  logic         odd_arith, // pmul: 1 = odd; pmulshr: 1 = arithmetic
  input  logic [1:0]   sa,        // pmulshr shift code: 0,8,15,16
  output logic [W-1:0] r
);
  localparam int N = W / 16;

  logic [W-1:0] r_mul, r_shr;

  always_comb begin
    r_mul = '0;
    for (int j = 0; j < N / 2; j++) begin
      logic signed [15:0] x, y;
      x = odd_arith ? a[(2*j+1)*16 +: 16] : a[2*j*16 +: 16];
      y = odd_arith ? b[(2*j+1)*16 +: 16] : b[2*j*16 +: 16];
      r_mul[j*32 +: 32] = x * y;
    end
  end

  always_comb begin
    r_shr = '0;
    for (int i = 0; i < N; i++) begin
      logic [31:0] p, q;
      logic [4:0]  amt;
      if (odd_arith) p = $signed(a[i*16 +: 16]) * $signed(b[i*16 +: 16]);
      else           p = a[i*16 +: 16] * b[i*16 +: 16];
      case (sa)
        2'd0:    amt = 5'd0;
        2'd1:    amt = 5'd8;
        2'd2:    amt = 5'd15;
        default: amt = 5'd16;
      endcase
      q = odd_arith ? 32'($signed(p) >>> amt) : (p >> amt);
      r_shr[i*16 +: 16] = q[15:0];
    end
  end

  assign r = shr ? r_shr : r_mul;
endmodule
