// plx_permute: subword permutation unit of the PLX processor.
//
// Rearranges subwords without changing them:
//  * mix.l / mix.r (1-, 2- or 4-byte subwords): pairs of adjacent subwords are
//    formed; mix.l fills each result pair with the upper subword of the pair
//    from Rs1 and then the upper one from Rs2, mix.r does the same with the
//    lower subwords.
//  * mux.rev, mux.mix, mux.shuf, mux.alt, mux.brcst (bytes): fixed byte
//    permutations of Rs1. Reading byte positions from the most significant
//    end (position 0) and with NB bytes, H = NB/2:
//      rev   : position p takes position NB-1-p
//      mix   : the two halves are mixed, upper result half = even positions
//              of each half interleaved, lower result half = odd positions
//              (64 bits: 0 4 2 6 1 5 3 7)
//      shuf  : perfect shuffle of the two halves (0 4 1 5 2 6 3 7)
//      alt   : even positions, then odd positions (0 2 4 6 1 3 5 7)
//      brcst : every byte takes the least significant byte.
//  * perm (2-byte subwords): result subword i takes Rs1 subword s_i, where
//    s_i is the i-th log2(n)-bit group of the low bits of Rs2 (n = W/16).
// The mix and mux patterns follow the ISA's diagrams; the bit order of the
// perm selector groups is this design's own choice. Combinational.
module plx_permute
  import plx_pkg::*;
#(
  parameter int W = 64
) (
  input  logic [W-1:0] a,     // Rs1
  input  logic [W-1:0] b,     // Rs2 (mix operand, perm selectors)
  input  perm_op_e     op,
  input  logic [1:0]   sw,    // mix subword size code (0..2)
  output logic [W-1:0] r
);
  localparam int NB = W / 8;
  localparam int H  = NB / 2;
  localparam int NP = W / 16;
  localparam int SL = (NP > 1) ? $clog2(NP) : 1;

  logic [W-1:0] mixres [3];
  logic [W-1:0] mux_r, perm_r;

  // mix.l / mix.r for each subword size
  for (genvar k = 0; k < 3; k++) begin : g_mix
    localparam int BITS = 8 << k;
    localparam int N    = W / BITS;
    always_comb begin
      mixres[k] = '0;
      for (int j = 0; j < N / 2; j++) begin
        if (op == PM_MIX_L) begin
          mixres[k][(2*j+1)*BITS +: BITS] = a[(2*j+1)*BITS +: BITS];
          mixres[k][(2*j)*BITS   +: BITS] = b[(2*j+1)*BITS +: BITS];
        end else begin
          mixres[k][(2*j+1)*BITS +: BITS] = a[(2*j)*BITS +: BITS];
          mixres[k][(2*j)*BITS   +: BITS] = b[(2*j)*BITS +: BITS];
        end
      end
    end
  end

  // byte permutations; src(p) is a position counted from the top byte
  function automatic int mux_src(perm_op_e o, int p);
    int q;
    case (o)
      PM_REV:  return NB - 1 - p;
      PM_SHUF: return (p % 2 == 0) ? p / 2 : H + p / 2;
      PM_ALT:  return (p < H) ? 2 * p : 2 * (p - H) + 1;
      PM_MIX: begin
        q = (p < H) ? p : p - H;
        if (p < H) return (q % 2 == 0) ? q : H + q - 1;
        else       return (q % 2 == 0) ? q + 1 : H + q;
      end
      default: return NB - 1;   // brcst: least significant byte
    endcase
  endfunction

  always_comb begin
    mux_r = '0;
    for (int p = 0; p < NB; p++)
      mux_r[(NB-1-p)*8 +: 8] = a[(NB-1-mux_src(op, p))*8 +: 8];
  end

  always_comb begin
    perm_r = '0;
    for (int i = 0; i < NP; i++) begin
      logic [SL-1:0] s;
      s = b[i*SL +: SL];
      perm_r[i*16 +: 16] = a[32'(s)*16 +: 16];
    end
  end

  always_comb begin
    unique case (op)
      PM_MIX_L, PM_MIX_R: r = (sw == 2'd3) ? '0 : mixres[sw];
      PM_PERM:            r = perm_r;
      default:            r = mux_r;
    endcase
  end
endmodule
