// tb_plx_permute: checks mix.l/.r at 1-, 2- and 4-byte subwords, the five
// mux byte permutations and perm against explicit position tables (64-bit
// words; positions counted from the most significant byte or subword).
module tb_plx_permute;
  import plx_pkg::*;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b, r, e;
  perm_op_e op;
  logic [1:0] sw;

  plx_permute #(.W(W)) dut (.a, .b, .op, .sw, .r);

  // byte position tables, position 0 = most significant byte
  int t_rev[8]  = '{7, 6, 5, 4, 3, 2, 1, 0};
  int t_mix[8]  = '{0, 4, 2, 6, 1, 5, 3, 7};
  int t_shuf[8] = '{0, 4, 1, 5, 2, 6, 3, 7};
  int t_alt[8]  = '{0, 2, 4, 6, 1, 3, 5, 7};

  function automatic logic [7:0] byte_at(logic [W-1:0] x, int pos);
    return x[(7 - pos) * 8 +: 8];
  endfunction

  function automatic logic [W-1:0] ref_perm(perm_op_e o, logic [W-1:0] x, logic [W-1:0] y, int szc);
    logic [W-1:0] res = '0;
    int bits, n;
    case (o)
      PM_MIX_L, PM_MIX_R: begin
        bits = 8 << szc; n = W / bits;
        // position p from the top: even p from Rs1, odd p from Rs2;
        // mix.l takes the pair's upper subword, mix.r its lower one
        for (int p = 0; p < n; p++) begin
          int srcpos = (p / 2) * 2 + ((o == PM_MIX_L) ? 0 : 1);
          logic [W-1:0] src = (p % 2 == 0) ? x : y;
          res |= ((src >> ((n - 1 - srcpos) * bits)) & ((W'(1) << bits) - 1)) << ((n - 1 - p) * bits);
        end
      end
      PM_PERM: begin
        for (int i = 0; i < 4; i++) res[i*16 +: 16] = x[int'(y[2*i +: 2])*16 +: 16];
      end
      PM_BRCST: res = {8{x[7:0]}};
      default: begin
        for (int p = 0; p < 8; p++) begin
          int s = (o == PM_REV) ? t_rev[p] : (o == PM_MIX) ? t_mix[p] : (o == PM_SHUF) ? t_shuf[p] : t_alt[p];
          res[(7 - p) * 8 +: 8] = byte_at(x, s);
        end
      end
    endcase
    return res;
  endfunction

  initial begin
    // directed: mix.2.r / mix.2.l of the ISA diagrams, subwords A3..A0 / B3..B0
    a = 64'hA3A3_A2A2_A1A1_A0A0; b = 64'hB3B3_B2B2_B1B1_B0B0; sw = 2'd1;
    op = PM_MIX_R; #1; checks++;
    if (r !== 64'hA2A2_B2B2_A0A0_B0B0) begin failures++; $display("mix.2.r %h", r); end
    op = PM_MIX_L; #1; checks++;
    if (r !== 64'hA3A3_B3B3_A1A1_B1B1) begin failures++; $display("mix.2.l %h", r); end
    a = 64'h0706050403020100;
    op = PM_SHUF; #1; checks++;
    if (r !== 64'h0703060205010400) begin failures++; $display("shuf %h", r); end
    for (int n = 0; n < 3000; n++) begin
      op = perm_op_e'($urandom_range(0, 7));
      sw = 2'($urandom_range(0, 2));
      a  = {$urandom, $urandom};
      b  = {$urandom, $urandom};
      #1;
      e = ref_perm(op, a, b, int'(sw));
      checks++;
      if (r !== e) begin
        failures++;
        if (failures < 10) $display("MISMATCH op=%s sw=%0d a=%h b=%h r=%h exp=%h", op.name(), sw, a, b, r, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
