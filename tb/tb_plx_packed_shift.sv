// tb_plx_packed_shift: random test of the packed shifter (left, right,
// right arithmetic) at 2-, 4- and 8-byte subwords, including amounts at and
// beyond the subword width.
module tb_plx_packed_shift;
  import plx_pkg::*;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] a, amt, r, e;
  pshift_op_e op;
  logic [1:0] sw;

  plx_packed_shift #(.W(W)) dut (.a, .amt, .op, .sw, .r);

  function automatic logic [W-1:0] ref_sh(logic [W-1:0] x, logic [W-1:0] n, pshift_op_e o, int szc);
    logic [W-1:0] res = '0;
    int bits = 8 << szc;
    for (int i = 0; i < W / bits; i++) begin
      logic signed [127:0] v;
      logic [127:0] u;
      u = 128'((x >> (i * bits)) & ((128'd1 << bits) - 1));
      v = u[bits-1] ? $signed(u) - $signed(128'd1 << bits) : $signed(u);
      for (longint k = 0; k < n && k < 200; k++) begin
        if (o == PS_LEFT) u = (u << 1) & ((128'd1 << bits) - 1);
        else if (o == PS_RIGHT) u = u >> 1;
        else v = v >>> 1;
      end
      if (o == PS_RIGHT_ARITH) u = 128'(v) & ((128'd1 << bits) - 1);
      res |= W'(u << (i * bits));
    end
    return res;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      op  = pshift_op_e'($urandom_range(0, 2));
      sw  = 2'($urandom_range(1, 3));
      a   = {$urandom, $urandom};
      case ($urandom_range(0, 3))
        0: amt = W'($urandom_range(0, 70));
        1: amt = {$urandom, $urandom};
        default: amt = W'($urandom_range(0, 16));
      endcase
      #1;
      e = ref_sh(a, amt, op, int'(sw));
      checks++;
      if (r !== e) begin
        failures++;
        if (failures < 10) $display("MISMATCH op=%s sw=%0d a=%h amt=%0d r=%h exp=%h", op.name(), sw, a, amt, r, e);
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
