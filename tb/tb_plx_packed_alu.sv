// tb_plx_packed_alu: random test of the packed ALU against a per-lane
// reference written with wide signed integers. Every operation is run at every
// subword size (1, 2, 4, 8 bytes) with random and corner-case operands.
module tb_plx_packed_alu;
  import plx_pkg::*;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b, r;
  palu_op_e op;
  logic [1:0] sw, sa;

  plx_packed_alu #(.W(W)) dut (.a, .b, .op, .sw, .sa, .r);

  function automatic longint unsigned lane_ref(palu_op_e o, longint unsigned x, longint unsigned y,
                                               int bits, int s);
    logic signed [71:0] sx, sy, ux, uy, v, smax, smin, umax;
    logic [71:0] m;
    m    = (72'd1 << bits) - 1;
    ux   = 72'(x); uy = 72'(y);
    sx   = ux[bits-1] ? ux - (72'd1 << bits) : ux;
    sy   = uy[bits-1] ? uy - (72'd1 << bits) : uy;
    smax = (72'sd1 <<< (bits-1)) - 1;
    smin = -(72'sd1 <<< (bits-1));
    umax = (72'sd1 <<< bits) - 1;
    case (o)
      PA_ADD:     v = ux + uy;
      PA_ADD_U:   begin v = ux + uy; if (v > umax) v = umax; end
      PA_ADD_S:   begin v = sx + sy; if (v > smax) v = smax; if (v < smin) v = smin; end
      PA_ADDINCR: v = ux + uy + 1;
      PA_SUB:     v = ux - uy;
      PA_SUB_U:   begin v = ux - uy; if (v < 0) v = 0; end
      PA_SUB_S:   begin v = sx - sy; if (v > smax) v = smax; if (v < smin) v = smin; end
      PA_SUBDECR: v = ux - uy - 1;
      PA_AVG:     begin v = ux + uy; v = (v >>> 1) | (v & 1); end
      PA_AVG_RAZ: v = (ux + uy + 1) >>> 1;
      PA_SUBAVG:  begin v = ux - uy; v = (v >>> 1) | (v & 1); end
      PA_AND:     v = ux & uy;
      PA_ANDCM:   v = ux & ~uy;
      PA_OR:      v = ux | uy;
      PA_XOR:     v = ux ^ uy;
      PA_NOT:     v = ~ux;
      PA_CMPEQ:   v = (ux == uy) ? -1 : 0;
      PA_CMPGT:   v = (sx > sy) ? -1 : 0;
      PA_MAX:     v = (sx > sy) ? sx : sy;
      PA_MIN:     v = (sx < sy) ? sx : sy;
      PA_SHADD_L: begin v = sx * (72'sd1 <<< s) + sy; if (v > smax) v = smax; if (v < smin) v = smin; end
      default:    begin v = (sx >>> s) + sy; if (v > smax) v = smax; if (v < smin) v = smin; end
    endcase
    return 64'(v & m);
  endfunction

  function automatic logic [W-1:0] word_ref(palu_op_e o, logic [W-1:0] x, logic [W-1:0] y, int szc, int s);
    logic [W-1:0] res = '0;
    int bits = 8 << szc;
    for (int i = 0; i < W / bits; i++) begin
      longint unsigned lx, ly, lr;
      lx = 64'((x >> (i * bits)) & ((128'd1 << bits) - 1));
      ly = 64'((y >> (i * bits)) & ((128'd1 << bits) - 1));
      lr = lane_ref(o, lx, ly, bits, s);
      res |= W'(128'(lr) << (i * bits));
    end
    return res;
  endfunction

  function automatic logic [W-1:0] rnd_operand();
    case ($urandom_range(0, 5))
      0: return '0;
      1: return '1;
      2: return {W/8{8'h80}};
      3: return {W/8{8'h7f}};
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = palu_op_e'($urandom_range(0, 21));
      sw = 2'($urandom_range(0, 3));
      sa = 2'($urandom_range(1, 3));
      a  = rnd_operand();
      b  = rnd_operand();
      #1;
      checks++;
      if (r !== word_ref(op, a, b, sw, sa)) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH op=%s sw=%0d sa=%0d a=%h b=%h r=%h exp=%h", op.name(), sw, sa, a, b, r,
                   word_ref(op, a, b, sw, sa));
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
