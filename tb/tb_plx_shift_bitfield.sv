// tb_plx_shift_bitfield: random test of slli, srai, srli, shrp, extract and
// deposit; the reference moves one bit at a time.
module tb_plx_shift_bitfield;
  import plx_pkg::*;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b, rd_old, r, e;
  logic [12:0] imm13;
  logic [7:0] imm8;
  logic [6:0] imm7;
  logic [5:0] imm6;
  sb_op_e op;

  plx_shift_bitfield #(.W(W)) dut (.a, .b, .rd_old, .imm13, .imm8, .imm7, .imm6, .op, .r);

  function automatic logic [W-1:0] ref_sb(sb_op_e o, logic [W-1:0] x, logic [W-1:0] y, logic [W-1:0] old,
                                          logic [12:0] i13, logic [7:0] i8, logic [6:0] pos, logic [5:0] len);
    logic [W-1:0] res;
    int sh = int'(i13) % W;
    case (o)
      SB_SLL: for (int i = 0; i < W; i++) res[i] = (i - sh >= 0) ? x[i - sh] : 1'b0;
      SB_SRL: for (int i = 0; i < W; i++) res[i] = (i + sh < W) ? x[i + sh] : 1'b0;
      SB_SRA: for (int i = 0; i < W; i++) res[i] = (i + sh < W) ? x[i + sh] : x[W-1];
      SB_SHRP: begin
        int k = int'(i8) % (2 * W);
        for (int i = 0; i < W; i++) begin
          int j = i + k;
          res[i] = (j < W) ? y[j] : (j < 2 * W) ? x[j - W] : 1'b0;
        end
      end
      SB_EXTRACT: for (int i = 0; i < W; i++) res[i] = (i < int'(len) && i + int'(pos) < W) ? x[i + int'(pos)] : 1'b0;
      default: begin
        res = old;
        for (int i = 0; i < int'(len); i++) if (i + int'(pos) < W) res[i + int'(pos)] = x[i];
      end
    endcase
    return res;
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = sb_op_e'($urandom_range(0, 5));
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; rd_old = {$urandom, $urandom};
      imm13 = 13'($urandom); imm8 = 8'($urandom);
      imm7 = 7'($urandom_range(0, 1) ? $urandom_range(0, 63) : $urandom);
      imm6 = 6'($urandom);
      #1;
      e = ref_sb(op, a, b, rd_old, imm13, imm8, imm7, imm6);
      checks++;
      if (r !== e) begin
        failures++;
        if (failures < 10) $display("MISMATCH op=%s a=%h b=%h i13=%0d i8=%0d pos=%0d len=%0d r=%h exp=%h",
                                    op.name(), a, b, imm13, imm8, imm7, imm6, r, e);
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
