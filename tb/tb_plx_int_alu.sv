// tb_plx_int_alu: random test of addi, subi, andi, ori, xori, loadi.hi and
// loadi.lo against a reference built from 64-bit integer arithmetic.
module tb_plx_int_alu;
  import plx_pkg::*;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] a, rd_old, r, e;
  logic [12:0] imm13;
  logic [17:0] imm18;
  int_op_e op;

  plx_int_alu #(.W(W)) dut (.a, .rd_old, .imm13, .imm18, .op, .r);

  function automatic logic [W-1:0] ref_int(int_op_e o, logic [W-1:0] x, logic [W-1:0] old,
                                           logic [12:0] i13, logic [17:0] i18);
    longint s = longint'(i13) - (i13[12] ? 8192 : 0);
    longint unsigned z = longint'(i13);
    case (o)
      IA_ADD:      return x + s;
      IA_SUB:      return x - s;
      IA_AND:      return x & z;
      IA_OR:       return x | z;
      IA_XOR:      return x ^ z;
      IA_LOADI_HI: return (old & ~64'hFFFF_0000) | (longint'(i18 & 18'hFFFF) << 16);
      default:     return (old & ~64'hFFFF) | longint'(i18 & 18'hFFFF);
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      op = int_op_e'($urandom_range(0, 6));
      a = {$urandom, $urandom}; rd_old = {$urandom, $urandom};
      imm13 = 13'($urandom); imm18 = 18'($urandom);
      #1;
      e = ref_int(op, a, rd_old, imm13, imm18);
      checks++;
      if (r !== e) begin
        failures++;
        if (failures < 10) $display("MISMATCH op=%s a=%h imm13=%h r=%h exp=%h", op.name(), a, imm13, r, e);
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
