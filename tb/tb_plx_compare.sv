// tb_plx_compare: random test of cmp (all ten relations), cmpi with its
// sign-extended immediate and testbit, including bit numbers past the word.
module tb_plx_compare;
  import plx_pkg::*;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b;
  logic [7:0] imm8;
  rel_e rel;
  cmp_op_e op;
  logic p1, e;

  plx_compare #(.W(W)) dut (.a, .b, .imm8, .rel, .op, .p1);

  function automatic bit ref_cmp(cmp_op_e o, rel_e rl, logic [W-1:0] x, logic [W-1:0] y, logic [7:0] i8);
    longint sx, sy;
    longint unsigned ux, uy;
    if (o == CP_TESTBIT) return (i8 < 64) ? x[i8[5:0]] : 1'b0;
    ux = x; sx = longint'(x);
    if (o == CP_CMPI) begin sy = longint'(byte'(i8)); uy = longint'(sy); end
    else begin uy = y; sy = longint'(y); end
    case (rl)
      REL_EQ:  return ux == uy;
      REL_NE:  return ux != uy;
      REL_LT:  return sx < sy;
      REL_LE:  return sx <= sy;
      REL_GT:  return sx > sy;
      REL_GE:  return sx >= sy;
      REL_LTU: return ux < uy;
      REL_LEU: return ux <= uy;
      REL_GTU: return ux > uy;
      default: return ux >= uy;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = cmp_op_e'($urandom_range(0, 2));
      rel = rel_e'($urandom_range(0, 9));
      a = {$urandom, $urandom};
      b = ($urandom_range(0, 3) == 0) ? a : {$urandom, $urandom};
      imm8 = 8'($urandom);
      if (n % 5 == 0) a = W'($signed(imm8));
      if (n % 13 == 0) b = {~a[W-1], a[W-2:0]};
      #1;
      e = ref_cmp(op, rel, a, b, imm8);
      checks++;
      if (p1 !== e) begin
        failures++;
        if (failures < 10) $display("MISMATCH op=%s rel=%s a=%h b=%h imm8=%h p1=%b exp=%b", op.name(), rel.name(), a, b, imm8, p1, e);
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
