// tb_plx_branch: checks target, link and halt outputs of the branch unit for
// every jump form and trap with random PCs, offsets and register values.
module tb_plx_branch;
  import plx_pkg::*;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  br_op_e op;
  logic [W-1:0] pc, rd_val, target, link;
  logic [22:0] imm23;
  logic taken, link_we, halt;

  plx_branch #(.W(W)) dut (.op, .pc, .imm23, .rd_val, .taken, .target, .link_we, .link, .halt);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%s pc=%h imm=%h rd=%h tgt=%h", what, op.name(), pc, imm23, rd_val, target);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint off;
      op = br_op_e'($urandom_range(0, 5));
      pc = {$urandom, $urandom[31:2], 2'b00};
      imm23 = 23'($urandom);
      rd_val = {$urandom, $urandom};
      #1;
      off = longint'(imm23) - (imm23[22] ? (64'd1 << 23) : 0);
      chk(taken == (op inside {BR_JMP, BR_JMP_LINK, BR_JMP_REG, BR_JMP_REG_LINK}), "taken");
      chk(halt == (op == BR_TRAP), "halt");
      chk(link_we == (op inside {BR_JMP_LINK, BR_JMP_REG_LINK}), "link_we");
      chk(link == pc + 4, "link");
      if (op inside {BR_JMP, BR_JMP_LINK}) chk(target == pc + off, "imm target");
      if (op inside {BR_JMP_REG, BR_JMP_REG_LINK}) chk(target == pc + rd_val, "reg target");
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
