// tb_plx_regfile: random reads and dual writes against an array model;
// checks that R0 stays 0, that port B wins a same-register write, and that
// writes appear after the clock edge.
module tb_plx_regfile;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [4:0] ra1, ra2, ra3, ra4, wa_a, wa_b;
  logic [W-1:0] rd1, rd2, rd3, rd4, wd_a, wd_b;
  logic we_a, we_b;
  logic [W-1:0] model [32];

  plx_regfile #(.W(W), .NREGS(32)) dut (.clk, .rst_n, .ra1, .ra2, .ra3, .rd1, .rd2, .rd3, .ra4, .rd4,
                                        .we_a, .wa_a, .wd_a, .we_b, .wa_b, .wd_b);

  task automatic chk(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; we_a = 0; we_b = 0; ra1 = 0; ra2 = 0; ra3 = 0; ra4 = 0;
    wa_a = 0; wa_b = 0; wd_a = 0; wd_b = 0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we_a = 1'($urandom); we_b = ($urandom_range(0, 3) == 0);
      wa_a = 5'($urandom); wa_b = ($urandom_range(0, 4) == 0) ? wa_a : 5'($urandom);
      wd_a = {$urandom, $urandom}; wd_b = {$urandom, $urandom};
      ra1 = 5'($urandom); ra2 = 5'($urandom); ra3 = 5'($urandom); ra4 = 5'($urandom);
      #1;
      chk(rd1, model[ra1], "rd1"); chk(rd2, model[ra2], "rd2");
      chk(rd3, model[ra3], "rd3"); chk(rd4, model[ra4], "rd4");
      @(posedge clk);
      if (we_a && wa_a != 0) model[wa_a] = wd_a;
      if (we_b && wa_b != 0) model[wa_b] = wd_b;
    end
    @(negedge clk); we_a = 0; we_b = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); #1; chk(rd1, model[i], "final");
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
