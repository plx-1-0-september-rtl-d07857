// tb_plx_predfile: random predicate writes and set switches (changepr,
// changepr.ld) against a model; checks that P0 of the active set reads 1.
module tb_plx_predfile;
  logic clk = 0;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, qp_val, pwe, p1_val, set_we, set_ld;
  logic [2:0] qp, p1, p2;
  logic [3:0] set_sel, active;
  logic [7:0] set_val, active_bits;
  logic [7:0] model [16];
  logic [3:0] mact;
  int n_switch = 0, n_load = 0;

  plx_predfile #(.NSETS(16)) dut (.clk, .rst_n, .qp, .qp_val, .pwe, .p1, .p2, .p1_val, .set_we,
                                  .set_ld, .set_sel, .set_val, .active, .active_bits);

  initial begin
    rst_n = 0; pwe = 0; set_we = 0; set_ld = 0; qp = 0; p1 = 0; p2 = 0; p1_val = 0;
    set_sel = 0; set_val = 0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    mact = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      pwe = 1'($urandom); p1 = 3'($urandom); p2 = 3'($urandom); p1_val = 1'($urandom);
      set_we = ($urandom_range(0, 5) == 0); set_ld = 1'($urandom);
      set_sel = 4'($urandom); set_val = 8'($urandom);
      if (set_we) pwe = 0;
      for (int q = 0; q < 8; q++) begin
        qp = 3'(q); #1;
        checks++;
        if (qp_val !== ((q == 0) ? 1'b1 : model[mact][q])) begin
          failures++;
          if (failures < 10) $display("FAIL set %0d P%0d got %b", mact, q, qp_val);
        end
      end
      checks++;
      if (active !== mact) begin failures++; $display("active %0d exp %0d", active, mact); end
      @(posedge clk);
      if (pwe) begin
        if (p1 != 0) model[mact][p1] = p1_val;
        if (p2 != 0) model[mact][p2] = !p1_val;
      end
      if (set_we) begin
        mact = set_sel; n_switch++;
        if (set_ld) begin model[set_sel] = set_val; n_load++; end
      end
    end
    checks++;
    if (n_switch == 0 || n_load == 0) failures++;
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
