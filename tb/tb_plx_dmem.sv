// tb_plx_dmem: random byte-enabled writes and reads against a byte model.
module tb_plx_dmem;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] addr;
  logic [W-1:0] rdata, wdata;
  logic we;
  logic [7:0] be;
  logic [7:0] model [64][8];

  plx_dmem #(.W(W), .WORDS(64)) dut (.clk, .addr, .rdata, .we, .be, .wdata);

  initial begin
    we = 1; be = '1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      addr = 6'(i); wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) model[i][k] = wdata[k*8 +: 8];
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr = 6'($urandom); we = 1'($urandom); be = 8'($urandom); wdata = {$urandom, $urandom};
      #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (rdata[k*8 +: 8] !== model[addr][k]) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d byte %0d", addr, k);
        end
      end
      @(posedge clk);
      if (we) for (int k = 0; k < 8; k++) if (be[k]) model[addr][k] = wdata[k*8 +: 8];
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
