// tb_plx_packed_mul: random test of pmul.odd/.even and pmulshr/.a at every
// shift code against a reference computed with 64-bit integers.
module tb_plx_packed_mul;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b, r, e;
  logic shr, oa;
  logic [1:0] sa;

  plx_packed_mul #(.W(W)) dut (.a, .b, .shr, .odd_arith(oa), .sa, .r);

  function automatic logic [W-1:0] ref_mul(logic [W-1:0] x, logic [W-1:0] y, bit s, bit o, int code);
    logic [W-1:0] res = '0;
    int amts[4] = '{0, 8, 15, 16};
    if (!s) begin
      for (int j = 0; j < W / 32; j++) begin
        int k = o ? 2 * j + 1 : 2 * j;
        longint px = longint'(shortint'(x[k*16 +: 16]));
        longint py = longint'(shortint'(y[k*16 +: 16]));
        longint p  = px * py;
        res[j*32 +: 32] = 32'(p);
      end
    end else begin
      for (int i = 0; i < W / 16; i++) begin
        longint p;
        if (o) p = longint'(shortint'(x[i*16 +: 16])) * longint'(shortint'(y[i*16 +: 16]));
        else   p = longint'(x[i*16 +: 16]) * longint'(y[i*16 +: 16]);
        p = p >>> amts[code];
        res[i*16 +: 16] = 16'(p);
      end
    end
    return res;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      shr = 1'($urandom); oa = 1'($urandom); sa = 2'($urandom);
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (n % 7 == 0) a = {W/16{16'h8000}};
      if (n % 11 == 0) b = {W/16{16'hffff}};
      #1;
      e = ref_mul(a, b, shr, oa, int'(sa));
      checks++;
      if (r !== e) begin
        failures++;
        if (failures < 10) $display("MISMATCH shr=%b oa=%b sa=%0d a=%h b=%h r=%h exp=%h", shr, oa, sa, a, b, r, e);
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
