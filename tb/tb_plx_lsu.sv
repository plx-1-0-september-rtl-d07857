// tb_plx_lsu: connects the load/store unit to a byte-array memory model and
// checks that stores of 1, 2, 4 and 8 bytes change only the addressed bytes
// (little-endian) and that loads return them zero-extended.
module tb_plx_lsu;
  localparam int W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] base, st_data, mem_rdata, addr, mem_wdata, ld_data;
  logic [12:0] imm13;
  logic [1:0] sw;
  logic [7:0] mem_be;
  logic misaligned;

  plx_lsu #(.W(W)) dut (.base, .imm13, .sw, .st_data, .mem_rdata, .addr, .mem_be, .mem_wdata,
                        .ld_data, .misaligned);

  logic [7:0] bytes [256];  // reference memory
  logic [W-1:0] words [32]; // word memory driven through the unit

  assign mem_rdata = words[addr[7:3]];

  initial begin
    for (int i = 0; i < 32; i++) begin
      words[i] = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) bytes[i*8+k] = words[i][k*8 +: 8];
    end
    for (int n = 0; n < 3000; n++) begin
      int size, ea;
      longint off;
      sw = 2'($urandom_range(0, 3));
      size = 1 << sw;
      ea = $urandom_range(0, 255) & ~(size - 1);
      off = longint'($urandom_range(0, 4095)) - 2048;
      base = 64'(longint'(ea) - off);
      imm13 = 13'(off);
      st_data = {$urandom, $urandom};
      #1;
      checks++;
      if (addr !== 64'(ea) || misaligned) begin
        failures++; $display("addr %h exp %h", addr, ea);
      end
      if ($urandom_range(0, 1)) begin
        // store
        for (int k = 0; k < 8; k++)
          if (mem_be[k]) words[addr[7:3]][k*8 +: 8] = mem_wdata[k*8 +: 8];
        for (int k = 0; k < size; k++) bytes[ea + k] = st_data[k*8 +: 8];
        for (int i = 0; i < 32; i++) begin
          for (int k = 0; k < 8; k++) begin
            checks++;
            if (words[i][k*8 +: 8] !== bytes[i*8+k]) begin
              failures++;
              if (failures < 10) $display("store mismatch word %0d byte %0d", i, k);
            end
          end
        end
      end else begin
        logic [W-1:0] e;
        e = '0;
        for (int k = 0; k < size; k++) e[k*8 +: 8] = bytes[ea + k];
        checks++;
        if (ld_data !== e) begin
          failures++;
          if (failures < 10) $display("load mismatch ea=%0d sw=%0d got %h exp %h", ea, sw, ld_data, e);
        end
      end
    end
    // a misaligned 4-byte access is flagged
    base = 64'd2; imm13 = '0; sw = 2'd2; #1;
    checks++;
    if (!misaligned) begin failures++; $display("misaligned not flagged"); end
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
