// plx_dmem: data memory of the PLX processor.
//
// WORDS words of W bits, read asynchronously by word address and written on
// the clock edge under per-byte enables, so that 1-, 2-, 4- and 8-byte stores
// touch only their bytes. Its size is this design's choice; the ISA only
// speaks of mem[address].
module plx_dmem #(
  parameter int W     = 64,
  parameter int WORDS = 1024
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [W-1:0]             rdata,
  input  logic                     we,
  input  logic [W/8-1:0]           be,
  input  logic [W-1:0]             wdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we)
      for (int i = 0; i < W / 8; i++)
        if (be[i]) mem[addr][i*8 +: 8] <= wdata[i*8 +: 8];
  end

  assign rdata = mem[addr];
endmodule
