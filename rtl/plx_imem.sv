// plx_imem: instruction memory of the PLX processor.
//
// WORDS 32-bit instructions, read asynchronously by word address (the PC
// without its two low bits) and written one word per clock through a load
// port used to place a program before the processor runs. The memory size is
// this design's choice.
module plx_imem #(
  parameter int WORDS = 1024
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [31:0]              rdata,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [31:0]              wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
