// plx_top: PLX processor system.
//
// Connects the single-cycle PLX core to its instruction memory (IWORDS 32-bit
// words) and its data memory (DWORDS words of W bits). A program is written
// into the instruction memory through the load port while the core is held in
// reset; after reset is released the core runs from address 0 until it
// executes trap, which raises halted. Registers and the active predicate set
// can be observed through the dbg_* ports, and data memory contents through
// dmem_dbg_*. The memories, their sizes and the load port belong to this
// design; the ISA only defines the instructions the core executes.
module plx_top
  import plx_pkg::*;
#(
  parameter int W      = 64,
  parameter int IWORDS = 1024,
  parameter int DWORDS = 1024
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // program load port
  input  logic                      prog_we,
  input  logic [$clog2(IWORDS)-1:0] prog_addr,
  input  logic [31:0]               prog_data,
  // status
  output logic                      halted,
  output logic [W-1:0]              pc,
  output logic                      retire,
  output logic                      misaligned,
  // observation
  input  logic [4:0]                dbg_reg,
  output logic [W-1:0]              dbg_reg_val,
  output logic [3:0]                pred_set,
  output logic [7:0]                pred_bits
);
  localparam int IAW = $clog2(IWORDS);
  localparam int DAW = $clog2(DWORDS);

  logic [IAW-1:0] imem_addr;
  logic [31:0]    imem_rdata;
  logic [DAW-1:0] dmem_addr;
  logic [W-1:0]   dmem_rdata, dmem_wdata;
  logic           dmem_we;
  logic [W/8-1:0] dmem_be;

  plx_core #(.W(W), .IAW(IAW), .DAW(DAW)) u_core (
    .clk, .rst_n,
    .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_rdata, .dmem_we, .dmem_be, .dmem_wdata,
    .pc, .halted, .retire, .misaligned,
    .dbg_reg, .dbg_reg_val, .pred_set, .pred_bits
  );

  plx_imem #(.WORDS(IWORDS)) u_imem (
    .clk, .raddr(imem_addr), .rdata(imem_rdata),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  plx_dmem #(.W(W), .WORDS(DWORDS)) u_dmem (
    .clk, .addr(dmem_addr), .rdata(dmem_rdata),
    .we(dmem_we), .be(dmem_be), .wdata(dmem_wdata)
  );
endmodule
