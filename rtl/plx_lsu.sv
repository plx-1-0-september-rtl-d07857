// plx_lsu: load/store unit of the PLX processor.
//
// Forms the effective address Rs1 + sign-extended imm13 and moves 1, 2, 4 or
// 8 bytes (sw code 0..3) between a register and a W-bit data-memory word.
// Memory is little-endian and accesses are naturally aligned: the address
// bits below the access size are ignored and flagged in misaligned. A load
// returns the bytes zero-extended; a store shifts the low bytes of Rd
// to the addressed position and raises the byte enables of those bytes.
// The ISA gives the address and the sizes; byte order, alignment and
// zero extension are this design's choices. Combinational; the memory
// it drives reads asynchronously and writes on the clock edge.
module plx_lsu
  import plx_pkg::*;
#(
  parameter int W = 64
) (
  input  logic [W-1:0]   base,       // Rs1
  input  logic [12:0]    imm13,
  input  logic [1:0]     sw,
  input  logic [W-1:0]   st_data,    // Rd
  input  logic [W-1:0]   mem_rdata,
  output logic [W-1:0]   addr,       // effective byte address
  output logic [W/8-1:0] mem_be,     // byte enables of a store
  output logic [W-1:0]   mem_wdata,
  output logic [W-1:0]   ld_data,
  output logic           misaligned
);
  localparam int NB  = W / 8;
  localparam int LNB = $clog2(NB);

  logic [LNB-1:0] off, amask;
  logic [W-1:0]   shifted, szmask;
  logic [NB-1:0]  bytes_on;

  always_comb begin
    addr       = base + W'($signed(imm13));
    amask      = LNB'((1 << sw) - 1);
    misaligned = (addr[LNB-1:0] & amask) != '0;
    off        = addr[LNB-1:0] & ~amask;
    bytes_on   = NB'((1 << (1 << sw)) - 1);
    szmask     = '0;
    for (int i = 0; i < NB; i++) szmask[i*8 +: 8] = {8{bytes_on[i]}};
    shifted    = mem_rdata >> (32'(off) * 8);
    ld_data    = shifted & szmask;
    mem_be     = bytes_on << off;
    mem_wdata  = (st_data & szmask) << (32'(off) * 8);
  end
endmodule
