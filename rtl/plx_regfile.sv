// plx_regfile: general-integer register file of the PLX processor.
//
// NREGS registers of W bits. R0 always reads 0 and ignores writes. Three
// asynchronous read ports serve Rs1, Rs2 and Rd (Rd is read by store,
// deposit, loadi, testbit and jmp.reg); a fourth read port lets a
// testbench or debugger observe any register. Two synchronous write ports: port A
// writes an instruction's result (or the link value into R31), port B the
// base-register update of load/store .update. When both write the same
// register, port B wins, so that the update, which the ISA places after the
// load, is what remains. Reset clears all registers (this design's choice;
// the ISA does not define reset).
module plx_regfile #(
  parameter int W     = 64,
  parameter int NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  input  logic [$clog2(NREGS)-1:0] ra3,
  output logic [W-1:0]             rd1,
  output logic [W-1:0]             rd2,
  output logic [W-1:0]             rd3,
  input  logic [$clog2(NREGS)-1:0] ra4,   // observation port
  output logic [W-1:0]             rd4,
  input  logic                     we_a,
  input  logic [$clog2(NREGS)-1:0] wa_a,
  input  logic [W-1:0]             wd_a,
  input  logic                     we_b,
  input  logic [$clog2(NREGS)-1:0] wa_b,
  input  logic [W-1:0]             wd_b
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      if (we_a && wa_a != '0) regs[wa_a] <= wd_a;
      if (we_b && wa_b != '0) regs[wa_b] <= wd_b;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
  assign rd3 = (ra3 == '0) ? '0 : regs[ra3];
  assign rd4 = (ra4 == '0) ? '0 : regs[ra4];
endmodule
