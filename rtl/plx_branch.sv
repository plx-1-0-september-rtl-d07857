// plx_branch: control-transfer unit of the PLX processor.
//
// jmp and jmp.link add the sign-extended 23-bit immediate to the PC;
// jmp.reg and jmp.reg.link add register Rd to the PC. The .link forms also
// return PC + 4 to be written to R31. trap stops the processor. The immediate
// is taken as a byte offset (this design's reading of "imm23 is added to the
// current PC"). The caller gates everything with the qualifying predicate.
// Combinational.
module plx_branch
  import plx_pkg::*;
#(
  parameter int W = 64
) (
  input  br_op_e       op,
  input  logic [W-1:0] pc,
  input  logic [22:0]  imm23,
  input  logic [W-1:0] rd_val,
  output logic         taken,
  output logic [W-1:0] target,
  output logic         link_we,
  output logic [W-1:0] link,
  output logic         halt
);
  always_comb begin
    link    = pc + W'(4);
    taken   = op inside {BR_JMP, BR_JMP_LINK, BR_JMP_REG, BR_JMP_REG_LINK};
    link_we = op inside {BR_JMP_LINK, BR_JMP_REG_LINK};
    halt    = op == BR_TRAP;
    target  = (op inside {BR_JMP_REG, BR_JMP_REG_LINK}) ? pc + rd_val
                                                         : pc + W'($signed(imm23));
  end
endmodule
