// plx_core: single-cycle PLX processor.
//
// Every cycle the core fetches the instruction at PC, decodes it, reads up to
// three general registers (Rs1, Rs2, Rd) and the qualifying predicate, runs the
// execution units in parallel and, if the predicate is 1 and the instruction
// is valid, commits in the same clock edge: the selected unit's result to Rd,
// the link value to R31, the base update of a load/store .update to Rs1, P1
// and P2 of the active predicate set, a new active predicate set, and a store
// to data memory. A taken jump loads its target into PC; otherwise PC
// advances by 4. trap sets halted, after which the core stops fetching and
// committing. One instruction completes per cycle; reset sets PC to 0.
// The single-cycle organisation, reset PC and memory interface are this
// design's choices (the ISA defines instructions, not a pipeline). The
// instruction and data memories are outside the core: imem_* reads an
// instruction word asynchronously, dmem_* reads a data word asynchronously and
// writes it with byte enables on the clock edge.
module plx_core
  import plx_pkg::*;
#(
  parameter int W      = 64,
  parameter int NREGS  = 32,
  parameter int NSETS  = 16,
  parameter int IAW    = 10,   // instruction memory word-address bits
  parameter int DAW    = 10    // data memory word-address bits
) (
  input  logic           clk,
  input  logic           rst_n,
  // instruction memory
  output logic [IAW-1:0] imem_addr,
  input  logic [31:0]    imem_rdata,
  // data memory
  output logic [DAW-1:0] dmem_addr,
  input  logic [W-1:0]   dmem_rdata,
  output logic           dmem_we,
  output logic [W/8-1:0] dmem_be,
  output logic [W-1:0]   dmem_wdata,
  // status
  output logic [W-1:0]   pc,
  output logic           halted,
  output logic           retire,      // an instruction committed this cycle
  output logic           misaligned,  // the committing access was misaligned
  // observation
  input  logic [4:0]     dbg_reg,
  output logic [W-1:0]   dbg_reg_val,
  output logic [3:0]     pred_set,
  output logic [7:0]     pred_bits
);
  localparam int NB = W / 8;

  dec_t         d;
  logic [W-1:0] rs1_val, rs2_val, rd_val;
  logic         qp_val, exec;
  logic [W-1:0] r_int, r_sb, r_palu, r_pmul, r_pshift, r_perm, r_load, result;
  logic [W-1:0] ls_addr, pshift_amt;
  logic         br_taken, br_link_we, br_halt, cmp_p1;
  logic [W-1:0] br_target, br_link;
  logic         ls_mis;

  assign imem_addr = pc[IAW+1:2];

  plx_decode u_dec (.instr(imem_rdata), .d(d));

  plx_regfile #(.W(W), .NREGS(NREGS)) u_rf (
    .clk, .rst_n,
    .ra1(d.rs1), .ra2(d.rs2), .ra3(d.rd),
    .rd1(rs1_val), .rd2(rs2_val), .rd3(rd_val),
    .ra4(dbg_reg), .rd4(dbg_reg_val),
    .we_a(exec && (d.rd_we || br_link_we)),
    .wa_a(br_link_we ? 5'd31 : d.rd),
    .wd_a(br_link_we ? br_link : result),
    .we_b(exec && d.ls_update),
    .wa_b(d.rs1),
    .wd_b(ls_addr)
  );

  plx_predfile #(.NSETS(NSETS)) u_pf (
    .clk, .rst_n,
    .qp(d.qp), .qp_val,
    .pwe(exec && d.pred_write), .p1(d.p1), .p2(d.p2), .p1_val(cmp_p1),
    .set_we(exec && d.setpr), .set_ld(d.setpr_ld), .set_sel(d.imm4), .set_val(d.imm8),
    .active(pred_set), .active_bits(pred_bits)
  );

  assign exec = d.valid && qp_val && !halted;

  plx_int_alu #(.W(W)) u_int (
    .a(rs1_val), .rd_old(rd_val), .imm13(d.imm13), .imm18(d.imm18), .op(d.int_op), .r(r_int));

  plx_shift_bitfield #(.W(W)) u_sb (
    .a(rs1_val), .b(rs2_val), .rd_old(rd_val), .imm13(d.imm13), .imm8(d.imm8),
    .imm7(d.imm7), .imm6(d.imm6), .op(d.sb_op), .r(r_sb));

  plx_packed_alu #(.W(W)) u_palu (
    .a(rs1_val), .b(rs2_val), .op(d.palu_op), .sw(d.sw), .sa(d.sa), .r(r_palu));

  plx_packed_mul #(.W(W)) u_pmul (
    .a(rs1_val), .b(rs2_val), .shr(d.pmul_shr), .odd_arith(d.pmul_odd_or_arith),
    .sa(d.sa), .r(r_pmul));

  assign pshift_amt = d.pshift_imm ? W'(d.imm5) : rs2_val;
  plx_packed_shift #(.W(W)) u_psh (
    .a(rs1_val), .amt(pshift_amt), .op(d.pshift_op), .sw(d.sw), .r(r_pshift));

  plx_permute #(.W(W)) u_perm (
    .a(rs1_val), .b(rs2_val), .op(d.perm_op), .sw(d.sw), .r(r_perm));

  plx_compare #(.W(W)) u_cmp (
    .a(d.cmp_op == CP_TESTBIT ? rd_val : rs1_val), .b(rs2_val), .imm8(d.imm8),
    .rel(d.rel), .op(d.cmp_op), .p1(cmp_p1));

  plx_branch #(.W(W)) u_br (
    .op(d.br_op), .pc, .imm23(d.imm23), .rd_val,
    .taken(br_taken), .target(br_target), .link_we(br_link_we), .link(br_link),
    .halt(br_halt));

  plx_lsu #(.W(W)) u_lsu (
    .base(rs1_val), .imm13(d.imm13), .sw(d.sw), .st_data(rd_val), .mem_rdata(dmem_rdata),
    .addr(ls_addr), .mem_be(dmem_be), .mem_wdata(dmem_wdata), .ld_data(r_load),
    .misaligned(ls_mis));

  assign dmem_addr  = ls_addr[DAW+$clog2(NB)-1:$clog2(NB)];
  assign dmem_we    = exec && d.is_store;
  assign misaligned = exec && (d.is_load || d.is_store) && ls_mis;
  assign retire     = exec;

  always_comb begin
    unique case (d.unit)
      U_INT:    result = r_int;
      U_SB:     result = r_sb;
      U_PALU:   result = r_palu;
      U_PMUL:   result = r_pmul;
      U_PSHIFT: result = r_pshift;
      U_PERM:   result = r_perm;
      U_LOAD:   result = r_load;
      default:  result = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc     <= '0;
      halted <= 1'b0;
    end else if (!halted) begin
      if (exec && br_halt)       halted <= 1'b1;
      else if (exec && br_taken) pc <= br_target;
      else                       pc <= pc + W'(4);
    end
  end

  // Each write port carries one value: a link write and a result write never
  // come from the same instruction.
  assert property (@(posedge clk) disable iff (!rst_n) exec |-> !(d.rd_we && br_link_we));
endmodule
