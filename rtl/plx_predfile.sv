// plx_predfile: predicate register file of the PLX processor.
//
// NSETS sets of eight 1-bit predicates P0..P7; one set is active at a time.
// P0 of the active set always reads 1 and writes to P0 are dropped, so an
// instruction predicated on P0 always executes. Reads (qualifying predicate
// qp) are asynchronous. Writes happen on the clock edge:
//  * cmp / cmpi / testbit write P1 and P2 of the active set (P2 after P1, so
//    P2 wins if both name the same predicate, this design's choice);
//  * changepr makes set imm4 active; changepr.ld also loads imm8 into it.
// Reset makes set 0 active and clears every predicate (reset values are this
// design's choice). The active set and its byte are brought out for
// observation.
module plx_predfile #(
  parameter int NSETS = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [2:0]               qp,
  output logic                     qp_val,
  input  logic                     pwe,       // write P1/P2
  input  logic [2:0]               p1,
  input  logic [2:0]               p2,
  input  logic                     p1_val,    // P2 gets ~p1_val
  input  logic                     set_we,    // changepr
  input  logic                     set_ld,    // changepr.ld
  input  logic [$clog2(NSETS)-1:0] set_sel,
  input  logic [7:0]               set_val,
  output logic [$clog2(NSETS)-1:0] active,
  output logic [7:0]               active_bits
);
  logic [7:0] sets [NSETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0;
      for (int i = 0; i < NSETS; i++) sets[i] <= '0;
    end else begin
      if (pwe) begin
        if (p1 != 3'd0) sets[active][p1] <= p1_val;
        if (p2 != 3'd0) sets[active][p2] <= !p1_val;
      end
      if (set_we) begin
        active <= set_sel;
        if (set_ld) sets[set_sel] <= set_val;
      end
    end
  end

  assign active_bits = {sets[active][7:1], 1'b1};
  assign qp_val      = active_bits[qp];
endmodule
