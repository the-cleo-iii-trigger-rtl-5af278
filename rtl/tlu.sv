// tlu -- Trigger Logic Unit of an L1TR board.
//
// Forms 48 independent trigger lines from the 179 backplane bits and routes
// any 24 of them on.  As on the board, the lines are made by two layers of
// programmable logic.  Here layer 1 is a pool of N_TERMS product terms: term
// t is the AND of the backplane bits selected by term_mask[t], each taken
// true or complemented according to term_pol[t] (a term with an empty mask
// is always true, so it should be disabled through line_terms).  Layer 2
// makes trigger line l as the OR of the product terms selected by
// line_terms[l]; a line with no terms selected never fires.  The routing
// stage picks, for each of the 24 outputs, one of the 48 lines by a 6-bit
// register (route_sel) and an enable (route_en); no reprogramming is needed
// to change it.
//
// Timing: the backplane is registered, and a rising edge of a line's
// condition produces a pulse of exactly one clock tick on every output
// routed from it, two ticks after the data is on the backplane.  Pulses of
// lines satisfied by the same event are coincident.  The sum-of-products
// form of the two layers and the rising-edge detector are this design's
// choices; the line counts, routing and one-tick pulses follow the
// description.
module tlu
  import cleo3_pkg::*;
#(
  parameter int unsigned N_TERMS = 48
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [BP_W-1:0]        bp,                        // P5P6 backplane
  input  logic [BP_W-1:0]        term_mask  [N_TERMS],      // layer 1: bits used
  input  logic [BP_W-1:0]        term_pol   [N_TERMS],      // layer 1: 1 = bit complemented
  input  logic [N_TERMS-1:0]     line_terms [N_LINES],      // layer 2: terms ORed per line
  input  logic [SEL_W-1:0]       route_sel  [N_OUT],        // 48 -> 24 routing
  input  logic [N_OUT-1:0]       route_en,
  output logic [N_LINES-1:0]     lines,                     // raw line pulses (for test)
  output logic [N_OUT-1:0]       trig                       // one-tick trigger pulses
);

  logic [BP_W-1:0]    bp_q;
  logic [N_TERMS-1:0] term;
  logic [N_LINES-1:0] cond, cond_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bp_q <= '0;
    else        bp_q <= bp;

  // Layer 1: product terms.
  always_comb
    for (int t = 0; t < N_TERMS; t++)
      term[t] = &((bp_q ^ term_pol[t]) | ~term_mask[t]);

  // Layer 2: sum of selected terms.
  always_comb
    for (int l = 0; l < N_LINES; l++)
      cond[l] = |(term & line_terms[l]);

  // One-tick pulse on the rising edge of each line's condition.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cond_q <= '0;
      lines  <= '0;
    end else begin
      cond_q <= cond;
      lines  <= cond & ~cond_q;
    end

  // 48 -> 24 routing.
  always_comb
    for (int o = 0; o < N_OUT; o++)
      trig[o] = route_en[o] && (int'(route_sel[o]) < N_LINES) && lines[route_sel[o]];

endmodule
