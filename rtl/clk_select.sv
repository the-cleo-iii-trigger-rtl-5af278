// clk_select -- behavioural model of the DFC/GCAL clock selection circuit.
//
// Behavioural model, not synthesizable logic: a real clock selector is a
// glitch-aware multiplexer built from the board's clock buffers.  The DFC
// chooses among the CESR accelerator clock, its complement (shifted by half
// of the 42 ns period, 21 ns), an on-board crystal and a backup TTL clock
// input; the GCAL likewise chooses among the clock copies it receives, in
// true or complemented form.  This model selects one of four inputs by
// `sel` and optionally inverts it (`inv`), with a small output delay.  The
// four sources and the true/complement choice follow the description; the
// select encoding and the 1 ns delay are this model's own choices.
module clk_select (
  input  logic       clk_cesr,
  input  logic       clk_xtal,
  input  logic       clk_ttl,
  input  logic       clk_aux,
  input  logic [1:0] sel,         // 0 CESR, 1 crystal, 2 TTL backup, 3 auxiliary copy
  input  logic       inv,         // 1 = complemented (21 ns shifted) clock
  output logic       clk_out
);

  logic src;

  always_comb
    unique case (sel)
      2'd0: src = clk_cesr;
      2'd1: src = clk_xtal;
      2'd2: src = clk_ttl;
      default: src = clk_aux;
    endcase

  always @(src or inv) clk_out <= #1ns (src ^ inv);

endmodule
