// pulse_shaper -- retriggerable pulse stretcher with registered output.
//
// Every tick that `trig` is high (re)starts an output pulse of wid_m1+1
// ticks (1..2**W).  The output is a flip-flop, so the pulse is
// resynchronised to the clock.  Structure and retrigger rule are this
// design's own choices.
//
// Timing: trig high in the tick before edge k gives pulse_o high from edge
// k for wid_m1+1 ticks.
module pulse_shaper #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] wid_m1,
  input  logic         trig,
  output logic         pulse_o
);

  logic [W-1:0] cnt;      // ticks left after the current one

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt     <= '0;
      pulse_o <= 1'b0;
    end else if (trig) begin
      cnt     <= wid_m1;
      pulse_o <= 1'b1;
    end else if (cnt != '0) begin
      cnt     <= cnt - 1'b1;
      pulse_o <= 1'b1;
    end else begin
      pulse_o <= 1'b0;
    end

endmodule
