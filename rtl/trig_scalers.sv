// trig_scalers -- 24 scalers counting how often each prescaled trigger line
// fired.
//
// One 40-bit counter per line increments on every clock tick its line is
// high (the lines carry one-tick pulses, so this counts pulses).  `clr`
// zeroes all counters.  Counters wrap at 2**40; at the maximum trigger rate
// of one pulse per 42 ns tick that takes over 12 hours.  Width and count
// come from the description; the clear input and wrap-around are this
// design's own choices.  Counts are readable at any time on `count`.
module trig_scalers
  import cleo3_pkg::*;
#(
  parameter int unsigned LINES = N_OUT,
  parameter int unsigned W     = SC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [LINES-1:0] pulse,
  output logic [W-1:0]     count [LINES]
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) count[i] <= '0;
    end else begin
      for (int i = 0; i < LINES; i++)
        if (clr)           count[i] <= '0;
        else if (pulse[i]) count[i] <= count[i] + 1'b1;
    end

endmodule
