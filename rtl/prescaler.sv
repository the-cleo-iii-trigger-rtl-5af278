// prescaler -- bank of trigger-line prescalers of an L1TR board.
//
// Each of the N_OUT trigger lines passes every Nth pulse, N being set per
// line to any integer from 1 to 2**24.  The setting is held as N-1 in a
// 24-bit register (ps_nm1 = 0 passes every pulse).  A per-line counter counts
// input pulses; the pulse that brings it to N-1 is passed and clears it, so
// after reset or `clr` the first pulse passed is the Nth.  The N-1 encoding,
// the clear input and the counting order are this design's own choices; the
// range and the every-Nth behaviour follow the description.
//
// Timing: combinational from pulse_i to pulse_o (no added latency), the
// counter updates on the same clock edge.
module prescaler
  import cleo3_pkg::*;
#(
  parameter int unsigned LINES = N_OUT,
  parameter int unsigned W     = PS_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,                // restart all counters
  input  logic [W-1:0]     ps_nm1 [LINES],     // prescale factor minus one
  input  logic [LINES-1:0] pulse_i,
  output logic [LINES-1:0] pulse_o
);

  logic [W-1:0] cnt [LINES];

  always_comb
    for (int i = 0; i < LINES; i++)
      pulse_o[i] = pulse_i[i] && (cnt[i] == ps_nm1[i]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < LINES; i++)
        if (clr || pulse_o[i]) cnt[i] <= '0;
        else if (pulse_i[i])   cnt[i] <= cnt[i] + 1'b1;
    end

endmodule
