// busy_monitor -- gated tick counters for one Busy or Error signal.
//
// Used by the Data Flow Control for the combined Busy and Error and by each
// GCAL channel for its TIM's Busy and Error.  On every 42 ns tick that `sig`
// is high:
//  * TOTAL   (31 bits) counts up; when it wraps, a sticky overflow bit sets.
//  * CURRENT (15 bits) counts up likewise with its own sticky overflow;
//    it counts the assertion since the last L1Accept and is cleared by
//    `l1accept` (the clear wins over a count in the same tick).
//  * MAX     (15 bits) ORs in the bits of CURRENT, one tick later, so each
//    bit stays set once CURRENT has reached that power of two: a
//    logarithmic bar graph of the peak.  Only `max_clr` clears it.
// `clr` zeroes everything.  The widths and the behaviour of the three
// registers follow the description; the clear inputs, the wrap-and-flag
// overflow and the clear-wins rule are this design's own choices.
module busy_monitor
  import cleo3_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sig,
  input  logic l1accept,
  input  logic max_clr,
  input  logic clr,
  output mon_t mon
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mon <= '0;
    end else if (clr) begin
      mon <= '0;
    end else begin
      if (sig) begin
        {mon.total_ovf, mon.total} <= {mon.total_ovf, mon.total} + 1'b1
                                    | {mon.total_ovf, {TOT_W{1'b0}}};
      end
      if (l1accept) begin
        mon.current <= '0;
        mon.cur_ovf <= 1'b0;
      end else if (sig) begin
        {mon.cur_ovf, mon.current} <= {mon.cur_ovf, mon.current} + 1'b1
                                    | {mon.cur_ovf, {CUR_W{1'b0}}};
      end
      if (max_clr) mon.max_bar <= '0;
      else         mon.max_bar <= mon.max_bar | mon.current;
    end

endmodule
