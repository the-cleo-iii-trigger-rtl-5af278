// gcal_channel -- one TIM port of a GCAL gating/calibration board.
//
// Outgoing: L1Accept and CAL arrive from the DFC, are synchronised to the
// selected clock (input register), delayed by a programmable whole number of
// ticks (acc_dly_m1+1 = 1..32768 ticks, 42 ns..1.38 ms), stretched to a
// programmable width (acc_wid_m1+1 = 1..256 ticks, 42 ns..10.75 us) and
// resynchronised (output register) before going to the TIM.  CAL has its
// own delay and width settings and the same path.  Synch has no settings of
// its own on the GCAL; it rides the L1Accept delay line and width setting
// so it stays coincident with the L1Accept it belongs to.
//
// Incoming: the TIM's Busy and Error are registered and passed on to the
// DFC, and each has a busy_monitor (TOTAL, CURRENT since the last L1Accept,
// MAX bar graph) for per-TIM performance monitoring.
//
// The delay and width ranges and the bookkeeping follow the description;
// the value-minus-one encodings, the Synch handling and the register
// stages are this design's own choices.
//
// Timing: an L1Accept pulse at the input in the tick before edge k reaches
// tim_l1accept from edge k + acc_dly_m1 + 3, i.e. programmed delay plus two
// ticks of fixed latency.
module gcal_channel
  import cleo3_pkg::*;
#(
  parameter int unsigned DW = DLY_W,
  parameter int unsigned WW = WID_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          max_clr,
  // from DFC
  input  logic          l1accept_in,
  input  logic          synch_in,
  input  logic          cal_in,
  // settings
  input  logic [DW-1:0] acc_dly_m1,
  input  logic [WW-1:0] acc_wid_m1,
  input  logic [DW-1:0] cal_dly_m1,
  input  logic [WW-1:0] cal_wid_m1,
  // to / from the TIM
  output logic          tim_l1accept,
  output logic          tim_synch,
  output logic          tim_cal,
  input  logic          tim_busy,
  input  logic          tim_error,
  // to DFC
  output logic          busy_out,
  output logic          error_out,
  // bookkeeping
  output mon_t          busy_mon,
  output mon_t          error_mon
);

  logic       acc_q, synch_q, cal_q;
  logic [1:0] acc_d;
  logic       cal_d;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc_q     <= 1'b0;
      synch_q   <= 1'b0;
      cal_q     <= 1'b0;
      busy_out  <= 1'b0;
      error_out <= 1'b0;
    end else begin
      acc_q     <= l1accept_in;
      synch_q   <= synch_in;
      cal_q     <= cal_in;
      busy_out  <= tim_busy;
      error_out <= tim_error;
    end

  tick_delay #(.WIDTH(2), .AW(DW)) u_acc_dly (
    .clk, .rst_n, .dly_m1(acc_dly_m1), .data_i({synch_q, acc_q}), .data_o(acc_d)
  );

  tick_delay #(.WIDTH(1), .AW(DW)) u_cal_dly (
    .clk, .rst_n, .dly_m1(cal_dly_m1), .data_i(cal_q), .data_o(cal_d)
  );

  pulse_shaper #(.W(WW)) u_acc_w (
    .clk, .rst_n, .wid_m1(acc_wid_m1), .trig(acc_d[0]), .pulse_o(tim_l1accept)
  );

  pulse_shaper #(.W(WW)) u_synch_w (
    .clk, .rst_n, .wid_m1(acc_wid_m1), .trig(acc_d[1]), .pulse_o(tim_synch)
  );

  pulse_shaper #(.W(WW)) u_cal_w (
    .clk, .rst_n, .wid_m1(cal_wid_m1), .trig(cal_d), .pulse_o(tim_cal)
  );

  busy_monitor u_busy (
    .clk, .rst_n, .sig(busy_out), .l1accept(l1accept_in), .max_clr, .clr, .mon(busy_mon)
  );

  busy_monitor u_err (
    .clk, .rst_n, .sig(error_out), .l1accept(l1accept_in), .max_clr, .clr, .mon(error_mon)
  );

endmodule
