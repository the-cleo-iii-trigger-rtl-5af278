// gcal -- GCAL gating/calibration board: two TIM ports.
//
// The board serves two TIM modules (two data acquisition subracks) with two
// identical, fully independent channels (gcal_channel).  L1Accept, Synch and
// CAL from the DFC go to both channels; the Busy and Error replies of the
// two TIMs are ORed and returned to the DFC.  Two channels per board and the
// symmetric halves follow the description; the OR toward the DFC stands in
// for the shared backplane line.
//
// Timing: see gcal_channel; busy_out/error_out follow the TIM inputs after
// one register stage.
module gcal
  import cleo3_pkg::*;
#(
  parameter int unsigned DW = DLY_W,
  parameter int unsigned WW = WID_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          max_clr,
  input  logic          l1accept_in,
  input  logic          synch_in,
  input  logic          cal_in,
  input  logic [DW-1:0] acc_dly_m1 [2],
  input  logic [WW-1:0] acc_wid_m1 [2],
  input  logic [DW-1:0] cal_dly_m1 [2],
  input  logic [WW-1:0] cal_wid_m1 [2],
  output logic [1:0]    tim_l1accept,
  output logic [1:0]    tim_synch,
  output logic [1:0]    tim_cal,
  input  logic [1:0]    tim_busy,
  input  logic [1:0]    tim_error,
  output logic          busy_out,
  output logic          error_out,
  output mon_t          busy_mon  [2],
  output mon_t          error_mon [2]
);

  logic [1:0] ch_busy, ch_error;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    gcal_channel #(.DW(DW), .WW(WW)) u_ch (
      .clk, .rst_n, .clr, .max_clr,
      .l1accept_in, .synch_in, .cal_in,
      .acc_dly_m1(acc_dly_m1[c]), .acc_wid_m1(acc_wid_m1[c]),
      .cal_dly_m1(cal_dly_m1[c]), .cal_wid_m1(cal_wid_m1[c]),
      .tim_l1accept(tim_l1accept[c]), .tim_synch(tim_synch[c]), .tim_cal(tim_cal[c]),
      .tim_busy(tim_busy[c]), .tim_error(tim_error[c]),
      .busy_out(ch_busy[c]), .error_out(ch_error[c]),
      .busy_mon(busy_mon[c]), .error_mon(error_mon[c])
    );
  end

  assign busy_out  = |ch_busy;
  assign error_out = |ch_error;

endmodule
