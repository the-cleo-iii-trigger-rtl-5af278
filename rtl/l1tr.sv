// l1tr -- one L1TR Level 1 trigger board.
//
// Chain of the board: the Trigger Logic Unit turns the 179 backplane bits
// into 24 routed one-tick trigger pulses, each pulse goes through its own
// prescaler, the prescaled lines are counted by the 24 scalers and ORed by
// the OR/Bunch block into this board's L1Pass, which goes to the LUMI.  All
// boards are identical; they differ only in their programming (here the TLU
// product terms, line terms, routing, prescale factors and the OR/Bunch
// veto settings, all held as input ports written by the board's register
// interface).  The chain follows the description; the programming model is
// that of the sub-blocks.
//
// Timing: a backplane condition that becomes true before clock edge k
// gives a TLU pulse after edge k+1 and L1Pass high for one tick after edge
// k+2.
module l1tr
  import cleo3_pkg::*;
#(
  parameter int unsigned N_TERMS = 48
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [BP_W-1:0]    bp,
  input  logic [PHASE_W-1:0] phase,
  // programming
  input  logic [BP_W-1:0]    term_mask  [N_TERMS],
  input  logic [BP_W-1:0]    term_pol   [N_TERMS],
  input  logic [N_TERMS-1:0] line_terms [N_LINES],
  input  logic [SEL_W-1:0]   route_sel  [N_OUT],
  input  logic [N_OUT-1:0]   route_en,
  input  logic [PS_W-1:0]    ps_nm1     [N_OUT],
  input  logic               veto_en,
  input  logic [2**PHASE_W-1:0] phase_veto,
  input  logic               clr,                  // clear scalers, prescalers, map
  // results
  output logic [N_OUT-1:0]   trig,                 // TLU outputs
  output logic [N_OUT-1:0]   prescaled,
  output logic [SC_W-1:0]    scaler     [N_OUT],
  output logic [15:0]        bunch_map  [2**PHASE_W],
  output logic               l1pass
);

  logic [N_LINES-1:0] lines_unused;

  tlu #(.N_TERMS(N_TERMS)) u_tlu (
    .clk, .rst_n, .bp,
    .term_mask, .term_pol, .line_terms, .route_sel, .route_en,
    .lines(lines_unused), .trig
  );

  prescaler u_ps (
    .clk, .rst_n, .clr, .ps_nm1, .pulse_i(trig), .pulse_o(prescaled)
  );

  trig_scalers u_sc (
    .clk, .rst_n, .clr, .pulse(prescaled), .count(scaler)
  );

  or_bunch u_or (
    .clk, .rst_n, .lines(prescaled), .phase, .veto_en, .phase_veto,
    .map_clr(clr), .l1pass, .bunch_map
  );

endmodule
