// cleo3_trigger_top -- CLEO-III Level 1 trigger decision and flow
// control/gating, end to end.
//
// Level 1 decision crate: the axial processor (AXPR) and tracking
// correlator (TRCR) outputs are held back in variable-depth pipelines so
// they line up with the later calorimetry (CCGL) data; together with the
// external conditionals from the LUMI they form the 179-bit P5P6 backplane
// (CCGL bits 95:0, AXPR 111:96, TRCR 170:112, external 178:171 -- this split
// is this design's own choice).  N_L1TR identical L1TR boards evaluate their
// programmed trigger lines on it; their L1Pass outputs are wire-ORed on the
// LUMI and sent to the DFC.  The LUMI also counts Bhabha luminosity and
// passes the accelerator phase, which comes from the CESR timing system by
// way of the DFC, to the boards.
//
// Flow control/gating crate: the DFC gates L1Pass into L1Accept (Busy,
// Error, self-Busy, event-time buffer), and N_GCAL GCAL boards, two TIM
// ports each, delay and shape L1Accept, Synch and CAL for the TIMs and
// gather their Busy and Error, which are ORed back to the DFC.  A clock
// selector model picks the clock copy that is sent on to the TIMs.
//
// The boards feeding the crate (CCGL, AXPR, TRCR), the TIMs, the
// control processors and the VME register access are outside this RTL:
// their data, and every programming register, are ports of this module.
// All logic runs on one clock, `clk`, the 42 ns CESR tick.
module cleo3_trigger_top
  import cleo3_pkg::*;
#(
  parameter int unsigned N_L1TR    = 2,
  parameter int unsigned N_GCAL    = 18,
  parameter int unsigned N_TERMS   = 48,
  parameter int unsigned MAX_ALIGN = 32,
  parameter int unsigned N_SEG     = 16,
  localparam int unsigned N_TIM    = 2 * N_GCAL,
  localparam int unsigned AL_W     = $clog2(MAX_ALIGN + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               max_clr,
  // clocks for the distributed TIM clock
  input  logic               clk_xtal,
  input  logic               clk_ttl,
  input  logic [1:0]         tim_clk_sel,
  input  logic               tim_clk_inv,
  output logic               tim_clk,
  // trigger primitives
  input  logic [CCGL_W-1:0]  ccgl_in,
  input  logic [AXPR_W-1:0]  axpr_in,
  input  logic [TRCR_W-1:0]  trcr_in,
  input  logic [AL_W-1:0]    axpr_depth,
  input  logic [AL_W-1:0]    trcr_depth,
  input  logic [EXT_W-1:0]   ext_in,
  input  logic [PHASE_W-1:0] acc_phase,
  // luminosity
  input  logic               clus_valid,
  input  logic [N_SEG-1:0]   clus_east,
  input  logic [N_SEG-1:0]   clus_west,
  input  logic               lumi_snap,
  output logic [31:0]        lumi_east,
  output logic [31:0]        lumi_west,
  output logic [31:0]        lumi_b2b,
  output logic [31:0]        lumi_snap_east,
  output logic [31:0]        lumi_snap_west,
  output logic [31:0]        lumi_snap_b2b,
  // L1TR programming and results
  input  logic [BP_W-1:0]    term_mask  [N_L1TR][N_TERMS],
  input  logic [BP_W-1:0]    term_pol   [N_L1TR][N_TERMS],
  input  logic [N_TERMS-1:0] line_terms [N_L1TR][N_LINES],
  input  logic [SEL_W-1:0]   route_sel  [N_L1TR][N_OUT],
  input  logic [N_OUT-1:0]   route_en   [N_L1TR],
  input  logic [PS_W-1:0]    ps_nm1     [N_L1TR][N_OUT],
  input  logic [N_L1TR-1:0]  veto_en,
  input  logic [2**PHASE_W-1:0] phase_veto [N_L1TR],
  output logic [N_OUT-1:0]   l1tr_trig      [N_L1TR],
  output logic [N_OUT-1:0]   l1tr_prescaled [N_L1TR],
  output logic [SC_W-1:0]    l1tr_scaler    [N_L1TR][N_OUT],
  output logic [15:0]        l1tr_bunch_map [N_L1TR][2**PHASE_W],
  output logic [N_L1TR-1:0]  l1tr_l1pass,
  output logic [BP_W-1:0]    backplane,
  // DFC
  input  logic [SBUSY_W-1:0] self_busy_len,
  input  logic               rp_we,
  input  logic [EVT_AW-1:0]  rp_wdata,
  input  logic               err_ack,
  input  logic               cal_req,
  output logic               l1pass,
  output logic               l1accept,
  output logic               synch,
  output logic               irq_accept,
  output logic               irq_error,
  output logic               dfc_busy,
  output logic [CNT32_W-1:0] cesr_time,
  output logic [CNT32_W-1:0] total_l1,
  output logic [CNT32_W-1:0] event_num,
  output logic [EVT_AW-1:0]  read_ptr,
  output logic [CNT32_W-1:0] evt_time [2**EVT_AW],
  output mon_t               dfc_busy_mon,
  output mon_t               dfc_error_mon,
  // GCAL settings and TIM ports
  input  logic [DLY_W-1:0]   acc_dly_m1 [N_GCAL][2],
  input  logic [WID_W-1:0]   acc_wid_m1 [N_GCAL][2],
  input  logic [DLY_W-1:0]   cal_dly_m1 [N_GCAL][2],
  input  logic [WID_W-1:0]   cal_wid_m1 [N_GCAL][2],
  output logic [N_TIM-1:0]   tim_l1accept,
  output logic [N_TIM-1:0]   tim_synch,
  output logic [N_TIM-1:0]   tim_cal,
  input  logic [N_TIM-1:0]   tim_busy,
  input  logic [N_TIM-1:0]   tim_error,
  output mon_t               tim_busy_mon  [N_GCAL][2],
  output mon_t               tim_error_mon [N_GCAL][2]
);

  // ---------------- Level 1 decision crate ----------------
  logic [AXPR_W-1:0]  axpr_al;
  logic [TRCR_W-1:0]  trcr_al;
  logic [EXT_W-1:0]   ext_bp;
  logic [PHASE_W-1:0] phase_bp;
  logic               dfc_cal;
  logic [PHASE_W-1:0] dfc_phase;

  align_pipe #(.WIDTH(AXPR_W), .MAX_DEPTH(MAX_ALIGN)) u_axpr_pipe (
    .clk, .rst_n, .depth(axpr_depth), .data_i(axpr_in), .data_o(axpr_al)
  );

  align_pipe #(.WIDTH(TRCR_W), .MAX_DEPTH(MAX_ALIGN)) u_trcr_pipe (
    .clk, .rst_n, .depth(trcr_depth), .data_i(trcr_in), .data_o(trcr_al)
  );

  assign backplane = {ext_bp, trcr_al, axpr_al, ccgl_in};

  for (genvar b = 0; b < N_L1TR; b++) begin : g_l1tr
    l1tr #(.N_TERMS(N_TERMS)) u_l1tr (
      .clk, .rst_n, .bp(backplane), .phase(phase_bp),
      .term_mask(term_mask[b]), .term_pol(term_pol[b]), .line_terms(line_terms[b]),
      .route_sel(route_sel[b]), .route_en(route_en[b]), .ps_nm1(ps_nm1[b]),
      .veto_en(veto_en[b]), .phase_veto(phase_veto[b]), .clr,
      .trig(l1tr_trig[b]), .prescaled(l1tr_prescaled[b]), .scaler(l1tr_scaler[b]),
      .bunch_map(l1tr_bunch_map[b]), .l1pass(l1tr_l1pass[b])
    );
  end

  lumi #(.N_L1TR(N_L1TR), .N_SEG(N_SEG)) u_lumi (
    .clk, .rst_n,
    .l1pass_in(l1tr_l1pass), .l1pass_out(l1pass),
    .phase_in(dfc_phase), .phase_out(phase_bp),
    .ext_in, .ext_bp,
    .clus_valid, .clus_east, .clus_west, .snap(lumi_snap), .clr,
    .single_east(lumi_east), .single_west(lumi_west), .back_to_back(lumi_b2b),
    .snap_east(lumi_snap_east), .snap_west(lumi_snap_west), .snap_b2b(lumi_snap_b2b)
  );

  // ---------------- flow control / gating crate ----------------
  logic [N_GCAL-1:0] gcal_busy, gcal_error;

  dfc u_dfc (
    .clk, .rst_n, .clr, .l1pass,
    .busy_in(|gcal_busy), .error_in(|gcal_error),
    .self_busy_len, .rp_we, .rp_wdata, .max_clr, .err_ack, .cal_req,
    .cesr_phase(acc_phase), .phase_out(dfc_phase),
    .l1accept, .synch, .cal(dfc_cal), .irq_accept, .irq_error, .busy(dfc_busy),
    .cesr_time, .total_l1, .event_num, .read_ptr, .evt_time,
    .busy_mon(dfc_busy_mon), .error_mon(dfc_error_mon)
  );

  for (genvar g = 0; g < N_GCAL; g++) begin : g_gcal
    gcal u_gcal (
      .clk, .rst_n, .clr, .max_clr,
      .l1accept_in(l1accept), .synch_in(synch), .cal_in(dfc_cal),
      .acc_dly_m1(acc_dly_m1[g]), .acc_wid_m1(acc_wid_m1[g]),
      .cal_dly_m1(cal_dly_m1[g]), .cal_wid_m1(cal_wid_m1[g]),
      .tim_l1accept(tim_l1accept[2*g +: 2]), .tim_synch(tim_synch[2*g +: 2]),
      .tim_cal(tim_cal[2*g +: 2]),
      .tim_busy(tim_busy[2*g +: 2]), .tim_error(tim_error[2*g +: 2]),
      .busy_out(gcal_busy[g]), .error_out(gcal_error[g]),
      .busy_mon(tim_busy_mon[g]), .error_mon(tim_error_mon[g])
    );
  end

  clk_select u_clk_sel (
    .clk_cesr(clk), .clk_xtal, .clk_ttl, .clk_aux(clk_ttl),
    .sel(tim_clk_sel), .inv(tim_clk_inv), .clk_out(tim_clk)
  );

endmodule
