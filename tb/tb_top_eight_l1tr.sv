// tb_top_eight_l1tr -- the largest Level 1 crate: eight L1TR boards on the
// backplane (one GCAL board, to keep the run short).
// Board k is programmed to fire on calorimeter bit k.  Events on bits 0..7
// are injected in turn, 12 ticks apart, many times over.  Each must give an
// L1Pass from exactly board k, the wired OR at the DFC 4 ticks after the
// backplane, an L1Accept one tick later and the L1Accept at both TIM ports;
// at the end each board's scaler must hold its own event count.
module tb_top_eight_l1tr;
  import cleo3_pkg::*;
  localparam int NL = 8, NG = 1, NT = 48, NTIM = 2, NSEG = 16, REPS = 40;

  logic clk = 0, rst_n = 0, clr = 0, max_clr = 0;
  logic clk_xtal = 0, clk_ttl = 0, tim_clk_inv = 0, tim_clk;
  logic [1:0] tim_clk_sel = 0;
  logic [CCGL_W-1:0] ccgl_in = '0;
  logic [AXPR_W-1:0] axpr_in = '0;
  logic [TRCR_W-1:0] trcr_in = '0;
  logic [5:0] axpr_depth = '0, trcr_depth = '0;
  logic [EXT_W-1:0] ext_in = '0;
  logic [PHASE_W-1:0] acc_phase = '0;
  logic clus_valid = 0, lumi_snap = 0;
  logic [NSEG-1:0] clus_east = '0, clus_west = '0;
  logic [31:0] lumi_east, lumi_west, lumi_b2b, lumi_snap_east, lumi_snap_west, lumi_snap_b2b;
  logic [BP_W-1:0]    term_mask  [NL][NT];
  logic [BP_W-1:0]    term_pol   [NL][NT];
  logic [NT-1:0]      line_terms [NL][N_LINES];
  logic [SEL_W-1:0]   route_sel  [NL][N_OUT];
  logic [N_OUT-1:0]   route_en   [NL];
  logic [PS_W-1:0]    ps_nm1     [NL][N_OUT];
  logic [NL-1:0]      veto_en = '0;
  logic [2**PHASE_W-1:0] phase_veto [NL];
  logic [N_OUT-1:0]   l1tr_trig [NL], l1tr_prescaled [NL];
  logic [SC_W-1:0]    l1tr_scaler [NL][N_OUT];
  logic [15:0]        l1tr_bunch_map [NL][2**PHASE_W];
  logic [NL-1:0]      l1tr_l1pass;
  logic [BP_W-1:0]    backplane;
  logic [SBUSY_W-1:0] self_busy_len = 16'd1;
  logic rp_we, err_ack = 0, cal_req = 0;
  logic [EVT_AW-1:0] rp_wdata;
  logic l1pass, l1accept, synch, irq_accept, irq_error, dfc_busy;
  logic [31:0] cesr_time, total_l1, event_num;
  logic [EVT_AW-1:0] read_ptr;
  logic [31:0] evt_time [8];
  mon_t dfc_busy_mon, dfc_error_mon;
  logic [DLY_W-1:0] acc_dly_m1 [NG][2], cal_dly_m1 [NG][2];
  logic [WID_W-1:0] acc_wid_m1 [NG][2], cal_wid_m1 [NG][2];
  logic [NTIM-1:0] tim_l1accept, tim_synch, tim_cal, tim_busy = '0, tim_error = '0;
  mon_t tim_busy_mon [NG][2], tim_error_mon [NG][2];
  int checks = 0, failures = 0;

  cleo3_trigger_top #(.N_L1TR(NL), .N_GCAL(NG)) dut (.*);

  always #21 clk = ~clk;

  initial begin
    #(64'd42 * (NL * REPS * 12 + 1000));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t %s", $time, what);
    end
  endfunction

  initial begin
    for (int b = 0; b < NL; b++) begin
      for (int t = 0; t < NT; t++) begin term_mask[b][t] = '0; term_pol[b][t] = '0; end
      for (int l = 0; l < N_LINES; l++) line_terms[b][l] = '0;
      for (int o = 0; o < N_OUT; o++) begin route_sel[b][o] = '0; ps_nm1[b][o] = '0; end
      route_en[b] = '0;
      phase_veto[b] = '0;
      term_mask[b][0][b] = 1;
      line_terms[b][0] = NT'(1);
      route_en[b][b] = 1;            // output b carries line 0
    end
    for (int c = 0; c < 2; c++) begin
      acc_dly_m1[0][c] = DLY_W'(c); acc_wid_m1[0][c] = '0;
      cal_dly_m1[0][c] = '0;        cal_wid_m1[0][c] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < NL * REPS; e++) begin
      int k;
      k = e % NL;
      @(negedge clk);
      ccgl_in = '0; ccgl_in[k] = 1;
      rp_we = 1; rp_wdata = read_ptr + 1'b1;
      @(negedge clk);
      ccgl_in = '0; rp_we = 0;
      repeat (2) @(negedge clk);
      // board L1Pass 3 ticks after the backplane
      chk(l1tr_l1pass === NL'(1) << k, $sformatf("event %0d board L1Pass %b", e, l1tr_l1pass));
      @(negedge clk);
      chk(l1pass === 1'b1, "L1Pass at DFC");
      @(negedge clk);
      chk(l1accept === 1'b1, "L1Accept");
      repeat (3) @(negedge clk);
      chk(tim_l1accept === 2'b01, "TIM port 0 (delay 1)");
      @(negedge clk);
      chk(tim_l1accept === 2'b10, "TIM port 1 (delay 2)");
      repeat (2) @(negedge clk);
    end
    for (int b = 0; b < NL; b++)
      chk(l1tr_scaler[b][b] == SC_W'(REPS), $sformatf("board %0d scaler %0d", b, l1tr_scaler[b][b]));
    chk(total_l1 == 32'(NL * REPS) && event_num == 32'(NL * REPS), "TOTAL_L1 / EVENT_NUM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
