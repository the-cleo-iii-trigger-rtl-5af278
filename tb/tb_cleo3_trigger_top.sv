// tb_cleo3_trigger_top -- end-to-end test of the whole trigger chain at the
// default sizes (2 L1TR boards, 18 GCAL boards = 36 TIM ports).
//
// Stimulus: every 9 ticks an "event" is injected on the trigger primitives:
//   A  calorimetry bit CCGL[3] at tick T together with axial bit AXPR[0] sent
//      5 ticks earlier (AXPR pipeline depth 5) -> L1TR0 line 0, no prescale;
//   A' the calorimetry bit alone, or the axial bit alone: must not trigger,
//      which shows the time alignment is what makes the coincidence;
//   B  tracking-correlator bit TRCR[2] sent 4 ticks early (depth 4) ->
//      L1TR1 line 5, prescaled by 2;
//   C  external input 0 through the LUMI synchroniser -> L1TR1 line 6.
// L1TR1 vetoes accelerator phase 15 in its OR/Bunch block.  The reference
// predicts the tick of every L1Pass (4 ticks after the backplane), and the
// DFC's L1Accepts are followed through the GCALs: every TIM port has its
// own delay (port i: i+1 ticks, the last port the maximum 32768 ticks with
// the maximum 256-tick width) and each port's L1Accept, Synch and CAL are
// checked on every tick.  TIM Busy, a TIM Error, a stalled READ_PTR and the
// DFC self-Busy each block some L1Passes.  Counted and required at least
// once: aligned coincidences, prescaler drops, phase vetoes, rejections by
// Busy, Error, self-Busy and full event-time buffer, Synch, the maximum
// GCAL delay, CAL, and Bhabha back-to-back counts.  A Synch-checking TIM
// model on every port must see no error, and one fed a stream with a lost
// L1Accept must flag it.
module tb_cleo3_trigger_top;
  import cleo3_pkg::*;
  localparam int NL = 2, NG = 18, NT = 48, NTIM = 2 * NG, NSEG = 16;
  localparam int EV_END = 9000, NCYC = EV_END + 32768 + 600;
  localparam int SBL = 9;

  logic clk = 0, rst_n = 0, clr = 0, max_clr = 0;
  logic clk_xtal = 0, clk_ttl = 0;
  logic [1:0] tim_clk_sel = 0;
  logic tim_clk_inv = 0, tim_clk;
  logic [CCGL_W-1:0] ccgl_in;
  logic [AXPR_W-1:0] axpr_in;
  logic [TRCR_W-1:0] trcr_in;
  logic [5:0] axpr_depth, trcr_depth;
  logic [EXT_W-1:0] ext_in;
  logic [PHASE_W-1:0] acc_phase;
  logic clus_valid, lumi_snap;
  logic [NSEG-1:0] clus_east, clus_west;
  logic [31:0] lumi_east, lumi_west, lumi_b2b, lumi_snap_east, lumi_snap_west, lumi_snap_b2b;
  logic [BP_W-1:0]    term_mask  [NL][NT];
  logic [BP_W-1:0]    term_pol   [NL][NT];
  logic [NT-1:0]      line_terms [NL][N_LINES];
  logic [SEL_W-1:0]   route_sel  [NL][N_OUT];
  logic [N_OUT-1:0]   route_en   [NL];
  logic [PS_W-1:0]    ps_nm1     [NL][N_OUT];
  logic [NL-1:0]      veto_en;
  logic [2**PHASE_W-1:0] phase_veto [NL];
  logic [N_OUT-1:0]   l1tr_trig [NL], l1tr_prescaled [NL];
  logic [SC_W-1:0]    l1tr_scaler [NL][N_OUT];
  logic [15:0]        l1tr_bunch_map [NL][2**PHASE_W];
  logic [NL-1:0]      l1tr_l1pass;
  logic [BP_W-1:0]    backplane;
  logic [SBUSY_W-1:0] self_busy_len;
  logic rp_we, err_ack, cal_req;
  logic [EVT_AW-1:0] rp_wdata;
  logic l1pass, l1accept, synch, irq_accept, irq_error, dfc_busy;
  logic [31:0] cesr_time, total_l1, event_num;
  logic [EVT_AW-1:0] read_ptr;
  logic [31:0] evt_time [8];
  mon_t dfc_busy_mon, dfc_error_mon;
  logic [DLY_W-1:0] acc_dly_m1 [NG][2], cal_dly_m1 [NG][2];
  logic [WID_W-1:0] acc_wid_m1 [NG][2], cal_wid_m1 [NG][2];
  logic [NTIM-1:0] tim_l1accept, tim_synch, tim_cal, tim_busy, tim_error;
  mon_t tim_busy_mon [NG][2], tim_error_mon [NG][2];

  cleo3_trigger_top dut (.*);

  // Synch check of every TIM, plus one fed a stream with one L1Accept
  // removed, which must detect the loss.
  logic [NTIM-1:0] synch_err;
  int              tim_acc [NTIM];
  logic            lost_err, drop_one = 0;
  int              lost_acc;
  for (genvar i = 0; i < NTIM; i++) begin : g_tim
    tim_model u_tim (.clk, .rst_n, .l1accept(tim_l1accept[i]), .synch(tim_synch[i]),
                     .synch_error(synch_err[i]), .n_accept(tim_acc[i]));
  end
  tim_model u_tim_lost (.clk, .rst_n, .l1accept(tim_l1accept[0] && !drop_one), .synch(tim_synch[0]),
                        .synch_error(lost_err), .n_accept(lost_acc));

  always #21 clk = ~clk;
  always #17 clk_xtal = ~clk_xtal;

  // histories indexed by tick
  bit exp_pass [NCYC + 16];
  bit h_acc [NCYC + 16], h_syn [NCYC + 16], h_cal [NCYC + 16];
  int dly [NTIM], wid [NTIM];
  localparam int CDLY = 3, CWID = 2;

  int checks = 0, failures = 0;
  int n_align = 0, n_noalign = 0, n_psdrop = 0, n_veto = 0;
  int n_rej_busy = 0, n_rej_err = 0, n_rej_self = 0, n_rej_full = 0;
  int n_synch = 0, n_maxdly = 0, n_cal = 0, n_acc = 0, n_pass = 0;
  int nA = 0, nB = 0, nBpass = 0, r_e = 0, r_w = 0, r_b = 0;

  initial begin
    #(64'd42 * (NCYC + 2000));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("%0t %s", $time, what);
    end
  endfunction

  function automatic bit win(ref bit h [NCYC + 16], input int n, input int d, input int w);
    for (int j = 0; j < w; j++)
      if (n - d - 2 - j >= 0 && h[n - d - 2 - j]) return 1;
    return 0;
  endfunction

  initial begin
    int ev_type [int];
    int rp_stall, et;
    logic prev_pass;
    // ---------------- programming ----------------
    for (int b = 0; b < NL; b++) begin
      for (int t = 0; t < NT; t++) begin term_mask[b][t] = '0; term_pol[b][t] = '0; end
      for (int l = 0; l < N_LINES; l++) line_terms[b][l] = '0;
      for (int o = 0; o < N_OUT; o++) begin route_sel[b][o] = '0; ps_nm1[b][o] = '0; end
      route_en[b] = '0;
      phase_veto[b] = '0;
    end
    // L1TR0: line 0 = CCGL[3] & AXPR[0]  -> output 0
    term_mask[0][0][3] = 1; term_mask[0][0][CCGL_W + 0] = 1;
    line_terms[0][0] = NT'(1);
    route_sel[0][0] = 6'd0; route_en[0][0] = 1;
    // L1TR1: line 5 = TRCR[2] -> output 3, prescale 2; line 6 = EXT[0] -> output 4
    term_mask[1][10][CCGL_W + AXPR_W + 2] = 1;
    term_mask[1][11][CCGL_W + AXPR_W + TRCR_W + 0] = 1;
    line_terms[1][5] = NT'(1) << 10;
    line_terms[1][6] = NT'(1) << 11;
    route_sel[1][3] = 6'd5; route_en[1][3] = 1; ps_nm1[1][3] = 24'd1;
    route_sel[1][4] = 6'd6; route_en[1][4] = 1;
    veto_en = 2'b10; phase_veto[1] = 16'h8000;
    axpr_depth = 6'd5; trcr_depth = 6'd4;
    self_busy_len = 16'(SBL);
    for (int i = 0; i < NTIM; i++) begin
      dly[i] = (i == NTIM - 1) ? 32768 : i + 1;
      wid[i] = (i == NTIM - 1) ? 256 : 2;
      acc_dly_m1[i / 2][i % 2] = DLY_W'(dly[i] - 1);
      acc_wid_m1[i / 2][i % 2] = WID_W'(wid[i] - 1);
      cal_dly_m1[i / 2][i % 2] = DLY_W'(CDLY - 1);
      cal_wid_m1[i / 2][i % 2] = WID_W'(CWID - 1);
    end
    ccgl_in = '0; axpr_in = '0; trcr_in = '0; ext_in = '0; acc_phase = '0;
    clus_valid = 0; clus_east = '0; clus_west = '0; lumi_snap = 0;
    tim_busy = '0; tim_error = '0; rp_we = 0; rp_wdata = '0; err_ack = 0; cal_req = 0;
    // choose the event types
    for (int T = 40; T < EV_END; T += 9) ev_type[T] = $urandom_range(0, 3);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    prev_pass = 0;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      // ---- trigger primitives for tick n ----
      ccgl_in = '0; axpr_in = '0; trcr_in = '0; ext_in = '0;
      acc_phase = PHASE_W'(n);
      if (ev_type.exists(n)     && ev_type[n] <= 1)     ccgl_in[3] = 1;        // A or A'
      if (ev_type.exists(n + 5) && ev_type[n + 5] == 0) axpr_in[0] = 1;        // A: 5 ticks early
      if (ev_type.exists(n + 1) && ev_type[n + 1] == 1) axpr_in[0] = 1;        // A': misaligned
      if (ev_type.exists(n + 4) && ev_type[n + 4] == 2) trcr_in[2] = 1;        // B
      if (ev_type.exists(n + 2) && ev_type[n + 2] == 3) ext_in[0] = 1;         // C
      if (ev_type.exists(n)) begin
        et = ev_type[n];
        case (et)
          0: begin exp_pass[n + 4] = 1; nA++; n_align++; end
          1: n_noalign++;
          2: begin
               nB++;
               if (nB % 2 == 0) begin
                 // phase seen by OR/Bunch is acc_phase of tick n: two
                 // registers (DFC, LUMI) against two ticks into the board
                 if ((n % 16) == 15) n_veto++;
                 else begin exp_pass[n + 4] = 1; nBpass++; end
               end else n_psdrop++;
             end
          3: if ((n % 16) == 15) n_veto++; else exp_pass[n + 4] = 1;
        endcase
      end
      // ---- TIM replies, processor, CAL, luminosity ----
      tim_busy = '0; tim_error = '0;
      if ((n >= 1000 && n < 1100) || (n >= 2000 && n < 2050)) tim_busy[5] = 1;
      if (n >= 3000 && n < 3030) tim_error[7] = 1;
      err_ack = (n == 3040);
      rp_stall = (n >= 4000 && n < 4300);
      rp_we = 0;
      if (!rp_stall && read_ptr != event_num[2:0] && n % 3 == 0) begin
        rp_we = 1; rp_wdata = read_ptr + 1'b1;
      end
      cal_req = (n % 500 == 7) && n < EV_END;
      h_cal[n] = cal_req;
      clus_valid = (n % 50 == 9);
      clus_east = '0; clus_west = '0;
      if (clus_valid) begin
        clus_east = NSEG'(1) << (n % 16);
        clus_west = ((n / 50) % 2 == 0) ? NSEG'(1) << ((n + 8) % 16) : NSEG'(1) << ((n + 3) % 16);
        r_e++; r_w++;
        if ((n / 50) % 2 == 0) r_b++;
      end
      #1;
      // ---- checks for tick n ----
      chk(l1pass === exp_pass[n], $sformatf("n=%0d l1pass %b exp %b", n, l1pass, exp_pass[n]));
      if (l1pass) n_pass++;
      if (n >= 2) begin
        for (int i = 0; i < NTIM; i++) begin
          logic ea, es, ec;
          ea = win(h_acc, n, dly[i], wid[i]);
          es = win(h_syn, n, dly[i], wid[i]);
          ec = win(h_cal, n - 1, CDLY, CWID);
          chk(tim_l1accept[i] === ea && tim_synch[i] === es && tim_cal[i] === ec,
              $sformatf("n=%0d TIM %0d acc %b/%b synch %b/%b cal %b/%b", n, i,
                        tim_l1accept[i], ea, tim_synch[i], es, tim_cal[i], ec));
        end
      end
      if (tim_l1accept[NTIM - 1]) n_maxdly++;
      drop_one = (n >= 500 && n < 520);
      if (tim_cal[0]) n_cal++;
      // rejection causes of an L1Pass now on the DFC input
      if (l1pass) begin
        if (dut.u_dfc.busy_in)        n_rej_busy++;
        else if (dut.u_dfc.error_in)  n_rej_err++;
        else if (dut.u_dfc.buf_full)  n_rej_full++;
        else if (dut.u_dfc.self_busy) n_rej_self++;
      end
      prev_pass = l1pass;
      @(posedge clk); #1;
      h_acc[n + 1] = l1accept; h_syn[n + 1] = synch;
      if (l1accept) n_acc++;
      if (synch) n_synch++;
      chk(!l1accept || prev_pass, "L1Accept without L1Pass");
    end
    // ---------------- final bookkeeping ----------------
    chk(total_l1 == 32'(n_pass), $sformatf("TOTAL_L1 %0d exp %0d", total_l1, n_pass));
    chk(event_num == 32'(n_acc), $sformatf("EVENT_NUM %0d exp %0d", event_num, n_acc));
    chk(n_synch == (n_acc + 255) / 256, $sformatf("synch %0d for %0d accepts", n_synch, n_acc));
    chk(l1tr_scaler[0][0] == SC_W'(nA), $sformatf("scaler A %0d exp %0d", l1tr_scaler[0][0], nA));
    chk(l1tr_scaler[1][3] == SC_W'(nB / 2), "scaler B (prescaled)");
    chk(lumi_east == 32'(r_e) && lumi_west == 32'(r_w) && lumi_b2b == 32'(r_b), "luminosity counts");
    chk(tim_busy_mon[2][1].total == 32'd150, $sformatf("TIM 5 busy total %0d", tim_busy_mon[2][1].total));
    chk(tim_error_mon[3][1].total == 32'd30, "TIM 7 error total");
    chk(irq_error == 1'b0 && dfc_error_mon.total == 32'd30, "error interrupt / DFC error total");
    $display("passes %0d accepts %0d | aligned %0d unaligned %0d psdrop %0d veto %0d",
             n_pass, n_acc, n_align, n_noalign, n_psdrop, n_veto);
    $display("rejected: busy %0d error %0d self %0d full %0d | synch %0d maxdly %0d cal %0d b2b %0d",
             n_rej_busy, n_rej_err, n_rej_self, n_rej_full, n_synch, n_maxdly, n_cal, r_b);
    chk(synch_err == '0, $sformatf("TIM Synch error %h", synch_err));
    chk(tim_acc[0] == n_acc, "TIM accept count");
    chk(lost_err, "lost L1Accept not detected by the Synch check");
    chk(n_align > 0,    "no aligned coincidence");
    chk(n_noalign > 0,  "no misaligned event");
    chk(n_psdrop > 0,   "no prescaler drop");
    chk(n_veto > 0,     "no phase veto");
    chk(n_rej_busy > 0, "no Busy rejection");
    chk(n_rej_err > 0,  "no Error rejection");
    chk(n_rej_self > 0, "no self-Busy rejection");
    chk(n_rej_full > 0, "no buffer-full rejection");
    chk(n_synch > 1,    "fewer than two Synch");
    chk(n_maxdly > 0,   "nothing through the maximum delay");
    chk(n_cal > 0,      "no CAL");
    chk(r_b > 0,        "no back-to-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
