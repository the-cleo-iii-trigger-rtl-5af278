// tb_dfc -- self-checking test of the Data Flow Control.
// Random L1Pass, Busy and Error are applied with a 3-tick self-Busy
// setting (4 busy ticks); a processor model advances READ_PTR after each
// L1Accept, but stalls for long stretches so the 8-entry event time buffer
// fills.  An independent reference model of the gating rules predicts every
// L1Accept, Synch (every 256th accept), the counters and the stored event
// times.  Each blocking cause (Busy, Error, self-Busy, full buffer) must
// have rejected at least one L1Pass; the Error interrupt and its
// acknowledge are checked, and the minimum spacing of two L1Accepts is
// measured against the self-Busy setting.
module tb_dfc;
  import cleo3_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clr, l1pass, busy_in, error_in, rp_we, max_clr, err_ack, cal_req;
  logic [SBUSY_W-1:0] self_busy_len;
  logic [EVT_AW-1:0]  rp_wdata;
  logic [PHASE_W-1:0] cesr_phase, phase_out, ph_q = '0;
  logic l1accept, synch, cal, irq_accept, irq_error, busy;
  logic [CNT32_W-1:0] cesr_time, total_l1, event_num;
  logic [EVT_AW-1:0]  read_ptr;
  logic [CNT32_W-1:0] evt_time [2**EVT_AW];
  mon_t busy_mon, error_mon;

  int checks = 0, failures = 0;
  int r_sb = 0, r_evn = 0, r_rp = 0, r_cesr = 0, r_tl1 = 0;
  int r_evt [8];
  logic r_acc = 0, r_synch = 0, r_irq = 0;
  int n_busy = 0, n_err = 0, n_self = 0, n_full = 0, n_synch = 0;
  int last_acc = -100, min_gap = 1000;

  dfc dut (.*);

  always #21 clk = ~clk;

  initial begin
    #2000000;
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
    logic acc, sbusy, full, r_busy;
    cesr_phase = '0; clr = 0; l1pass = 0; busy_in = 0; error_in = 0; rp_we = 0; rp_wdata = 0;
    max_clr = 0; err_ack = 0; cal_req = 0; self_busy_len = 16'd3;
    foreach (r_evt[i]) r_evt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (t == 0) r_cesr = int'(cesr_time);
      l1pass   = ($urandom_range(0, 1) == 0);
      busy_in  = ($urandom_range(0, 9) == 0);
      error_in = (t % 1000 > 990);
      err_ack  = (t % 1000 == 995);
      cal_req  = (t % 97 == 0);
      cesr_phase = PHASE_W'(t);
      // processor: advance READ_PTR unless stalled
      rp_we = 0;
      if ((t % 1500) < 1200 && r_rp != (r_evn & 7) && $urandom_range(0, 1) == 0) begin
        rp_we = 1; rp_wdata = 3'(r_rp + 1);
      end
      // reference gating
      sbusy  = (r_sb != 0);
      full   = (((r_evn + 1) & 7) == r_rp);
      r_busy = busy_in || sbusy || full;
      acc    = l1pass && !r_busy && !error_in;
      if (l1pass && !acc) begin
        if (busy_in) n_busy++;
        if (error_in) n_err++;
        if (sbusy) n_self++;
        if (full) n_full++;
      end
      #1;
      chk(busy === r_busy, "busy");
      @(posedge clk);
      r_acc = acc;
      r_synch = acc && ((r_evn & 255) == 0);
      if (r_synch) n_synch++;
      if (l1pass) r_tl1++;
      if (acc) begin
        r_evt[r_evn & 7] = r_cesr;
        r_evn++;
        r_sb = self_busy_len + 1;
        if (t - last_acc < min_gap) min_gap = t - last_acc;
        last_acc = t;
      end else if (r_sb != 0) r_sb--;
      r_cesr++;
      if (rp_we) r_rp = rp_wdata;
      if (error_in) r_irq = 1; else if (err_ack) r_irq = 0;
      #1;
      chk(l1accept === r_acc && irq_accept === r_acc, "l1accept");
      chk(synch === r_synch, "synch");
      chk(cal === (t % 97 == 0), "cal");
      chk(phase_out === PHASE_W'(t), "phase");
      chk(irq_error === r_irq, "irq_error");
      chk(event_num === 32'(r_evn) && total_l1 === 32'(r_tl1) && cesr_time === 32'(r_cesr), $sformatf("counters %0d/%0d %0d/%0d %0d/%0d", event_num, r_evn, total_l1, r_tl1, cesr_time, r_cesr));
      chk(read_ptr === 3'(r_rp), "read_ptr");
      if (r_acc) chk(evt_time[(r_evn - 1) & 7] === 32'(r_evt[(r_evn - 1) & 7]), "evt_time");
    end
    chk(min_gap == 32'(self_busy_len) + 2, $sformatf("min gap %0d", min_gap));
    chk(n_busy > 0 && n_err > 0 && n_self > 0 && n_full > 0 && n_synch > 1,
        $sformatf("mechanisms busy %0d err %0d self %0d full %0d synch %0d", n_busy, n_err, n_self, n_full, n_synch));
    chk(error_mon.total != 0 && busy_mon.total != 0, "monitors");
    $display("accepts %0d, rejected by busy %0d error %0d self %0d full %0d, synch %0d",
             r_evn, n_busy, n_err, n_self, n_full, n_synch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
