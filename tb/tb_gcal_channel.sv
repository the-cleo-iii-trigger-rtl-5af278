// tb_gcal_channel -- self-checking test of one GCAL TIM port.
// L1Accept pulses (some with Synch) and CAL pulses are sent with a set of
// delay/width settings, including the longest delay (32768 ticks) and the
// longest width (256 ticks).  The expected TIM outputs are built from the
// input history: a pulse at tick c must appear at ticks c+D+2 .. c+D+1+W,
// D and W being the programmed delay and width (the ticks beyond D are the
// input and output resynchronisation registers).  Busy/Error forwarding to
// the DFC and the per-TIM TOTAL counters are checked too.  After each
// change of settings the outputs are not compared until pulses launched
// under the old settings have drained.
module tb_gcal_channel;
  import cleo3_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, max_clr = 0;
  logic l1accept_in, synch_in, cal_in;
  logic [DLY_W-1:0] acc_dly_m1, cal_dly_m1;
  logic [WID_W-1:0] acc_wid_m1, cal_wid_m1;
  logic tim_l1accept, tim_synch, tim_cal, tim_busy, tim_error, busy_out, error_out;
  mon_t busy_mon, error_mon;
  int checks = 0, failures = 0;
  bit   h_acc [int], h_syn [int], h_cal [int];
  int   n_busy = 0, n_out = 0;
  logic busy_prev = 0;
  int   gn = 0;   // global tick index

  gcal_channel dut (.*);

  always #21 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit win(ref bit h [int], input int n, input int d, input int w);
    for (int j = 0; j < w; j++)
      if (h.exists(n - d - 2 - j) && h[n - d - 2 - j]) return 1;
    return 0;
  endfunction

  task automatic run(input int dly, input int wid, input int cdly, input int cwid, input int len, input int gap);
    int e_a, e_s, e_c;
    acc_dly_m1 = DLY_W'(dly - 1); acc_wid_m1 = WID_W'(wid - 1);
    cal_dly_m1 = DLY_W'(cdly - 1); cal_wid_m1 = WID_W'(cwid - 1);
    for (int k = 0; k < len; k++) begin
      int n = gn++;
      @(negedge clk);
      l1accept_in = (k < len - dly - wid - 10) && (k % gap == 0);
      synch_in    = l1accept_in && ((k / gap) % 3 == 0);
      cal_in      = (k < len - cdly - cwid - 10) && (k % (gap * 2) == 1);
      tim_busy    = ($urandom_range(0, 2) == 0);
      tim_error   = ($urandom_range(0, 20) == 0);
      h_acc[n] = l1accept_in; h_syn[n] = synch_in; h_cal[n] = cal_in;
      #1;
      e_a = win(h_acc, n, dly, wid);
      e_s = win(h_syn, n, dly, wid);
      e_c = win(h_cal, n, cdly, cwid);
      // skip the settling after a settings change: pulses still in flight
      // were launched under the old settings
      if (k >= ((dly + wid > cdly + cwid) ? dly + wid : cdly + cwid) + 4) checks++;
      if (k >= ((dly + wid > cdly + cwid) ? dly + wid : cdly + cwid) + 4 &&
          (tim_l1accept !== e_a[0] || tim_synch !== e_s[0] || tim_cal !== e_c[0])) begin
        failures++;
        if (failures < 10) $display("n=%0d d=%0d acc %b/%0d synch %b/%0d cal %b/%0d", n, dly,
                                    tim_l1accept, e_a, tim_synch, e_s, tim_cal, e_c);
      end
      if (tim_l1accept) n_out++;
      checks++;
      if (busy_out !== busy_prev) failures++;
      @(posedge clk);
      busy_prev = tim_busy;
      if (busy_prev) n_busy++;
    end
  endtask

  initial begin
    l1accept_in = 0; synch_in = 0; cal_in = 0; tim_busy = 0; tim_error = 0;
    acc_dly_m1 = '0; acc_wid_m1 = '0; cal_dly_m1 = '0; cal_wid_m1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    run(1, 1, 1, 1, 200, 5);
    run(10, 4, 100, 2, 400, 7);
    run(3, 6, 20, 1, 300, 4);            // widths longer than the spacing: retrigger
    run(32768, 256, 2, 256, 33800, 3000);
    @(negedge clk); tim_busy = 0; tim_error = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (busy_mon.total !== TOT_W'(n_busy)) begin
      failures++;
      $display("busy total %0d exp %0d", busy_mon.total, n_busy);
    end
    checks++;
    if (n_out == 0 || error_mon.total == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
