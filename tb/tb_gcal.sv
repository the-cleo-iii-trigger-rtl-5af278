// tb_gcal -- self-checking test of a two-port GCAL board.
// The two TIM ports get different delay and width settings; for a train of
// L1Accepts (every fourth with Synch) and CAL pulses each port's outputs
// must follow its own settings (pulse at tick c appears at c+D+2 ..
// c+D+1+W).  The Busy and Error returned to the DFC must be the OR of the
// two TIMs' replies one tick later, and each port must count only its own
// TIM's Busy.
module tb_gcal;
  import cleo3_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, max_clr = 0;
  logic l1accept_in, synch_in, cal_in;
  logic [DLY_W-1:0] acc_dly_m1 [2], cal_dly_m1 [2];
  logic [WID_W-1:0] acc_wid_m1 [2], cal_wid_m1 [2];
  logic [1:0] tim_l1accept, tim_synch, tim_cal, tim_busy, tim_error;
  logic busy_out, error_out;
  mon_t busy_mon [2], error_mon [2];
  bit h_acc [int], h_syn [int], h_cal [int];
  int dly [2] = '{5, 17}, wid [2] = '{3, 1}, cdly [2] = '{2, 40}, cwid [2] = '{2, 5};
  int nb [2] = '{0, 0};
  logic [1:0] b_prev = 0, e_prev = 0;
  int checks = 0, failures = 0;

  gcal dut (.*);

  always #21 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit win(ref bit h [int], input int n, input int d, input int w);
    for (int j = 0; j < w; j++)
      if (h.exists(n - d - 2 - j) && h[n - d - 2 - j]) return 1;
    return 0;
  endfunction

  initial begin
    l1accept_in = 0; synch_in = 0; cal_in = 0; tim_busy = 0; tim_error = 0;
    for (int c = 0; c < 2; c++) begin
      acc_dly_m1[c] = DLY_W'(dly[c] - 1); acc_wid_m1[c] = WID_W'(wid[c] - 1);
      cal_dly_m1[c] = DLY_W'(cdly[c] - 1); cal_wid_m1[c] = WID_W'(cwid[c] - 1);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      l1accept_in = (n % 9 == 0);
      synch_in    = (n % 36 == 0);
      cal_in      = (n % 50 == 3);
      tim_busy    = 2'($urandom);
      tim_error   = 2'($urandom_range(0, 15) == 0 ? $urandom : 0);
      h_acc[n] = l1accept_in; h_syn[n] = synch_in; h_cal[n] = cal_in;
      #1;
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (tim_l1accept[c] !== win(h_acc, n, dly[c], wid[c]) ||
            tim_synch[c]    !== win(h_syn, n, dly[c], wid[c]) ||
            tim_cal[c]      !== win(h_cal, n, cdly[c], cwid[c])) begin
          failures++;
          if (failures < 10) $display("n=%0d port %0d: %b%b%b", n, c, tim_l1accept[c], tim_synch[c], tim_cal[c]);
        end
      end
      checks++;
      if (busy_out !== |b_prev || error_out !== |e_prev) failures++;
      @(posedge clk);
      b_prev = tim_busy; e_prev = tim_error;
      for (int c = 0; c < 2; c++) if (tim_busy[c]) nb[c]++;
    end
    @(negedge clk); tim_busy = 0;
    repeat (2) @(negedge clk);
    for (int c = 0; c < 2; c++) begin
      checks++;
      if (busy_mon[c].total !== TOT_W'(nb[c])) begin
        failures++;
        $display("port %0d busy total %0d exp %0d", c, busy_mon[c].total, nb[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
