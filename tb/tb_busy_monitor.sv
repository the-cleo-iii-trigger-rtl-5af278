// tb_busy_monitor -- self-checking test of the Busy/Error bookkeeping.
// A random Busy signal and occasional L1Accepts drive the monitor; a
// reference model keeps TOTAL, CURRENT (cleared by L1Accept) and the MAX
// bar graph (OR of every CURRENT value, one tick late).  A long Busy run
// pushes CURRENT past 2**15 to check its sticky overflow (TOTAL's own
// overflow, after 2**31 ticks, is out of simulation reach).  MAX clear and
// the global clear are exercised.
module tb_busy_monitor;
  import cleo3_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sig, l1accept, max_clr, clr;
  mon_t mon;
  longint r_total;
  int     r_cur;
  logic   r_cur_ovf;
  logic [CUR_W-1:0] r_max, r_cur_q;
  int checks = 0, failures = 0;

  busy_monitor dut (.*);

  always #21 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick_check();
    @(posedge clk);
    r_max = max_clr ? '0 : (r_max | r_cur_q);
    if (sig) r_total++;
    if (l1accept) begin r_cur = 0; r_cur_ovf = 0; end
    else if (sig) begin
      r_cur++;
      if (r_cur == (1 << CUR_W)) begin r_cur = 0; r_cur_ovf = 1; end
    end
    r_cur_q = CUR_W'(r_cur);
    #1;
    checks++;
    if (mon.total !== TOT_W'(r_total) || mon.total_ovf !== 1'b0 ||
        mon.current !== CUR_W'(r_cur) || mon.cur_ovf !== r_cur_ovf ||
        mon.max_bar !== r_max) begin
      failures++;
      if (failures < 10)
        $display("tot %0d/%0d cur %0d/%0d ovf %b/%b max %h/%h", mon.total, r_total,
                 mon.current, r_cur, mon.cur_ovf, r_cur_ovf, mon.max_bar, r_max);
    end
  endtask

  initial begin
    sig = 0; l1accept = 0; max_clr = 0; clr = 0;
    r_total = 0; r_cur = 0; r_cur_ovf = 0; r_max = '0; r_cur_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      sig = ($urandom_range(0, 3) != 0);
      l1accept = ($urandom_range(0, 40) == 0);
      max_clr = (t == 1000);
      tick_check();
    end
    // long Busy: CURRENT overflows, sticky until the next L1Accept
    @(negedge clk);
    sig = 1; l1accept = 0; max_clr = 0;
    for (int t = 0; t < 33000; t++) tick_check();
    checks++;
    if (!mon.cur_ovf || mon.max_bar != '1) failures++;
    @(negedge clk); l1accept = 1; sig = 0; tick_check();
    @(negedge clk); l1accept = 0; clr = 1;
    @(posedge clk); #1;
    checks++;
    if (mon !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
