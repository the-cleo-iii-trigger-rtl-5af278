// tb_dfc_rate_limit -- the DFC self-Busy used as a 1 kHz trigger-rate cap.
// With self_busy_len = 23809 (23810 ticks of 42 ns = 1.0 ms) and an L1Pass
// on every tick, nothing else busy and the processor reading every event
// time at once, the DFC must accept exactly one event per 23811 ticks (the
// accept tick plus the self-Busy): 5 accepts in 100 000 ticks (4.2 ms),
// spaced by exactly 23811 ticks.
module tb_dfc_rate_limit;
  import cleo3_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clr = 0, l1pass = 0, busy_in = 0, error_in = 0, rp_we = 0, max_clr = 0, err_ack = 0, cal_req = 0;
  logic [SBUSY_W-1:0] self_busy_len = 16'd23809;
  logic [EVT_AW-1:0]  rp_wdata = '0;
  logic [PHASE_W-1:0] cesr_phase = '0, phase_out;
  logic l1accept, synch, cal, irq_accept, irq_error, busy;
  logic [CNT32_W-1:0] cesr_time, total_l1, event_num;
  logic [EVT_AW-1:0]  read_ptr;
  logic [CNT32_W-1:0] evt_time [2**EVT_AW];
  mon_t busy_mon, error_mon;
  int checks = 0, failures = 0, n_acc = 0, last = -1;

  dfc dut (.*);

  always #21 clk = ~clk;

  initial begin
    #(64'd42 * 120000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100000; n++) begin
      @(negedge clk);
      l1pass = 1;
      rp_we = (read_ptr != event_num[2:0]);
      rp_wdata = read_ptr + 1'b1;
      #1;
      if (l1accept) begin
        n_acc++;
        if (last >= 0) begin
          checks++;
          if (n - last != 23811) begin
            failures++;
            $display("spacing %0d", n - last);
          end
        end
        last = n;
      end
    end
    checks++;
    if (n_acc != 5) begin
      failures++;
      $display("accepts %0d", n_acc);
    end
    $display("accepts in 4.2 ms: %0d (1 kHz cap)", n_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
