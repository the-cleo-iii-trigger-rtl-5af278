// tb_trig_scalers -- self-checking test of the 24 trigger scalers.
// Random pulses on all 24 lines are counted against a reference, with a
// clear half way.  Counting to 2**40 is out of reach in simulation, so the
// wrap-around is checked on a second, 6-bit instance, which must wrap at 64.
module tb_trig_scalers;
  import cleo3_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [N_OUT-1:0] pulse;
  logic [SC_W-1:0]  count [N_OUT];
  logic [5:0]       count6 [2];
  longint ref_c [N_OUT];
  int checks = 0, failures = 0;

  trig_scalers dut (.clk, .rst_n, .clr, .pulse, .count);
  trig_scalers #(.LINES(2), .W(6)) dut6 (.clk, .rst_n, .clr(1'b0), .pulse(pulse[1:0]), .count(count6));

  always #21 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0 = 0;
    foreach (ref_c[i]) ref_c[i] = 0;
    pulse = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      clr = (t == 300);
      pulse = N_OUT'($urandom);
      @(posedge clk);
      for (int i = 0; i < N_OUT; i++)
        if (clr) ref_c[i] = 0; else if (pulse[i]) ref_c[i]++;
      if (pulse[0]) n0++;
      #1;
      for (int i = 0; i < N_OUT; i++) begin
        checks++;
        if (count[i] !== SC_W'(ref_c[i])) begin
          failures++;
          $display("t=%0d line %0d got %0d exp %0d", t, i, count[i], ref_c[i]);
        end
      end
    end
    checks++;
    if (count6[0] !== 6'(n0 % 64)) begin
      failures++;
      $display("wrap: got %0d exp %0d", count6[0], n0 % 64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
