// tb_prescaler -- self-checking test of the prescaler bank.
// Line i is set to N = i+1 (line 23 to N = 2**24 so that it never passes
// in the run).  Random pulses are applied; a reference count per line
// predicts which pulse passes (every Nth, the first being the Nth).  The
// clear input is exercised half way.
module tb_prescaler;
  import cleo3_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [PS_W-1:0]  ps_nm1 [N_OUT];
  logic [N_OUT-1:0] pulse_i, pulse_o, exp_o;
  int ref_cnt [N_OUT];
  int n_pass [N_OUT];
  int checks = 0, failures = 0;

  prescaler dut (.clk, .rst_n, .clr, .ps_nm1, .pulse_i, .pulse_o);

  always #21 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_OUT; i++) begin
      ps_nm1[i] = PS_W'(i);
      ref_cnt[i] = 0; n_pass[i] = 0;
    end
    ps_nm1[23] = '1;
    pulse_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      clr = (t == 500);
      pulse_i = N_OUT'($urandom) | (t[0] ? 24'h800000 : 24'h0);
      #1;
      for (int i = 0; i < N_OUT; i++) begin
        exp_o[i] = pulse_i[i] && (ref_cnt[i] == (i == 23 ? (1 << 24) - 1 : i));
      end
      checks++;
      if (pulse_o !== exp_o) begin
        failures++;
        $display("t=%0d got %h exp %h", t, pulse_o, exp_o);
      end
      for (int i = 0; i < N_OUT; i++) begin
        if (clr || exp_o[i]) ref_cnt[i] = 0;
        else if (pulse_i[i]) ref_cnt[i]++;
        if (exp_o[i]) n_pass[i]++;
      end
    end
    // line 0 passes every pulse, line 23 (N = 2**24) never within the run
    checks++;
    if (n_pass[0] < 300 || n_pass[23] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
