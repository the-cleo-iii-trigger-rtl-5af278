// tb_l1tr -- self-checking test of a whole L1TR board.
// Line 0 = bp[7], routed to output 2 with a prescale of 3; line 1 =
// bp[50] & bp[51], routed to output 10 with no prescaling.  Random backplane
// data is applied; a reference chain (rising edge, two ticks of TLU
// latency, every-third-pulse prescaler, one tick of OR latency) predicts
// L1Pass on every tick, and at the end the two scalers and the sum of the
// phase map are compared with the reference counts.
module tb_l1tr;
  import cleo3_pkg::*;
  localparam int NT = 4;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [BP_W-1:0]    bp;
  logic [PHASE_W-1:0] phase;
  logic [BP_W-1:0]    term_mask [NT], term_pol [NT];
  logic [NT-1:0]      line_terms [N_LINES];
  logic [SEL_W-1:0]   route_sel [N_OUT];
  logic [N_OUT-1:0]   route_en, trig, prescaled;
  logic [PS_W-1:0]    ps_nm1 [N_OUT];
  logic               veto_en = 0;
  logic [2**PHASE_W-1:0] phase_veto = '0;
  logic [SC_W-1:0]    scaler [N_OUT];
  logic [15:0]        bunch_map [2**PHASE_W];
  logic               l1pass;
  logic [BP_W-1:0]    h [$];
  int n2 = 0, n10 = 0, ps2 = 0, npass = 0;
  logic e_or = 0;
  int checks = 0, failures = 0;

  l1tr #(.N_TERMS(NT)) dut (.*);

  always #21 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic t2, t10, p2;
    int sum;
    bp = '0; phase = '0;
    foreach (term_mask[t]) begin term_mask[t] = '0; term_pol[t] = '0; end
    foreach (line_terms[l]) line_terms[l] = '0;
    foreach (route_sel[o]) begin route_sel[o] = '0; ps_nm1[o] = '0; end
    route_en = '0;
    term_mask[0][7] = 1;
    term_mask[1][50] = 1; term_mask[1][51] = 1;
    line_terms[0] = 4'b0001; line_terms[1] = 4'b0010;
    route_sel[2] = 6'd0;  route_en[2] = 1;  ps_nm1[2] = 24'd2;
    route_sel[10] = 6'd1; route_en[10] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      bp = '0;
      bp[7] = $urandom_range(0, 1);
      bp[51:50] = 2'($urandom);
      bp[120 +: 32] = $urandom;            // unused bits
      phase = PHASE_W'($urandom);
      h.push_back(bp);
      #1;
      t2 = 0; t10 = 0;
      if (h.size() >= 4) begin
        t2  = h[$-2][7] & ~h[$-3][7];
        t10 = (&h[$-2][51:50]) & ~(&h[$-3][51:50]);
      end
      p2 = 0;
      if (t2) begin
        n2++;
        if (n2 % 3 == 0) begin p2 = 1; ps2++; end
      end
      if (t10) n10++;
      checks++;
      if (l1pass !== e_or || prescaled[2] !== p2 || prescaled[10] !== t10) begin
        failures++;
        if (failures < 10) $display("n=%0d l1pass %b/%b ps2 %b/%b ps10 %b/%b", n, l1pass, e_or,
                                    prescaled[2], p2, prescaled[10], t10);
      end
      e_or = p2 | t10;
      if (p2 | t10) npass++;
    end
    @(negedge clk);
    sum = 0;
    foreach (bunch_map[p]) sum += bunch_map[p];
    checks++;
    if (scaler[2] !== SC_W'(ps2) || scaler[10] !== SC_W'(n10) || sum != npass) begin
      failures++;
      $display("scalers %0d/%0d %0d/%0d map %0d/%0d", scaler[2], ps2, scaler[10], n10, sum, npass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
