// tb_tlu -- self-checking test of the Trigger Logic Unit.
// Programs three product terms and two trigger lines:
//   line 3  = (bp[0] & ~bp[5]) | bp[178]
//   line 47 = bp[100] & bp[101]
// routes output 0 and 5 from line 3, output 23 from line 47 and leaves
// output 7 disabled, then drives random backplane words.  The expected
// outputs come from the two formulas above: a one-tick pulse two ticks after
// a line's condition becomes true, coincident on outputs fed by one line.
module tb_tlu;
  import cleo3_pkg::*;
  localparam int NT = 48;
  logic clk = 0, rst_n = 0;
  logic [BP_W-1:0]    bp;
  logic [BP_W-1:0]    term_mask [NT];
  logic [BP_W-1:0]    term_pol  [NT];
  logic [NT-1:0]      line_terms [N_LINES];
  logic [SEL_W-1:0]   route_sel [N_OUT];
  logic [N_OUT-1:0]   route_en;
  logic [N_LINES-1:0] lines;
  logic [N_OUT-1:0]   trig;
  logic [BP_W-1:0]    hist [$];
  int checks = 0, failures = 0, pulses = 0;

  tlu #(.N_TERMS(NT)) dut (.*);

  always #21 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic c3(logic [BP_W-1:0] b);
    return (b[0] & ~b[5]) | b[178];
  endfunction
  function automatic logic c47(logic [BP_W-1:0] b);
    return b[100] & b[101];
  endfunction

  initial begin
    logic [N_OUT-1:0] exp_t;
    logic e3, e47;
    bp = '0;
    foreach (term_mask[t]) begin term_mask[t] = '0; term_pol[t] = '0; end
    foreach (line_terms[l]) line_terms[l] = '0;
    foreach (route_sel[o]) route_sel[o] = '0;
    route_en = '0;
    term_mask[0][0] = 1; term_mask[0][5] = 1; term_pol[0][5] = 1;
    term_mask[1][178] = 1;
    term_mask[2][100] = 1; term_mask[2][101] = 1;
    line_terms[3]  = NT'(3);        // terms 0 and 1
    line_terms[47] = NT'(4);        // term 2
    route_sel[0] = 6'd3;  route_en[0] = 1;
    route_sel[5] = 6'd3;  route_en[5] = 1;
    route_sel[23] = 6'd47; route_en[23] = 1;
    route_sel[7] = 6'd3;  route_en[7] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      bp = '0;
      for (int i = 0; i < BP_W; i += 32) bp[i +: 32] = (BP_W - i >= 32) ? $urandom : $urandom & ((1 << (BP_W - i)) - 1);
      if ($urandom_range(0, 3) != 0) bp[178] = 0;
      hist.push_back(bp);
      #1;
      if (hist.size() >= 4) begin
        e3  = c3(hist[$-2])  & ~c3(hist[$-3]);
        e47 = c47(hist[$-2]) & ~c47(hist[$-3]);
        exp_t = '0;
        exp_t[0] = e3; exp_t[5] = e3; exp_t[23] = e47;
        checks++;
        if (trig !== exp_t) begin
          failures++;
          $display("t=%0d trig=%h exp=%h", t, trig, exp_t);
        end
        if (e3) pulses++;
      end
    end
    checks++;
    if (pulses < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
