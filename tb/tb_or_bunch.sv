// tb_or_bunch -- self-checking test of the OR/Bunch block.
// Sparse random prescaled lines and a random accelerator phase are applied.
// Checked every tick: L1Pass is the OR of the lines one tick later, and,
// while the veto is enabled, is suppressed in the vetoed phases.  At the
// end the per-phase trigger map is compared with a reference histogram,
// the saturation of a 3-bit map is checked, and the map clear is checked.
module tb_or_bunch;
  import cleo3_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_OUT-1:0]     lines;
  logic [PHASE_W-1:0]   phase;
  logic                 veto_en, map_clr;
  logic [2**PHASE_W-1:0] phase_veto;
  logic                 l1pass, l1pass3;
  logic [15:0]          bunch_map [2**PHASE_W];
  logic [2:0]           map3 [2**PHASE_W];
  int                   ref_map [2**PHASE_W];
  logic                 exp_pass;
  int checks = 0, failures = 0, vetoed = 0;

  or_bunch dut (.clk, .rst_n, .lines, .phase, .veto_en, .phase_veto, .map_clr, .l1pass, .bunch_map);
  or_bunch #(.HIST_W(3)) dut3 (.clk, .rst_n, .lines, .phase, .veto_en, .phase_veto, .map_clr(1'b0),
                               .l1pass(l1pass3), .bunch_map(map3));

  always #21 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_map[p]) ref_map[p] = 0;
    lines = '0; phase = '0; veto_en = 0; map_clr = 0;
    phase_veto = 16'h00F0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      veto_en = (t >= 400);
      lines = '0;
      if ($urandom_range(0, 2) == 0) lines[$urandom_range(0, N_OUT-1)] = 1'b1;
      if ($urandom_range(0, 9) == 0) lines = N_OUT'($urandom);
      phase = PHASE_W'($urandom);
      exp_pass = (|lines) && !(veto_en && phase_veto[phase]);
      if ((|lines) && !exp_pass) vetoed++;
      if (|lines) ref_map[phase]++;
      @(negedge clk);
      checks++;
      if (l1pass !== exp_pass) begin
        failures++;
        $display("t=%0d l1pass=%b exp=%b", t, l1pass, exp_pass);
      end
      lines = '0;
    end
    #1;
    for (int p = 0; p < 2**PHASE_W; p++) begin
      checks += 2;
      if (bunch_map[p] !== 16'(ref_map[p])) begin
        failures++;
        $display("phase %0d map=%0d exp=%0d", p, bunch_map[p], ref_map[p]);
      end
      if (map3[p] !== 3'((ref_map[p] > 7) ? 7 : ref_map[p])) begin
        failures++;
        $display("phase %0d map3=%0d", p, map3[p]);
      end
    end
    @(negedge clk); map_clr = 1; @(negedge clk); map_clr = 0;
    checks++;
    if (bunch_map[3] !== 16'd0) failures++;
    checks++;
    if (vetoed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
