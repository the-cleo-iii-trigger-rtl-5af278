// tb_lumi -- self-checking test of the LUMI board.
// Checks the wired OR of the L1Pass lines (one tick), the forwarding of the
// accelerator phase (one tick), the two-flop synchroniser on the external
// inputs (two ticks), and the Bhabha scalers: random endcap cluster maps are
// scored against a reference that counts east singles, west singles and
// back-to-back pairs (sector i east with sector i+8 mod 16 west).  The
// snapshot must freeze the three counts of one instant.
module tb_lumi;
  import cleo3_pkg::*;
  localparam int NS = 16;
  logic clk = 0, rst_n = 0;
  logic [1:0] l1pass_in;
  logic l1pass_out;
  logic [PHASE_W-1:0] phase_in, phase_out;
  logic [EXT_W-1:0] ext_in, ext_bp;
  logic clus_valid, snap, clr;
  logic [NS-1:0] clus_east, clus_west;
  logic [31:0] single_east, single_west, back_to_back, snap_east, snap_west, snap_b2b;
  logic [1:0] lp_q = 0;
  logic [PHASE_W-1:0] ph_q = 0;
  logic [EXT_W-1:0] ext_q1 = 0, ext_q2 = 0;
  int r_e = 0, r_w = 0, r_b = 0, s_e = 0, s_w = 0, s_b = 0;
  int checks = 0, failures = 0;

  lumi #(.N_L1TR(2), .N_SEG(NS)) dut (.*);

  always #21 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_b2b(logic [NS-1:0] e, logic [NS-1:0] w);
    for (int i = 0; i < NS; i++) if (e[i] && w[(i + NS/2) % NS]) return 1;
    return 0;
  endfunction

  initial begin
    l1pass_in = 0; phase_in = 0; ext_in = 0; clus_valid = 0; snap = 0; clr = 0;
    clus_east = 0; clus_west = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      l1pass_in = 2'($urandom);
      phase_in  = PHASE_W'($urandom);
      ext_in    = EXT_W'($urandom);
      clus_valid = ($urandom_range(0, 1) == 0);
      clus_east = ($urandom_range(0, 2) == 0) ? NS'(1 << $urandom_range(0, NS-1)) : '0;
      clus_west = ($urandom_range(0, 2) == 0) ? NS'(1 << $urandom_range(0, NS-1)) : '0;
      if ($urandom_range(0, 3) == 0 && clus_east != 0)
        clus_west = NS'(1 << ((($clog2(clus_east)) + NS/2) % NS));
      snap = (t % 250 == 100);
      #1;
      checks++;
      if (l1pass_out !== |lp_q || phase_out !== ph_q || ext_bp !== ext_q2) begin
        failures++;
        $display("t=%0d forwarding", t);
      end
      @(posedge clk);
      ext_q2 = ext_q1; ext_q1 = ext_in; lp_q = l1pass_in; ph_q = phase_in;
      if (snap) begin s_e = r_e; s_w = r_w; s_b = r_b; end
      if (clus_valid) begin
        if (clus_east != 0) r_e++;
        if (clus_west != 0) r_w++;
        if (is_b2b(clus_east, clus_west)) r_b++;
      end
      #1;
      checks++;
      if (single_east !== 32'(r_e) || single_west !== 32'(r_w) || back_to_back !== 32'(r_b) ||
          snap_east !== 32'(s_e) || snap_west !== 32'(s_w) || snap_b2b !== 32'(s_b)) begin
        failures++;
        if (failures < 10) $display("t=%0d counts %0d/%0d %0d/%0d %0d/%0d", t, single_east, r_e,
                                    single_west, r_w, back_to_back, r_b);
      end
    end
    checks++;
    if (r_b < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
