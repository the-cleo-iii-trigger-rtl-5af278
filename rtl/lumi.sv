// lumi -- LUMI board of the Level 1 decision crate.
//
// Service functions for the L1TR boards:
//  * L1Pass: the L1TR boards drive a shared open-collector line; the wired
//    OR is formed here and forwarded, registered, to the Data Flow Control.
//  * Accelerator phase: received from the flow control system and passed,
//    registered, to the L1TR boards.
//  * External conditionals: asynchronous trigger or inhibit inputs (pulse
//    generators, random sources) are synchronised with two flip-flops and
//    placed on the backplane bits reserved for them.
// Online luminosity from Bhabha scattering: each endcap's SURF board
// delivers its list of high-energy clusters, here as a bitmap over N_SEG
// azimuthal sectors with a strobe.  On each strobe the block counts an east
// single if the east endcap has any cluster, a west single likewise, and a
// back-to-back event if some east sector i and the opposite west sector
// (i + N_SEG/2) mod N_SEG both hold a cluster.  The three 32-bit scalers run
// freely; `snap` copies them all at one instant into the registers read by
// the control processor while the system runs; `clr` zeroes the scalers.
//
// The list of functions follows the description.  The sector bitmap form
// of the cluster lists, N_SEG = 16, the opposite-sector rule as the
// back-to-back criterion, the counter widths and the synchroniser are this
// design's own choices.
module lumi
  import cleo3_pkg::*;
#(
  parameter int unsigned N_L1TR = 2,
  parameter int unsigned N_SEG  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // L1Pass
  input  logic [N_L1TR-1:0]  l1pass_in,
  output logic               l1pass_out,
  // accelerator phase
  input  logic [PHASE_W-1:0] phase_in,
  output logic [PHASE_W-1:0] phase_out,
  // external trigger / inhibit inputs
  input  logic [EXT_W-1:0]   ext_in,
  output logic [EXT_W-1:0]   ext_bp,
  // Bhabha luminosity
  input  logic               clus_valid,
  input  logic [N_SEG-1:0]   clus_east,
  input  logic [N_SEG-1:0]   clus_west,
  input  logic               snap,
  input  logic               clr,
  output logic [31:0]        single_east,
  output logic [31:0]        single_west,
  output logic [31:0]        back_to_back,
  output logic [31:0]        snap_east,
  output logic [31:0]        snap_west,
  output logic [31:0]        snap_b2b
);

  logic [EXT_W-1:0] ext_meta;
  logic             b2b;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      l1pass_out <= 1'b0;
      phase_out  <= '0;
      ext_meta   <= '0;
      ext_bp     <= '0;
    end else begin
      l1pass_out <= |l1pass_in;
      phase_out  <= phase_in;
      ext_meta   <= ext_in;
      ext_bp     <= ext_meta;
    end

  always_comb begin
    b2b = 1'b0;
    for (int i = 0; i < N_SEG; i++)
      if (clus_east[i] && clus_west[(i + N_SEG/2) % N_SEG]) b2b = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      single_east  <= '0;
      single_west  <= '0;
      back_to_back <= '0;
    end else if (clr) begin
      single_east  <= '0;
      single_west  <= '0;
      back_to_back <= '0;
    end else if (clus_valid) begin
      if (|clus_east) single_east  <= single_east + 1;
      if (|clus_west) single_west  <= single_west + 1;
      if (b2b)        back_to_back <= back_to_back + 1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      snap_east <= '0;
      snap_west <= '0;
      snap_b2b  <= '0;
    end else if (snap) begin
      snap_east <= single_east;
      snap_west <= single_west;
      snap_b2b  <= back_to_back;
    end

endmodule
