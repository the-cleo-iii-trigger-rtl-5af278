// or_bunch -- the "OR/Bunch" block of an L1TR board.
//
// Primary function: L1Pass is the OR of the 24 prescaled trigger lines.
// Secondary function: a map of trigger time versus accelerator phase.  For
// every trigger (OR of the lines) the counter of the current accelerator
// phase, one of 2**PHASE_W, is incremented (saturating at 2**16-1), giving a
// histogram of triggers per phase that is read on `bunch_map`.  When
// `veto_en` is set, triggers arriving in a phase whose bit in `phase_veto`
// is set are suppressed, which removes triggers not associated with beam
// crossings (cosmic rays, for example).  With veto_en low the block is a
// plain OR, which is how the boards were operated.
//
// The OR and the existence of the phase map follow the description; the
// histogram form, its 16-bit saturating counters, the veto mask and the
// phase width are this design's own choices.
//
// Timing: l1pass is registered, one tick after the prescaled lines.
module or_bunch
  import cleo3_pkg::*;
#(
  parameter int unsigned LINES  = N_OUT,
  parameter int unsigned PW     = PHASE_W,
  parameter int unsigned HIST_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LINES-1:0]  lines,          // prescaled trigger lines
  input  logic [PW-1:0]     phase,          // accelerator phase of this tick
  input  logic              veto_en,
  input  logic [2**PW-1:0]  phase_veto,     // 1 = suppress triggers in that phase
  input  logic              map_clr,
  output logic              l1pass,
  output logic [HIST_W-1:0] bunch_map [2**PW]
);

  logic any_line;
  assign any_line = |lines;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) l1pass <= 1'b0;
    else        l1pass <= any_line && !(veto_en && phase_veto[phase]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int p = 0; p < 2**PW; p++) bunch_map[p] <= '0;
    end else if (map_clr) begin
      for (int p = 0; p < 2**PW; p++) bunch_map[p] <= '0;
    end else if (any_line && bunch_map[phase] != '1) begin
      bunch_map[phase] <= bunch_map[phase] + 1'b1;
    end

endmodule
