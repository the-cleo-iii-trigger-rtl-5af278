// align_pipe -- variable-depth pipeline used to time-align trigger data.
//
// Tracking information is ready about 2 us after a crossing, calorimetry
// only after more than 2.5 us, so the early data is held back before it is
// placed on the shared backplane.  This block is a shift register of
// MAX_DEPTH stages; the output is taken from the stage chosen by `depth`,
// so the data leaves `depth` clock ticks after it entered (depth = 0 gives
// a straight combinational path).  The variable-depth pipeline itself
// follows the description; the shift-register structure and the 32-tick
// maximum (about 1.3 us at 42 ns per tick) are this design's own choices.
//
// Interface: data_i sampled on every rising clk edge; data_o valid
// combinationally from the selected stage.  rst_n clears all stages.
module align_pipe #(
  parameter int unsigned WIDTH     = 16,
  parameter int unsigned MAX_DEPTH = 32,
  localparam int unsigned DEP_W    = $clog2(MAX_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DEP_W-1:0]  depth,   // delay in ticks, 0..MAX_DEPTH
  input  logic [WIDTH-1:0]  data_i,
  output logic [WIDTH-1:0]  data_o
);

  logic [WIDTH-1:0] stage [MAX_DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= data_i;
      for (int i = 1; i < MAX_DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  always_comb begin
    data_o = data_i;
    for (int i = 1; i <= MAX_DEPTH; i++)
      if (int'(depth) == i) data_o = stage[i-1];
  end

endmodule
