// tim_model -- behavioural model of the Synch check made by a readout
// crate's timing interface (TIM).  Testbench use only.
//
// The TIM counts the L1Accepts it receives (rising edges, since the GCAL
// may stretch them).  Synch comes with every 256th L1Accept, starting with
// the first one after reset, so at each L1Accept the model expects Synch
// exactly when its own count is a multiple of 256.  A missing Synch where
// one is expected, or a Synch at any other L1Accept, sets the sticky
// `synch_error`, which is how a crate detects lost or extra L1Accepts.
module tim_model (
  input  logic clk,
  input  logic rst_n,
  input  logic l1accept,
  input  logic synch,
  output logic synch_error,
  output int   n_accept
);
  logic acc_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc_q       <= 1'b0;
      synch_error <= 1'b0;
      n_accept    <= 0;
    end else begin
      acc_q <= l1accept;
      if (l1accept && !acc_q) begin
        if (synch != (n_accept % 256 == 0)) synch_error <= 1'b1;
        n_accept <= n_accept + 1;
      end
    end
endmodule
