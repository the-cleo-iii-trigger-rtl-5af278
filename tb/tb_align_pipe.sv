// tb_align_pipe -- self-checking test of the variable-depth alignment
// pipeline.  Random words are pushed every tick; for several depths
// (0, 1, 7, 32) the output must equal the word pushed exactly `depth` ticks
// earlier, which a reference history array gives independently.
module tb_align_pipe;
  localparam int W = 12, MAXD = 32;
  logic clk = 0, rst_n = 0;
  logic [5:0] depth;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  align_pipe #(.WIDTH(W), .MAX_DEPTH(MAXD)) dut (.clk, .rst_n, .depth, .data_i(din), .data_o(dout));

  always #21 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int dl [4] = '{0, 1, 7, 32};
    depth = 0; din = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (dl[k]) begin
      depth = 6'(dl[k]);
      for (int t = 0; t < 80; t++) begin
        @(negedge clk);
        din = W'($urandom);
        hist.push_back(din);
        #1;
        if (hist.size() > dl[k] + 40 || dl[k] == 0) begin
          checks++;
          if (dout !== hist[hist.size()-1-dl[k]]) begin
            failures++;
            $display("depth %0d: got %h exp %h", dl[k], dout, hist[hist.size()-1-dl[k]]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
