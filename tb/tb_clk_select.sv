// tb_clk_select -- self-checking test of the clock selector model.
// Four clocks of different periods are applied; for each select value,
// with and without inversion, the output is sampled 2 ns after every
// input change and must equal the chosen source (or its complement).
module tb_clk_select;
  logic clk_cesr = 0, clk_xtal = 0, clk_ttl = 0, clk_aux = 0;
  logic [1:0] sel;
  logic inv;
  logic clk_out;
  int checks = 0, failures = 0;

  clk_select dut (.*);

  always #21 clk_cesr = ~clk_cesr;
  always #13 clk_xtal = ~clk_xtal;
  always #29 clk_ttl  = ~clk_ttl;
  always #7  clk_aux  = ~clk_aux;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic src;
    for (int s = 0; s < 8; s++) begin
      sel = 2'(s % 4); inv = (s >= 4);
      #5;
      for (int k = 0; k < 100; k++) begin
        #3;
        case (sel)
          2'd0: src = clk_cesr;
          2'd1: src = clk_xtal;
          2'd2: src = clk_ttl;
          default: src = clk_aux;
        endcase
        // compare only when the source has been stable for over 1 ns
        #0;
        if (($time % 7 > 1) && ($time % 13 > 1) && ($time % 21 > 1) && ($time % 29 > 1)) begin
          checks++;
          if (clk_out !== (src ^ inv)) begin
            failures++;
            if (failures < 5) $display("t=%0t sel=%0d inv=%b out=%b src=%b", $time, sel, inv, clk_out, src);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
