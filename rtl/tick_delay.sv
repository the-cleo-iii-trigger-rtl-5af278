// tick_delay -- programmable delay line, 1 to 2**AW clock ticks.
//
// A circular buffer of 2**AW words is written at a write pointer that
// advances every tick; the output is read combinationally from the word
// written `dly_m1`+1 ticks earlier (read before write, so the full 2**AW
// ticks is reachable).  The buffer is not cleared at reset; instead a
// saturating age counter blocks the output until the selected word has
// really been written since reset.  The circular-buffer structure is this
// design's own choice.
//
// Timing: data_i sampled at clock edge k appears on data_o during the tick
// that starts at edge k + dly_m1 + 1.
module tick_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned AW    = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    dly_m1,
  input  logic [WIDTH-1:0] data_i,
  output logic [WIDTH-1:0] data_o
);

  logic [WIDTH-1:0] mem [2**AW];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      age;            // ticks written since reset, saturating
  logic             ready;

  assign rp    = wp - dly_m1 - 1'b1;
  assign ready = age > {1'b0, dly_m1};
  assign data_o = ready ? mem[rp] : '0;

  always_ff @(posedge clk) mem[wp] <= data_i;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp  <= '0;
      age <= '0;
    end else begin
      wp <= wp + 1'b1;
      if (!age[AW]) age <= age + 1'b1;
    end

endmodule
