// r2d2_clock_counter: the monitoring-window clock counter of the R2D2 detector.
//
// The counter counts clock cycles from 0. In the cycle in which its value equals
// the MTW register, window_end_o is high (the "b = 0" condition of the detection
// circuit). The counter then returns to 0, so a window lasts MTW + 1 cycles. The
// value 255 gives the 256-cycle window of the demonstration chip with an 8-bit
// counter. The compare-and-restart behaviour is the one the detection circuit
// describes. Storing "window length minus one" in MTW is this design's choice; it
// lets the 8-bit width hold a 256-cycle window. While detection is disabled, the
// counter is held at 0 and no window ends.
//
// Timing: window_end_o is combinational from the counter, so it is valid in the
// window's last cycle. The counter restarts on the next clock edge. Reset is
// synchronous and active low.
`timescale 1ns / 1ps
module r2d2_clock_counter #(
  parameter int unsigned CLK_CNT_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable_i,
  input  logic [CLK_CNT_W-1:0] mtw_i,
  output logic [CLK_CNT_W-1:0] count_o,
  output logic                 window_end_o
);

  logic [CLK_CNT_W-1:0] count_q;

  assign window_end_o = enable_i && (count_q == mtw_i);
  assign count_o      = count_q;

  always_ff @(posedge clk) begin
    if (!rst_n || !enable_i || window_end_o) count_q <= '0;
    else                                     count_q <= count_q + 1'b1;
  end

endmodule
