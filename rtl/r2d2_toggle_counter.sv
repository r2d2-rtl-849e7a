// r2d2_toggle_counter: one guarded channel of the R2D2 detector.
//
// A toggle event is any change of the guarded signal's level from one clock cycle
// to the next. The events are counted in a TGL_CNT_W-bit counter that is cleared
// when a monitoring window ends. The AT register holds the attack threshold minus
// one. The counter stops at AT. The next toggle in the same window is toggle
// number AT + 1, which equals the threshold. It sets the alarm flop, and
// detect_n_o then stays low until the window ends. With AT = 63 and a 6-bit
// counter, this gives the demonstration chip's threshold of 64 toggles per window.
// The counter plus the alarm flop do the same as comparing a 7-bit count with 64.
//
// The window-reset and threshold-compare structure follows the detection circuit.
// These are this design's own choices: counting both edges of the guarded signal,
// the "minus one" encoding, and holding the alarm until the window ends. A toggle
// in the window's last cycle counts toward the next window. The comparison is
// "at least AT" rather than "equal to AT". If privileged software lowers AT below
// the running count in the middle of a window, the next toggle therefore still
// raises the alarm.
//
// Timing: guard_i is sampled on every rising clock edge and must be synchronous
// to clk. detect_n_o goes low one clock after the sampling edge that sees the
// threshold toggle. It returns high one clock after the window ends. Disabling
// detection clears the channel. Reset is synchronous and active low.
`timescale 1ns / 1ps
module r2d2_toggle_counter #(
  parameter int unsigned TGL_CNT_W = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable_i,
  input  logic                 guard_i,
  input  logic                 window_end_i,
  input  logic [TGL_CNT_W-1:0] at_i,
  output logic [TGL_CNT_W-1:0] count_o,
  output logic                 detect_n_o
);

  logic                 guard_q;   // level seen in the previous cycle
  logic                 toggle;    // a toggle event in this cycle
  logic [TGL_CNT_W-1:0] count_q;
  logic                 alarm_q;
  logic [TGL_CNT_W-1:0] base_count;
  logic                 base_alarm;

  assign toggle     = guard_i ^ guard_q;
  assign count_o    = count_q;
  assign detect_n_o = !alarm_q;

  always_ff @(posedge clk) begin
    if (!rst_n) guard_q <= 1'b0;
    else        guard_q <= guard_i;
  end

  // At a window end the count and the alarm restart from zero, and a toggle in
  // that same cycle is the first event of the new window.
  always_comb begin
    base_count = window_end_i ? '0   : count_q;
    base_alarm = window_end_i ? 1'b0 : alarm_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !enable_i) begin
      count_q <= '0;
      alarm_q <= 1'b0;
    end else begin
      count_q <= base_count;
      alarm_q <= base_alarm;
      if (toggle) begin
        if (base_count >= at_i) alarm_q <= 1'b1;
        else                    count_q <= base_count + 1'b1;
      end
    end
  end

endmodule
