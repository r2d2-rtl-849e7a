// tb_r2d2_toggle_counter: self-checking test of one guarded channel.
// The test drives the guarded signal with random toggles at several densities,
// and window ends at random intervals. A reference model keeps an unbounded count
// of toggles since the last window end; the alarm must be raised (detect_n_o low)
// exactly when that count reaches AT + 1. It checks every cycle, for thresholds of
// 1, 4, 13 and 64 toggles, with detection disabled for a while, and it checks
// that the 64th toggle of a window is the one that raises the alarm.
`timescale 1ns / 1ps
module tb_r2d2_toggle_counter;
  localparam int W = 6;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b1, guard = 1'b0, wend = 1'b0;
  logic [W-1:0] at = 6'd3, count;
  logic detect_n;
  int checks = 0, failures = 0, alarms = 0;
  int n = 0;             // toggles since the last window end
  logic prev = 1'b0;     // guard level at the previous edge
  logic exp_alarm = 1'b0;

  r2d2_toggle_counter #(.TGL_CNT_W(W)) dut (
    .clk, .rst_n, .enable_i(enable), .guard_i(guard), .window_end_i(wend),
    .at_i(at), .count_o(count), .detect_n_o(detect_n));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // Reference: evaluated at each rising edge from the values the DUT samples.
  always @(posedge clk) begin
    automatic bit t = (guard != prev);
    if (!rst_n || !enable) begin n = 0; exp_alarm = 1'b0; end
    else begin
      if (wend) n = 0;
      n += int'(t);
      exp_alarm = (n >= int'(at) + 1);
    end
    prev = rst_n ? guard : 1'b0;
  end

  always @(negedge clk) if (rst_n) begin
    check(detect_n == !exp_alarm, $sformatf("detect_n %0b exp alarm %0b (n=%0d at=%0d)", detect_n, exp_alarm, n, at));
    if (!detect_n) alarms++;
  end

  // Random stimulus: toggle with probability pct %, window end every 1..maxw cycles.
  task automatic run(input int cycles, input int pct, input int maxw);
    int left = 1 + ($urandom % maxw);
    repeat (cycles) begin
      @(negedge clk);
      if (($urandom % 100) < pct) guard = ~guard;
      left--;
      wend = (left == 0);
      if (left == 0) left = 1 + ($urandom % maxw);
    end
    @(negedge clk) wend = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    at = 6'd3;  run(400, 50, 20);
    at = 6'd0;  run(200, 10, 15);
    at = 6'd12; run(600, 70, 40);
    enable = 1'b0; run(50, 90, 10); enable = 1'b1;
    at = 6'd63; run(3000, 60, 300);
    // Directed: exactly 63 toggles then the 64th, in a long window.
    @(negedge clk) wend = 1'b1;
    @(negedge clk) wend = 1'b0;
    repeat (63) @(negedge clk) guard = ~guard;
    @(negedge clk);
    check(detect_n == 1'b1, "no alarm after 63 toggles");
    @(negedge clk) guard = ~guard;   // toggle 64
    @(negedge clk);
    check(detect_n == 1'b0, "alarm one cycle after the 64th toggle");
    check(alarms > 0, "alarm raised at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
