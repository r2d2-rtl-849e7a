// tb_r2d2_clock_counter: self-checking test of the monitoring-window counter.
// A reference model counts cycles since the last window end. The test checks
// window_end_o and the count every cycle for several MTW values (window lengths
// 1, 5, 17 and 256 cycles). It also checks that a 256-cycle window ends exactly
// every 256 cycles, that disabling detection holds the counter at 0, and that an
// MTW change mid-window takes effect against the running count.
`timescale 1ns / 1ps
module tb_r2d2_clock_counter;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b1;
  logic [W-1:0] mtw = 8'd4, count;
  logic window_end;
  int checks = 0, failures = 0;
  int ref_count = 0, ends = 0, last_end = -1, cyc = 0;

  r2d2_clock_counter #(.CLK_CNT_W(W)) dut (
    .clk, .rst_n, .enable_i(enable), .mtw_i(mtw), .count_o(count), .window_end_o(window_end));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // Compare with the model just before each rising edge, then advance the model.
  task automatic step(input int n);
    repeat (n) begin
      #1 check(count == W'(ref_count), $sformatf("count %0d exp %0d", count, ref_count));

      check(window_end == (enable && ref_count == int'(mtw)), "window_end");
      if (window_end) begin
        if (last_end >= 0 && mtw == 8'd255)
          check(cyc - last_end == 256, $sformatf("window length %0d", cyc - last_end));
        last_end = cyc; ends++;
      end
      if (!enable || ref_count == int'(mtw)) ref_count = 0; else ref_count++;
      cyc++;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    step(40);
    mtw = 8'd0;  step(10);             // window of a single cycle
    mtw = 8'd16; step(60);
    enable = 1'b0; step(10);           // disabled: held at 0, no window end
    enable = 1'b1; mtw = 8'd255; last_end = -1; step(900);
    check(ends >= 20, $sformatf("windows ended %0d", ends));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
