// tb_a2_trojan: self-checking test of the A2 Trojan behavioural model.
// 1. A 20 MHz trigger input must fire the (active-low) output after about 180
//    rising edges, about 9 us, the figures reported for the fabricated Trojan.
//    The expected edge count is also worked out here, from the closed form of
//    the charge-sharing recursion, and the model must agree within two edges.
// 2. After 40 us of 20 MHz toggling, which saturates the capacitor, the output
//    must stay fired for about 15 us (the reported retention) once toggling stops.
// 3. A 1 MHz trigger input, a rare-toggling signal, must never fire it.
`timescale 1ns / 1ps
module tb_a2_trojan;
  logic trig = 1'b0, out;
  int checks = 0, failures = 0;

  a2_trojan dut (.trigger_in(trig), .trigger_out(out));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // Edges predicted by V_n = V_eq (1 - (1 - a)^n) with leakage folded per period.
  function automatic int predicted_edges(input real period_ns);
    real a = 1.0 / 187.0;
    real veq = 1.2 - 2.5e-5 * period_ns / a;
    real v = 0.0;
    for (int n = 1; n < 100000; n++) begin
      v = v - 2.5e-5 * period_ns / 2.0;
      if (v < 0.0) v = 0.0;
      v = v + a * (1.2 - v);
      if (v > 0.6) return n;
      v = v - 2.5e-5 * period_ns / 2.0;
    end
    return (veq < 0.6) ? 0 : -1;  // 0: never fires at this period
  endfunction

  int n_edges, pred;
  realtime t0, t_fire, t_stop;

  initial begin
    // 1. Trigger time at 20 MHz.
    check(out == 1'b1, "idle output high");
    pred = predicted_edges(50.0);
    n_edges = 0; t0 = $realtime;
    while (out && n_edges < 1000) begin
      #25 trig = 1'b1;
      n_edges = n_edges + 1;
      #25 trig = out ? 1'b0 : 1'b1;
    end
    t_fire = $realtime - t0 - 25;
    $display("fired after %0d edges, %0.2f us (predicted %0d)", n_edges, t_fire / 1000.0, pred);
    check(!out, "fires under 20 MHz toggling");
    check(n_edges >= pred - 2 && n_edges <= pred + 2, "edge count matches the charge-sharing model");
    check(n_edges >= 170 && n_edges <= 190, "about 180 toggling events");
    check(t_fire > 8500 && t_fire < 9500, "trigger time about 9 us");
    // 2. Retention after saturation.
    trig = 1'b0;
    repeat (800) begin #25 trig = 1'b1; #25 trig = 1'b0; end
    check(!out, "still fired while toggling");
    t_stop = $realtime;
    wait (out == 1'b1);
    $display("retention %0.2f us", ($realtime - t_stop) / 1000.0);
    check(($realtime - t_stop) > 13000 && ($realtime - t_stop) < 17000, "retention about 15 us");
    // 3. Rare toggling: 1 MHz for 200 us.
    #50000;
    repeat (200) begin
      #500 trig = 1'b1; #500 trig = 1'b0;
      if (!out) break;
    end
    check(out == 1'b1, "1 MHz toggling never fires");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
