// tb_r2d2_detector: self-checking test of the complete detection circuit.
// Two guarded channels run with the default 256-cycle window and 64-toggle
// threshold. Channel 1 is then reprogrammed to a 10-toggle threshold and the
// window to 100 cycles. A cycle model in the testbench (a window counter plus an
// unbounded toggle count per channel; the alarm rises on a toggle that takes
// the count past AT) predicts detect_n_o and irq_o, and the
// test compares them every cycle. Directed phases check these cases: a signal
// toggling 63 times per window never alarms; one toggling 64 times alarms one
// cycle after the 64th toggle; an unprivileged attempt to disable detection has
// no effect; and a privileged disable silences the alarms. Random phases vary
// the toggle density.
`timescale 1ns / 1ps
module tb_r2d2_detector;
  import r2d2_pkg::*;
  localparam int N = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] guard = '0, prev = '0, detect_n;
  cfg_req_t cfg = '0;
  logic [31:0] rdata;
  logic err, irq;
  int checks = 0, failures = 0, alarms = 0, rejected = 0;
  // reference state
  int m_mtw = 255, m_at[N], m_cnt = 0, m_n[N];
  bit m_en = 1'b1, m_alarm[N];

  r2d2_detector #(.N_GUARD(N)) dut (
    .clk, .rst_n, .guard_i(guard), .cfg_i(cfg), .cfg_rdata_o(rdata), .cfg_err_o(err),
    .detect_n_o(detect_n), .irq_o(irq));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // Cycle model, advanced at every rising edge with the values the DUT samples.
  always @(posedge clk) begin
    if (!rst_n) begin
      m_cnt = 0; prev = '0;
      for (int i = 0; i < N; i++) begin m_n[i] = 0; m_alarm[i] = 0; end
    end else begin
      automatic bit wend = m_en && (m_cnt == m_mtw);
      for (int i = 0; i < N; i++) begin
        automatic bit t = (guard[i] != prev[i]);
        if (!m_en) begin m_n[i] = 0; m_alarm[i] = 0; end
        else begin
          if (wend) begin m_n[i] = 0; m_alarm[i] = 0; end
          m_n[i] += int'(t);
          // The alarm is raised by a toggle that brings the count past AT.
          if (t && m_n[i] >= m_at[i] + 1) m_alarm[i] = 1;
        end
      end
      m_cnt = (!m_en || wend) ? 0 : (m_cnt + 1) % 256;  // 8-bit counter wraps
      prev = guard;
      // A privileged write takes effect at this edge.
      if (cfg.valid && cfg.write && cfg.priv) begin
        if (cfg.addr == 4'd0) m_en = cfg.wdata[0];
        else if (cfg.addr == 4'd1) m_mtw = int'(cfg.wdata[7:0]);
        else if (cfg.addr < 4'(2 + N)) m_at[cfg.addr - 2] = int'(cfg.wdata[5:0]);
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    automatic bit any = 1'b0;
    for (int i = 0; i < N; i++) begin
      check(detect_n[i] == !m_alarm[i], $sformatf("detect_n[%0d]=%0b model alarm %0b n=%0d", i, detect_n[i], m_alarm[i], m_n[i]));
      any |= m_alarm[i];
    end
    check(irq == any, "irq");
    if (irq) alarms++;
  end

  task automatic write_cfg(input bit priv, input int a, input int d);
    @(negedge clk) cfg = '{valid: 1'b1, write: 1'b1, priv: priv, addr: 4'(a), wdata: 32'(d)};
    #1 if (!priv) begin check(err == 1'b1, "unprivileged write rejected"); rejected++; end
    @(negedge clk) cfg = '0;
  endtask

  // Wait for the start of a window (model counter at 0 after the next edge).
  task automatic align_window();
    do @(negedge clk); while (m_cnt != 0);
  endtask

  // Toggle channel mask every `gap` cycles, `count` times.
  task automatic toggles(input logic [N-1:0] mask, input int count, input int gap);
    repeat (count) begin
      guard ^= mask;
      repeat (gap) @(negedge clk);
    end
  endtask

  task automatic random_phase(input int cycles, input int pct);
    repeat (cycles) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) if (($urandom % 100) < pct) guard[i] = ~guard[i];
    end
  endtask

  initial begin
    int a0;
    for (int i = 0; i < N; i++) m_at[i] = 63;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // 63 toggles in a window: no alarm.
    align_window();
    toggles(2'b01, 63, 3);
    check(detect_n[0] == 1'b1, "no alarm after 63 toggles");
    // 64 toggles in the next window: alarm one cycle after the 64th.
    align_window();
    a0 = alarms;
    toggles(2'b01, 63, 2);
    guard[0] = ~guard[0];
    @(negedge clk);
    check(detect_n[0] == 1'b0, "alarm one cycle after the 64th toggle");
    repeat (300) @(negedge clk);
    check(alarms > a0, "alarm counted");
    // An unprivileged program cannot disable or retune the detector.
    write_cfg(1'b0, 0, 0);
    write_cfg(1'b0, 3, 63);
    // Privileged retuning: window of 100 cycles, channel 1 threshold 10 toggles.
    write_cfg(1'b1, 1, 99);
    write_cfg(1'b1, 3, 9);
    random_phase(3000, 20);
    random_phase(3000, 60);
    // Privileged disable: no alarms even under heavy toggling.
    write_cfg(1'b1, 0, 0);
    @(negedge clk);  // the channels clear at the edge after the write
    a0 = alarms;
    random_phase(1000, 90);
    check(alarms == a0, "disabled detector raises no alarm");
    write_cfg(1'b1, 0, 1);
    random_phase(1000, 50);
    check(rejected == 2, "unprivileged writes seen");
    $display("alarm cycles %0d", alarms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
