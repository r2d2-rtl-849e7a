// r2d2_detector: runtime detector for toggle-triggered (A2-style) hardware Trojans.
//
// An analog Trojan of the A2 kind charges a capacitor on every toggle of a rarely
// toggling, software-controllable signal. It fires only after that signal has
// toggled fast for a long time. The detector watches a set of such guarded
// signals and counts each one's toggle events within a monitoring window of MTW + 1
// clock cycles. A channel whose count reaches its attack threshold (AT + 1 toggles)
// drives its active-low detection output and raises the interrupt request. This
// happens well before the Trojan's capacitor can charge. The processor's
// interrupt handler can then stop the offending program.
//
// Structure: one r2d2_clock_counter sets the window for all channels. Each
// channel has its own r2d2_toggle_counter and its own AT register, so each guarded
// signal can have a different threshold. All registers sit in r2d2_config_regs and
// only privileged software can reach them. A single channel matches the
// demonstration chip, which guards CPSR_J. Sharing one window among several
// channels, and the interrupt being the OR of the channel alarms, are this
// design's own choices.
//
// Timing: detect_n_o[i] and irq_o go active one clock after the threshold toggle
// is sampled. They stay active until the current window ends.
`timescale 1ns / 1ps
module r2d2_detector
  import r2d2_pkg::*;
#(
  parameter int unsigned N_GUARD   = 1,
  parameter int unsigned T_M       = DEFAULT_T_M,
  parameter int unsigned A_TH      = DEFAULT_A_TH,
  parameter int unsigned CLK_CNT_W = $clog2(T_M),
  parameter int unsigned TGL_CNT_W = $clog2(A_TH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_GUARD-1:0]    guard_i,
  input  cfg_req_t              cfg_i,
  output logic [CFG_DATA_W-1:0] cfg_rdata_o,
  output logic                  cfg_err_o,
  output logic [N_GUARD-1:0]    detect_n_o,
  output logic                  irq_o
);

  logic                              enable;
  logic [CLK_CNT_W-1:0]              mtw;
  logic [N_GUARD-1:0][TGL_CNT_W-1:0] at;
  logic                              window_end;

  r2d2_config_regs #(
    .N_GUARD  (N_GUARD),
    .CLK_CNT_W(CLK_CNT_W),
    .TGL_CNT_W(TGL_CNT_W),
    .MTW_RESET(CLK_CNT_W'(T_M - 1)),
    .AT_RESET (TGL_CNT_W'(A_TH - 1))
  ) u_regs (
    .clk, .rst_n, .cfg_i, .cfg_rdata_o, .cfg_err_o,
    .enable_o(enable), .mtw_o(mtw), .at_o(at)
  );

  r2d2_clock_counter #(.CLK_CNT_W(CLK_CNT_W)) u_clock_counter (
    .clk, .rst_n, .enable_i(enable), .mtw_i(mtw),
    .count_o(), .window_end_o(window_end)
  );

  for (genvar g = 0; g < N_GUARD; g++) begin : g_chan
    r2d2_toggle_counter #(.TGL_CNT_W(TGL_CNT_W)) u_toggle_counter (
      .clk, .rst_n, .enable_i(enable), .guard_i(guard_i[g]),
      .window_end_i(window_end), .at_i(at[g]),
      .count_o(), .detect_n_o(detect_n_o[g])
    );
  end

  assign irq_o = !(&detect_n_o);

endmodule
