// r2d2_config_regs: the privileged configuration registers of the R2D2 detector.
//
// The module holds the detection enable bit, the monitoring timing window
// register (MTW, window length minus one) and one attack threshold register
// (AT, threshold minus one) for each guarded channel. Software programs the
// window and the thresholds, so a reverse engineer cannot read them from the
// layout. Only privileged software may configure them, so an unprivileged
// program can neither disable detection nor retune it.
//
// Interface: one request per cycle on cfg_i (see r2d2_pkg::cfg_req_t). A
// privileged write updates the addressed register on the next clock edge. A
// privileged read returns the register on cfg_rdata_o in the same cycle. An
// unprivileged access, or one to an unmapped address, changes nothing, reads
// as 0 and raises cfg_err_o in the same cycle.
//
// This design's own choices: the register map, the 32-bit data bus, reading
// back as 0 for unprivileged software, and the reset values. After reset,
// detection is enabled with the demonstration chip's values (256 cycles,
// 64 toggles).
`timescale 1ns / 1ps
module r2d2_config_regs
  import r2d2_pkg::*;
#(
  parameter int unsigned N_GUARD   = 1,
  parameter int unsigned CLK_CNT_W = 8,
  parameter int unsigned TGL_CNT_W = 6,
  parameter logic [CLK_CNT_W-1:0] MTW_RESET = CLK_CNT_W'(DEFAULT_T_M - 1),
  parameter logic [TGL_CNT_W-1:0] AT_RESET  = TGL_CNT_W'(DEFAULT_A_TH - 1)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  cfg_req_t                            cfg_i,
  output logic [CFG_DATA_W-1:0]               cfg_rdata_o,
  output logic                                cfg_err_o,
  output logic                                enable_o,
  output logic [CLK_CNT_W-1:0]                mtw_o,
  output logic [N_GUARD-1:0][TGL_CNT_W-1:0]   at_o
);

  logic                              enable_q;
  logic [CLK_CNT_W-1:0]              mtw_q;
  logic [N_GUARD-1:0][TGL_CNT_W-1:0] at_q;

  logic        mapped;     // address names a register
  logic        allowed;    // privileged access to a mapped register
  int unsigned at_idx;     // channel addressed by an AT access

  always_comb begin
    at_idx = 32'(cfg_i.addr) - 32'(CFG_ADDR_AT0);
    mapped = (cfg_i.addr == CFG_ADDR_CTRL) || (cfg_i.addr == CFG_ADDR_MTW) ||
             ((32'(cfg_i.addr) >= 32'(CFG_ADDR_AT0)) && (at_idx < N_GUARD));
    allowed   = cfg_i.valid && cfg_i.priv && mapped;
    cfg_err_o = cfg_i.valid && !allowed;

    cfg_rdata_o = '0;
    if (allowed && !cfg_i.write) begin
      if (cfg_i.addr == CFG_ADDR_CTRL)     cfg_rdata_o = CFG_DATA_W'(enable_q);
      else if (cfg_i.addr == CFG_ADDR_MTW) cfg_rdata_o = CFG_DATA_W'(mtw_q);
      else                                 cfg_rdata_o = CFG_DATA_W'(at_q[at_idx]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enable_q <= 1'b1;
      mtw_q    <= MTW_RESET;
      at_q     <= {N_GUARD{AT_RESET}};
    end else if (allowed && cfg_i.write) begin
      if (cfg_i.addr == CFG_ADDR_CTRL)     enable_q       <= cfg_i.wdata[0];
      else if (cfg_i.addr == CFG_ADDR_MTW) mtw_q          <= cfg_i.wdata[CLK_CNT_W-1:0];
      else                                 at_q[at_idx]   <= cfg_i.wdata[TGL_CNT_W-1:0];
    end
  end

  assign enable_o = enable_q;
  assign mtw_o    = mtw_q;
  assign at_o     = at_q;

  // An access that is not privileged must never change a register.
  a_no_unpriv_write: assert property (@(posedge clk) disable iff (!rst_n)
      (cfg_i.valid && cfg_i.write && !cfg_i.priv) |=>
        ($stable(enable_q) && $stable(mtw_q) && $stable(at_q)));

endmodule
