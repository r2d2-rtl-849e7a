// r2d2_demo_top: the Trojan and its detector as built into the demonstration chip.
//
// Main idea: an A2 analog Trojan taps CPSR_J. This status bit has no function in
// a core without Jazelle, so normal code never toggles it, but any user program
// can write it. A program that writes J alternately 0 and 1 pumps the Trojan's
// capacitor until it fires, and the payload then overwrites core register R0.
// The R2D2 detector guards the same bit. It counts J's toggles in every window of
// T_M cycles. Once A_TH toggles fall in one window, it drops attack_detect_n_o and
// raises irq_o. With the chip's values (256 cycles, 64 toggles), it does so after
// about 32 Trojan charge steps. That is far fewer than the roughly 180 the Trojan
// needs, so an interrupt handler that stops the attacking program prevents the
// attack. When privileged software turns detection off, the attack succeeds.
//
// The parts of the core that are not built (pipeline, dispatch, functional units,
// caches) are replaced by ports. These ports write the CPSR (MSR, flag updates,
// J) and R0 the way executing instructions would. The fetch ports feed the
// branch prediction enable (Bp_en), and the EX1 ports feed the branch
// prediction control unit, whose flush and BTB correction are brought out.
// Bp_en is another rarely toggling candidate trigger; like the demonstration
// chip, this top guards only CPSR_J and brings Bp_en out. The interrupt request
// and the detector's configuration bus are brought out for the surrounding
// core. The Trojan's trigger output is also brought out, for observation.
//
// The Trojan is an analog behavioural model, so this top simulates but is not
// synthesizable as a whole. Every other block in it is synthesizable. Timing:
// the CPSR and R0 change on rising clock edges. See r2d2_detector for detection
// latency and r0_payload for payload latency.
`timescale 1ns / 1ps
module r2d2_demo_top
  import r2d2_pkg::*;
  import cpsr_pkg::*;
#(
  parameter int unsigned T_M  = DEFAULT_T_M,
  parameter int unsigned A_TH = DEFAULT_A_TH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // CPSR writes by executing instructions
  input  logic                  msr_we,
  input  msr_mask_t             msr_mask,
  input  logic [31:0]           msr_wdata,
  input  logic                  flags_we,
  input  logic [3:0]            flags_nzcv,
  input  logic                  q_set,
  input  logic                  ge_we,
  input  logic [3:0]            ge_wdata,
  input  logic                  j_we,
  input  logic                  j_wdata,
  // R0 writes
  input  logic                  r0_we,
  input  logic [31:0]           r0_wdata,
  // fetched instruction packets
  input  logic                  fetch_valid_i,
  input  logic [255:0]          fetch_packet_i,
  // branch in EX1
  input  logic                  ex1_branch_valid_i,
  input  logic [31:0]           ex1_branch_pc_i,
  input  logic [31:0]           ex1_fallthrough_pc_i,
  input  logic                  ex1_pred_taken_i,
  input  logic [31:0]           ex1_pred_target_i,
  input  logic                  ex1_actual_taken_i,
  input  logic [31:0]           ex1_actual_target_i,
  // detector configuration
  input  cfg_req_t              cfg_i,
  output logic [CFG_DATA_W-1:0] cfg_rdata_o,
  output logic                  cfg_err_o,
  // state and alarms
  output logic [31:0]           cpsr_o,
  output logic                  vliw_mode_o,
  output logic                  bp_en_o,
  output logic                  fault_req_o,
  output logic [31:0]           redirect_pc_o,
  output logic                  btb_update_o,
  output logic [31:0]           btb_pc_o,
  output logic                  btb_taken_o,
  output logic [31:0]           btb_target_o,
  output logic [31:0]           r0_o,
  output logic                  attack_detect_n_o,
  output logic                  irq_o,
  output logic                  trojan_trigger_n_o
);

  logic cpsr_j;

  cpsr_reg u_cpsr (
    .clk, .rst_n, .msr_we, .msr_mask, .msr_wdata, .flags_we, .flags_nzcv,
    .q_set, .ge_we, .ge_wdata, .j_we, .j_wdata,
    .cpsr_o, .s_o(vliw_mode_o), .j_o(cpsr_j)
  );

  a2_trojan u_trojan (
    .trigger_in (cpsr_j),
    .trigger_out(trojan_trigger_n_o)
  );

  r0_payload u_r0 (
    .clk, .rst_n, .we(r0_we), .wdata(r0_wdata),
    .trigger_n(trojan_trigger_n_o), .r0_o
  );

  bp_enable u_bp_enable (
    .clk, .rst_n, .packet_valid_i(fetch_valid_i), .packet_i(fetch_packet_i),
    .bp_en_o, .lane_mask_o()
  );

  bp_control_unit u_bp_control (
    .branch_valid_i(ex1_branch_valid_i), .branch_pc_i(ex1_branch_pc_i),
    .fallthrough_pc_i(ex1_fallthrough_pc_i), .pred_taken_i(ex1_pred_taken_i),
    .pred_target_i(ex1_pred_target_i), .actual_taken_i(ex1_actual_taken_i),
    .actual_target_i(ex1_actual_target_i), .fault_req_o, .redirect_pc_o,
    .btb_update_o, .btb_pc_o, .btb_taken_o, .btb_target_o
  );

  r2d2_detector #(
    .N_GUARD(1),
    .T_M    (T_M),
    .A_TH   (A_TH)
  ) u_detector (
    .clk, .rst_n, .guard_i(cpsr_j), .cfg_i, .cfg_rdata_o, .cfg_err_o,
    .detect_n_o(attack_detect_n_o), .irq_o
  );

endmodule
