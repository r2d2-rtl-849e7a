// bp_control_unit: branch prediction control unit of the core's EX1 stage.
//
// A branch is predicted at the first pipeline stage (PCG), and its real
// outcome is known in EX1. This unit compares the prediction that travelled down
// the pipe with the branch unit's result. The prediction is wrong if the
// direction differs, or if both say taken but the targets differ. When it is
// wrong, the unit raises a fault request. The pipeline is flushed and fetch
// restarts at the correct address: the branch target if the branch is taken,
// otherwise the instruction after the branch. The unit also asks the branch
// target buffer (BTB) to correct its entry for this branch.
//
// The compare-then-flush-then-correct-BTB flow is that of the core. These are
// this design's choices: the port list, the fall-through address supplied by
// the pipe, updating the BTB only on a misprediction, and the combinational
// timing.
//
// Timing: purely combinational. All outputs are valid in the same cycle as
// branch_valid_i, while the branch is in EX1.
`timescale 1ns / 1ps
module bp_control_unit #(
  parameter int unsigned PC_W = 32
) (
  input  logic            branch_valid_i,    // a branch is in EX1 this cycle
  input  logic [PC_W-1:0] branch_pc_i,       // address of the branch
  input  logic [PC_W-1:0] fallthrough_pc_i,  // address of the next instruction
  input  logic            pred_taken_i,      // predicted direction
  input  logic [PC_W-1:0] pred_target_i,     // predicted target
  input  logic            actual_taken_i,    // correct direction, from the branch unit
  input  logic [PC_W-1:0] actual_target_i,   // correct target, from the branch unit
  output logic            fault_req_o,       // misprediction: flush and redirect
  output logic [PC_W-1:0] redirect_pc_o,     // where fetch restarts
  output logic            btb_update_o,      // correct the BTB entry
  output logic [PC_W-1:0] btb_pc_o,
  output logic            btb_taken_o,
  output logic [PC_W-1:0] btb_target_o
);

  logic dir_wrong, target_wrong;

  always_comb begin
    dir_wrong     = (pred_taken_i != actual_taken_i);
    target_wrong  = pred_taken_i && actual_taken_i && (pred_target_i != actual_target_i);
    fault_req_o   = branch_valid_i && (dir_wrong || target_wrong);
    redirect_pc_o = actual_taken_i ? actual_target_i : fallthrough_pc_i;
    btb_update_o  = fault_req_o;
    btb_pc_o      = branch_pc_i;
    btb_taken_o   = actual_taken_i;
    btb_target_o  = actual_target_i;
  end

endmodule
