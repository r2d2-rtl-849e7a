// tb_bp_control_unit: self-checking test of the EX1 branch check.
// Every combination of predicted and actual direction is tried, with equal and
// differing targets, with and without a valid branch, plus random cases. The
// expected fault request, restart address and BTB update come from a case
// table written out here, not from the unit's own expressions.
`timescale 1ns / 1ps
module tb_bp_control_unit;
  logic valid, pt, at;
  logic [31:0] pc, fall, ptgt, atgt, redirect, bpc, btgt;
  logic fault, upd, btaken;
  int checks = 0, failures = 0, faults = 0;

  bp_control_unit dut (
    .branch_valid_i(valid), .branch_pc_i(pc), .fallthrough_pc_i(fall),
    .pred_taken_i(pt), .pred_target_i(ptgt), .actual_taken_i(at), .actual_target_i(atgt),
    .fault_req_o(fault), .redirect_pc_o(redirect), .btb_update_o(upd),
    .btb_pc_o(bpc), .btb_taken_o(btaken), .btb_target_o(btgt));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // case: 0 not taken / not taken; 1 not taken predicted, taken;
  // 2 taken predicted, not taken; 3 taken / taken, same target;
  // 4 taken / taken, other target.
  task automatic try_case(input int c, input bit v);
    bit exp_fault;
    logic [31:0] exp_pc;
    pc = $urandom & 32'hFFFF_FFFC; fall = pc + 4; atgt = $urandom & 32'hFFFF_FFFC;
    case (c)
      0: begin pt = 0; at = 0; ptgt = $urandom; exp_fault = 0; exp_pc = fall; end
      1: begin pt = 0; at = 1; ptgt = $urandom; exp_fault = 1; exp_pc = atgt; end
      2: begin pt = 1; at = 0; ptgt = $urandom; exp_fault = 1; exp_pc = fall; end
      3: begin pt = 1; at = 1; ptgt = atgt;     exp_fault = 0; exp_pc = atgt; end
      default: begin pt = 1; at = 1; ptgt = atgt ^ 32'h40; exp_fault = 1; exp_pc = atgt; end
    endcase
    valid = v;
    exp_fault = exp_fault && v;
    #1;
    check(fault == exp_fault, $sformatf("fault_req case %0d valid %0b", c, v));
    check(upd == exp_fault, "btb update goes with the fault request");
    if (exp_fault) begin
      faults++;
      check(redirect == exp_pc, $sformatf("redirect %08h exp %08h", redirect, exp_pc));
      check(bpc == pc && btaken == at && btgt == atgt, "BTB correction carries the real outcome");
    end
  endtask

  initial begin
    for (int c = 0; c < 5; c++) begin
      try_case(c, 1'b1);
      try_case(c, 1'b0);
    end
    repeat (500) try_case($urandom % 5, ($urandom % 4) != 0);
    check(faults > 0, "mispredictions seen");
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
