// tb_r2d2_demo_top: end-to-end test of the Trojan, its payload and the detector,
// with every parameter at its default (256-cycle window, 64-toggle threshold) and
// a 150 MHz clock. The testbench plays the core: it writes the CPSR and R0
// through the top's ports as instructions would, and it plays the operating
// system, which stops the running program when the interrupt request rises.
//
// Phases:
//  1. Normal workload: flag updates, MSR writes, a switch to VLIW mode and back,
//     fetched packets with an occasional branch (Bp_en must follow them),
//     branches resolved in EX1 with some mispredictions (each must request a
//     flush, restart address and BTB correction), and CPSR_J written only rarely. No alarm may rise and the Trojan must not
//     fire. An unprivileged attempt to disable the detector must be rejected.
//  2. Attack with detection on: the trigger code of the demonstration (clear R0,
//     then write J = 0, J = 1 two hundred times, then read R0) toggles J at
//     20 MHz, starting at a window boundary. The interrupt must rise one cycle
//     after the 64th toggle of the window. The handler stops the program there.
//     The Trojan must never fire and R0 must stay 0.
//  3. Privileged software turns detection off and the attack is repeated until
//     R0 reads non-zero. The Trojan must fire after about 180 rising edges of J,
//     and R0 must become 1 through the payload. The alarm must stay inactive.
// The test counts each mechanism it sees (window restarts, alarms, rejected
// accesses, mode switches, Trojan firing, payload writes). It counts a failure
// for any mechanism that never happened.
`timescale 1ns / 1ps
module tb_r2d2_demo_top;
  import r2d2_pkg::*;
  import cpsr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic msr_we = 0, flags_we = 0, q_set = 0, ge_we = 0, j_we = 0, j_wdata = 0, r0_we = 0;
  logic fetch_valid = 0, bp_en, exp_bp_en = 0;
  logic [255:0] fetch_packet = '0;
  logic ex1_valid = 0, ex1_pt = 0, ex1_at = 0;
  logic [31:0] ex1_pc = '0, ex1_fall = '0, ex1_ptgt = '0, ex1_atgt = '0;
  logic fault_req, btb_update, btb_taken;
  logic [31:0] redirect_pc, btb_pc, btb_target;
  msr_mask_t msr_mask = '0;
  logic [31:0] msr_wdata = '0, r0_wdata = '0;
  logic [3:0] flags_nzcv = '0, ge_wdata = '0;
  cfg_req_t cfg = '0;
  logic [31:0] cfg_rdata, cpsr, r0;
  logic cfg_err, vliw, detect_n, irq, trojan_n;

  int checks = 0, failures = 0;
  int n_window_end = 0, n_alarm = 0, n_reject = 0, n_mode_switch = 0,
      n_trojan_fire = 0, n_payload = 0, n_disable = 0, n_bp_en = 0, n_mispredict = 0;
  int j_toggles = 0, j_rises = 0;
  logic prev_j = 1'b0, prev_trojan = 1'b1, prev_irq = 1'b0, prev_vliw = 1'b0;
  logic [31:0] prev_r0 = '0;
  logic prev_detect_n = 1'b1;
  int cyc = 0;            // rising edges since reset; windows end when cyc % 256 == 255
  int toggles_at_alarm = 0, t = 0;
  bit alarm_armed = 0;    // phase 2: record the toggle count at the alarm
  bit killed = 0;         // set by the "operating system" when it stops the program

  r2d2_demo_top dut (
    .clk, .rst_n, .msr_we, .msr_mask, .msr_wdata, .flags_we, .flags_nzcv, .q_set,
    .ge_we, .ge_wdata, .j_we, .j_wdata, .r0_we, .r0_wdata,
    .fetch_valid_i(fetch_valid), .fetch_packet_i(fetch_packet), .bp_en_o(bp_en), .cfg_i(cfg),
    .ex1_branch_valid_i(ex1_valid), .ex1_branch_pc_i(ex1_pc), .ex1_fallthrough_pc_i(ex1_fall),
    .ex1_pred_taken_i(ex1_pt), .ex1_pred_target_i(ex1_ptgt), .ex1_actual_taken_i(ex1_at),
    .ex1_actual_target_i(ex1_atgt), .fault_req_o(fault_req), .redirect_pc_o(redirect_pc),
    .btb_update_o(btb_update), .btb_pc_o(btb_pc), .btb_taken_o(btb_taken), .btb_target_o(btb_target),
    .cfg_rdata_o(cfg_rdata), .cfg_err_o(cfg_err), .cpsr_o(cpsr), .vliw_mode_o(vliw),
    .r0_o(r0), .attack_detect_n_o(detect_n), .irq_o(irq), .trojan_trigger_n_o(trojan_n));

  always #3.333 clk = ~clk;   // 150 MHz

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // Event counters, sampled at every rising edge.
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (detect_n && !prev_detect_n) n_window_end++;  // alarm released by a window restart
    if (irq && !prev_irq) begin
      n_alarm++;
      if (alarm_armed) toggles_at_alarm = j_toggles - t;
    end
    if (vliw != prev_vliw) n_mode_switch++;
    if (!trojan_n && prev_trojan) n_trojan_fire++;
    if (r0 == 32'd1 && prev_r0 == 32'd0 && !trojan_n) n_payload++;
    if (cpsr[CPSR_J] != prev_j) begin
      j_toggles++;
      if (cpsr[CPSR_J]) j_rises++;
    end
    check(irq == !detect_n, "irq follows the detection output");
    prev_detect_n = detect_n;
    prev_j = cpsr[CPSR_J]; prev_trojan = trojan_n; prev_irq = irq;
    prev_vliw = vliw; prev_r0 = r0;
  end

  // The operating system: on an interrupt, the attacking program is killed.
  always @(posedge clk) if (irq) killed = 1;

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic cfg_access(input bit wr, input bit priv, input int a, input int d);
    @(negedge clk) cfg = '{valid: 1'b1, write: wr, priv: priv, addr: 4'(a), wdata: 32'(d)};
    #0.1;
    if (!priv) begin check(cfg_err, "unprivileged access rejected"); n_reject++; end
    @(negedge clk) cfg = '0;
  endtask

  task automatic write_j(input logic v);
    @(negedge clk) begin j_we = 1'b1; j_wdata = v; end
    @(negedge clk) j_we = 1'b0;
  endtask

  task automatic write_r0(input logic [31:0] v);
    @(negedge clk) begin r0_we = 1'b1; r0_wdata = v; end
    @(negedge clk) r0_we = 1'b0;
  endtask

  // One pass of the trigger code: 200 iterations of J <- 0, J <- 1. The loop
  // period alternates between 7 and 8 cycles, 50 ns on average at 150 MHz, so J
  // toggles at 20 MHz. Returns early if the program has been killed.
  task automatic trigger_code_pass();
    for (int i = 0; i < 200 && !killed; i++) begin
      write_j(1'b0); tick(1);
      if (killed) break;
      write_j(1'b1); tick(2 + i % 2);
    end
  endtask

  bit success;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---- 1. normal workload ----
    cfg_access(1'b0, 1'b1, 1, 0);
    check(cfg_rdata == 32'd255, "MTW resets to a 256-cycle window");
    cfg_access(1'b1, 1'b0, 0, 0);      // user program tries to turn detection off
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      flags_we = ($urandom % 4) == 0; flags_nzcv = 4'($urandom);
      ge_we = ($urandom % 16) == 0; ge_wdata = 4'($urandom);
      msr_we = 1'b0;
      if (k == 500 || k == 2000) begin  // switch to VLIW and back
        msr_we = 1'b1; msr_mask = '{nzcvq: 0, s: 1, g: 0};
        msr_wdata = (k == 500) ? 32'h0080_0000 : 32'h0;
      end
      j_we = (k % 700) == 0; j_wdata = ~cpsr[CPSR_J];
      // Fetch a packet every 8 cycles: MOV r0, r0 in every lane, and in one
      // packet out of 25 a B instruction (0xEA000000) in a random lane.
      check(bp_en == exp_bp_en, "Bp_en follows the fetched packets");
      if (bp_en) n_bp_en++;
      fetch_valid = (k % 8) == 0;
      if (fetch_valid) begin
        automatic int lane = $urandom % 8;
        automatic bit br = ($urandom % 25) == 0;
        fetch_packet = {8{32'hE1A0_0000}};
        if (br) fetch_packet[lane*32 +: 32] = 32'hEA00_0000;
        exp_bp_en = br;
      end
      // Resolve a branch in EX1 every 16 cycles; one prediction in 8 is wrong.
      ex1_valid = (k % 16) == 0;
      ex1_pc = 32'h1000 + 32'(k) * 4; ex1_fall = ex1_pc + 4;
      ex1_at = 1'($urandom); ex1_atgt = 32'h8000 + 32'(k);
      ex1_pt = ex1_at; ex1_ptgt = ex1_atgt;
      if (($urandom % 8) == 0) ex1_pt = ~ex1_at;
      #0.1;
      check(fault_req == (ex1_valid && ex1_pt != ex1_at), "misprediction flagged at EX1");
      if (fault_req) begin
        n_mispredict++;
        check(redirect_pc == (ex1_at ? ex1_atgt : ex1_fall), "restart address");
        check(btb_update && btb_pc == ex1_pc && btb_taken == ex1_at, "BTB correction");
      end
    end
    fetch_valid = 1'b0;
    ex1_valid = 1'b0;
    @(negedge clk) {flags_we, ge_we, msr_we, j_we} = '0;
    check(n_alarm == 0, "no alarm under the normal workload");
    check(trojan_n == 1'b1, "Trojan quiet under the normal workload");
    check(vliw == 1'b0, "back in superscalar mode");
    tick(50);

    // ---- 2. attack with detection on ----
    write_r0(32'd0);
    // The window counter starts at the first edge after reset and MTW is 255, so
    // a window starts at every edge where cyc is a multiple of 256.
    while (cyc % 256 != 0) @(negedge clk);
    t = j_toggles;
    alarm_armed = 1;
    trigger_code_pass();
    alarm_armed = 0;
    check(killed, "attack program was stopped by the interrupt");
    if (killed) begin
      wait (detect_n);  // the alarm ends with the window
      @(negedge clk);
      check(cyc % 256 == 0, "alarm released at the window boundary");
    end
    $display("alarm after %0d toggles of CPSR_J", toggles_at_alarm);
    // The alarm flop is set at the edge that samples toggle 64; the event
    // counter sees that toggle one edge earlier.
    check(toggles_at_alarm == 64, "alarm at the 64th toggle of the window");
    tick(3000);                        // 20 us: let any Trojan charge leak away
    check(n_trojan_fire == 0, "Trojan never fired with detection on");
    check(r0 == 32'd0, "R0 untouched with detection on");

    // ---- 3. detection off, attack succeeds ----
    cfg_access(1'b1, 1'b1, 0, 0);
    n_disable++;
    killed = 0;
    success = 0;
    t = j_rises;
    while (!success) begin
      write_r0(32'd0);
      trigger_code_pass();
      tick(4);
      if (r0 != 32'd0) success = 1;
    end
    check(n_alarm == 1, "no further alarm with detection off");
    check(r0 == 32'd1, "payload wrote 1 into R0");
    tick(100);
    $display("mechanisms: window_end=%0d alarm=%0d reject=%0d mode_switch=%0d disable=%0d trojan_fire=%0d payload=%0d bp_en_cycles=%0d mispredict=%0d",
             n_window_end, n_alarm, n_reject, n_mode_switch, n_disable, n_trojan_fire, n_payload, n_bp_en, n_mispredict);
    check(n_window_end > 0, "window restart happened");
    check(n_alarm > 0, "detection happened");
    check(n_reject > 0, "unprivileged access rejected");
    check(n_mode_switch > 0, "mode switch happened");
    check(n_disable > 0, "detection disabled by privileged software");
    check(n_trojan_fire > 0, "Trojan fired");
    check(n_payload > 0, "payload changed R0");
    check(n_bp_en > 0, "branch prediction enabled");
    check(n_mispredict > 0, "misprediction flush requested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rising edges of J from the start of phase 3 until the Trojan fires.
  always @(negedge trojan_n) if (n_disable > 0) begin
    $display("Trojan fired after %0d rising edges of CPSR_J", j_rises - t);
    check(j_rises - t >= 170 && j_rises - t <= 200, "Trojan fires after about 180 toggling events");
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
