// tb_bp_enable: self-checking test of the branch prediction enable.
// Random packets are built lane by lane, each lane being a branch of a given
// kind or a random non-branch. The expected lane mask is the record of what
// was inserted, not a decode, and Bp_en must equal its OR one cycle later. The
// test checks packets with no branch, one branch in each lane position, all
// branch kinds, near-miss encodings (BX-like words with a wrong field, BX with
// condition 1111) and the hold when no packet arrives.
`timescale 1ns / 1ps
module tb_bp_enable;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [255:0] packet = '0;
  logic bp_en;
  logic [7:0] mask, exp_mask;
  int checks = 0, failures = 0, enables = 0;

  bp_enable dut (.clk, .rst_n, .packet_valid_i(valid), .packet_i(packet),
                 .bp_en_o(bp_en), .lane_mask_o(mask));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // kind 0: non-branch data processing; 1: B; 2: BL; 3: BLX imm; 4: BX;
  // 5: BLX reg; 6: BXJ; 7: near miss (BX pattern with a wrong bit);
  // 8: BX with condition 1111 (unconditional space, not a branch).
  function automatic logic [31:0] make_insn(input int kind);
    logic [3:0] cond = 4'($urandom % 15);  // 0000..1110
    logic [31:0] r = $urandom;
    case (kind)
      1: return {cond, 4'b1010, r[23:0]};
      2: return {cond, 4'b1011, r[23:0]};
      3: return {4'hF, 3'b101, r[24:0]};
      4: return {cond, 24'h12FFF1, r[3:0]};
      5: return {cond, 24'h12FFF3, r[3:0]};
      6: return {cond, 24'h12FFF2, r[3:0]};
      7: return {cond, 24'h12FFF1 ^ (24'h1 << (4 + $urandom % 20)), r[3:0]};
      8: return {4'hF, 24'h12FFF1, r[3:0]};
      default: return {cond, 3'b000, r[24:0]};  // bits 27:25 = 000: never a branch
    endcase
  endfunction

  function automatic bit kind_is_branch(input int kind);
    return kind >= 1 && kind <= 6;
  endfunction

  task automatic send(input int kinds[8]);
    for (int l = 0; l < 8; l++) begin
      packet[l*32 +: 32] = make_insn(kinds[l]);
      exp_mask[l] = kind_is_branch(kinds[l]);
    end
    valid = 1'b1;
    @(negedge clk);
    valid = 1'b0;
    check(mask == exp_mask, $sformatf("lane mask %b exp %b", mask, exp_mask));
    check(bp_en == |exp_mask, "bp_en");
    if (bp_en) enables++;
  endtask

  initial begin
    int k[8];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(bp_en == 1'b0, "reset");
    // No branch at all.
    k = '{default: 0}; send(k);
    // One branch of each kind in each lane.
    for (int kind = 1; kind <= 6; kind++)
      for (int l = 0; l < 8; l++) begin
        k = '{default: 0}; k[l] = kind; send(k);
      end
    // Near misses never enable.
    for (int i = 0; i < 50; i++) begin
      for (int l = 0; l < 8; l++) k[l] = ($urandom % 2 != 0) ? 7 : 8;
      send(k);
    end
    // Hold without a packet.
    k = '{default: 0}; k[3] = 1; send(k);
    packet = '0;
    repeat (3) @(negedge clk);
    check(bp_en == 1'b1, "holds with no packet");
    // Random mixes, mostly non-branch.
    for (int i = 0; i < 500; i++) begin
      for (int l = 0; l < 8; l++) k[l] = (($urandom % 10) == 0) ? 1 + $urandom % 8 : 0;
      send(k);
    end
    check(enables > 0, "Bp_en raised");
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
