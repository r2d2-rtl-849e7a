// bp_enable: branch prediction enable (Bp_en) from a fetched instruction packet.
//
// The core fetches a 256-bit instruction packet each time: eight 32-bit ARM
// instructions. The branch predictor only has work to do when the packet holds
// a branch, so Bp_en is raised only for such packets. Bp_en therefore toggles
// rarely under normal code, but a program dense in branches can make it toggle
// often. That makes it another candidate trigger signal, and another signal
// worth guarding.
//
// Each lane is decoded in parallel. The encodings recognised as branches are
// taken from the ARMv7 A32 instruction set: B, BL and BLX (immediate), where
// bits [27:25] are 101, and BX, BXJ and BLX (register), where bits [27:4] are
// 0x12FFF1, 0x12FFF2 or 0x12FFF3 and the condition is not 1111. Other
// instructions that write the PC are not counted. The packet width and the
// enable-on-branch rule follow the core's description. The set of encodings,
// the per-lane mask output and registering Bp_en are this design's choices.
//
// Timing: the packet is sampled on the rising edge while packet_valid_i is
// high. bp_en_o and lane_mask_o are registered and valid in the following cycle.
// When no packet arrives, they hold their last values. Reset clears both.
`timescale 1ns / 1ps
module bp_enable #(
  parameter int unsigned PACKET_BITS = 256,
  parameter int unsigned INSN_BITS   = 32,
  parameter int unsigned LANES       = PACKET_BITS / INSN_BITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   packet_valid_i,
  input  logic [PACKET_BITS-1:0] packet_i,
  output logic                   bp_en_o,
  output logic [LANES-1:0]       lane_mask_o
);

  logic [LANES-1:0] is_branch;

  function automatic logic decode_branch(input logic [31:0] insn);
    logic direct, indirect;
    direct   = (insn[27:25] == 3'b101);
    indirect = (insn[31:28] != 4'hF) &&
               ((insn[27:4] == 24'h12FFF1) || (insn[27:4] == 24'h12FFF2) ||
                (insn[27:4] == 24'h12FFF3));
    return direct || indirect;
  endfunction

  always_comb begin
    for (int l = 0; l < LANES; l++)
      is_branch[l] = decode_branch(packet_i[l*INSN_BITS +: 32]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bp_en_o     <= 1'b0;
      lane_mask_o <= '0;
    end else if (packet_valid_i) begin
      bp_en_o     <= |is_branch;
      lane_mask_o <= is_branch;
    end
  end

endmodule
