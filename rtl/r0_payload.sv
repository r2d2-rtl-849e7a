// r0_payload: core register R0 with the demonstration Trojan's payload attached.
//
// Software writes R0 as usual. When the A2 Trojan fires, its trigger output goes
// low, and R0 is then forced to PAYLOAD_VALUE (1) for as long as the trigger stays
// active. The forced value wins over any write. The trigger code can therefore see
// that the attack succeeded by clearing R0 and reading it back.
//
// The trigger output comes from an analog circuit and is asynchronous to clk. Two
// flops synchronise it, so R0 changes two or three clock edges after the trigger
// output falls. The effect of the payload (R0 changes from 0 to 1) follows the
// demonstration. The synchroniser, the override priority and the reset value of 0
// are this design's choices.
`timescale 1ns / 1ps
module r0_payload #(
  parameter logic [31:0] PAYLOAD_VALUE = 32'd1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [31:0] wdata,
  input  logic        trigger_n,
  output logic [31:0] r0_o
);

  logic [1:0]  trig_sync_q;  // [1] is the synchronised, active-high trigger
  logic [31:0] r0_q;

  always_ff @(posedge clk) begin
    if (!rst_n) trig_sync_q <= '0;
    else        trig_sync_q <= {trig_sync_q[0], !trigger_n};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)              r0_q <= '0;
    else if (trig_sync_q[1]) r0_q <= PAYLOAD_VALUE;
    else if (we)             r0_q <= wdata;
  end

  assign r0_o = r0_q;

endmodule
