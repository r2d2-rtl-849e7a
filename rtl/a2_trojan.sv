// a2_trojan: behavioural model of the A2 analog Trojan. It is not synthesizable.
//
// The real part is a few transistors. A small capacitor C_unit is charged to VDD
// while the trigger input is low. On each rising edge of the trigger input,
// C_unit shares its charge with a larger capacitor C_main, which raises C_main's
// voltage by a fraction C_unit / (C_unit + C_main) of the remaining headroom. C_main
// discharges slowly through a leakage transistor. Only sustained fast toggling
// can therefore pump C_main above the switching threshold of an imbalanced
// inverter, and the inverter's output is the trigger output. That output is
// therefore high when idle and drops low when the Trojan fires. It rises again
// once the capacitor has leaked back below the threshold.
//
// The model follows this charge-sharing and leakage behaviour. The capacitances,
// leakage rate, supply and threshold are this design's calibration, not measured
// values. They give firing after about 180 rising edges of a 20 MHz trigger input
// (about 9 us), and they keep the output fired for about 15 us after toggling
// stops from saturation. Those are the times reported for the fabricated Trojan.
// Leakage is modelled as a constant discharge rate, applied every LEAK_STEP_NS.
//
// Ports: trigger_in (the tapped digital signal), trigger_out (active low).
`timescale 1ns / 1ps
module a2_trojan #(
  parameter real C_UNIT        = 1.0,     // fF
  parameter real C_MAIN        = 186.0,   // fF
  parameter real VDD           = 1.2,     // V
  parameter real V_TH          = 0.6,     // inverter switching threshold, V
  parameter real LEAK_V_PER_NS = 2.5e-5,  // discharge of C_main through the leak path
  parameter int  LEAK_STEP_NS  = 1
) (
  input  logic trigger_in,
  output logic trigger_out
);

  localparam real SHARE = C_UNIT / (C_UNIT + C_MAIN);

  real v_main;  // voltage on C_main, starts discharged

  // Charge sharing at each rising edge of the trigger input.
  always @(posedge trigger_in) begin
    v_main = v_main + SHARE * (VDD - v_main);
  end

  // Leakage of C_main.
  initial begin
    v_main = 0.0;
    forever begin
      #(LEAK_STEP_NS * 1ns);
      v_main = v_main - LEAK_V_PER_NS * LEAK_STEP_NS;
      if (v_main < 0.0) v_main = 0.0;
    end
  end

  // Imbalanced inverter: low output while C_main is above the threshold.
  always_comb trigger_out = !(v_main > V_TH);

endmodule
