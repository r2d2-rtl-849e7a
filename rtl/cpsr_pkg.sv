// cpsr_pkg: bit positions of the ARMv7-A/R Current Program Status Register as
// implemented in the Merlin core. CPSR[23] is a reserved bit in the
// architecture; Merlin uses it as S, the switch between dual-issue superscalar
// (0) and 6-issue VLIW (1) dispatch. CPSR_J (bit 24) is kept as a writable bit
// without function; it is the signal the demonstration Trojan taps.
`timescale 1ns / 1ps
package cpsr_pkg;
  localparam int unsigned CPSR_N  = 31;
  localparam int unsigned CPSR_Z  = 30;
  localparam int unsigned CPSR_C  = 29;
  localparam int unsigned CPSR_V  = 28;
  localparam int unsigned CPSR_Q  = 27;
  localparam int unsigned CPSR_J  = 24;
  localparam int unsigned CPSR_S  = 23;
  localparam int unsigned CPSR_GE_LSB = 16;  // GE[3:0] = CPSR[19:16]
  localparam logic [4:0]  MODE_USR = 5'b10000;  // M[4:0], user mode

  // Fields an MSR may write in user mode (one mask bit each).
  typedef struct packed {
    logic nzcvq;  // CPSR[31:27]
    logic s;      // CPSR[23], Merlin mode switch
    logic g;      // CPSR[19:16]
  } msr_mask_t;
endpackage
