// cpsr_reg: the Current Program Status Register of the Merlin ARM-compatible core.
//
// The register holds what the core implements of the CPSR: the condition flags
// N, Z, C and V, the sticky saturation flag Q and the GE[3:0] flags (together the
// APSR), plus Merlin's mode-switch bit S (CPSR[23]), and CPSR_J. The core runs
// only in user mode, so M[4:0] always reads as user mode. IT, T, E, A, I and F
// read as 0.
//
// Writes come from three sources. An MSR instruction writes the fields selected
// in msr_mask. An instruction that sets flags updates NZCV, sets Q, or writes GE.
// A separate write port sets CPSR_J, because J has no function in a core without
// Jazelle. J still toggles when software writes it; this is what makes it a usable
// Trojan trigger, and it is the signal the R2D2 detector guards. If an MSR write
// and a flag update fall in the same cycle, the MSR wins for the fields it writes;
// this priority is this design's choice. Q is sticky: only an MSR can clear it.
//
// Timing: every write takes effect at the next rising clock edge. Reset is
// synchronous and active low and clears all bits (superscalar mode, J = 0).
`timescale 1ns / 1ps
module cpsr_reg
  import cpsr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        msr_we,
  input  msr_mask_t   msr_mask,
  input  logic [31:0] msr_wdata,
  input  logic        flags_we,
  input  logic [3:0]  flags_nzcv,
  input  logic        q_set,
  input  logic        ge_we,
  input  logic [3:0]  ge_wdata,
  input  logic        j_we,
  input  logic        j_wdata,
  output logic [31:0] cpsr_o,
  output logic        s_o,
  output logic        j_o
);

  logic [3:0] nzcv_q;
  logic       q_q;
  logic [3:0] ge_q;
  logic       s_q;
  logic       j_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nzcv_q <= '0;
      q_q    <= 1'b0;
      ge_q   <= '0;
      s_q    <= 1'b0;
      j_q    <= 1'b0;
    end else begin
      if (msr_we && msr_mask.nzcvq) begin
        nzcv_q <= msr_wdata[CPSR_N:CPSR_V];
        q_q    <= msr_wdata[CPSR_Q];
      end else begin
        if (flags_we) nzcv_q <= flags_nzcv;
        if (q_set)    q_q    <= 1'b1;
      end
      if (msr_we && msr_mask.g)  ge_q <= msr_wdata[CPSR_GE_LSB+3:CPSR_GE_LSB];
      else if (ge_we)            ge_q <= ge_wdata;
      if (msr_we && msr_mask.s)  s_q  <= msr_wdata[CPSR_S];
      if (j_we)                  j_q  <= j_wdata;
    end
  end

  always_comb begin
    cpsr_o = '0;
    cpsr_o[CPSR_N:CPSR_V]                  = nzcv_q;
    cpsr_o[CPSR_Q]                         = q_q;
    cpsr_o[CPSR_J]                         = j_q;
    cpsr_o[CPSR_S]                         = s_q;
    cpsr_o[CPSR_GE_LSB+3:CPSR_GE_LSB]      = ge_q;
    cpsr_o[4:0]                            = MODE_USR;
  end

  assign s_o = s_q;
  assign j_o = j_q;

endmodule
