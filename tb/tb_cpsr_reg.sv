// tb_cpsr_reg: self-checking test of the CPSR/APSR register.
// Random MSR writes with random field masks, flag updates, Q saturation, GE
// writes and J writes are applied. The register must match a model held in the
// testbench: MSR wins over a flag update for the fields it writes, Q is sticky,
// M[4:0] reads as user mode and the unimplemented bits read 0. Directed steps
// check that S selects VLIW mode and that J alternates under the trigger code's
// write pattern.
`timescale 1ns / 1ps
module tb_cpsr_reg;
  import cpsr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic msr_we = 0, flags_we = 0, q_set = 0, ge_we = 0, j_we = 0, j_wdata = 0;
  msr_mask_t msr_mask = '0;
  logic [31:0] msr_wdata = '0, cpsr;
  logic [3:0] flags_nzcv = '0, ge_wdata = '0;
  logic s, j;
  int checks = 0, failures = 0;
  logic [31:0] model;

  cpsr_reg dut (.clk, .rst_n, .msr_we, .msr_mask, .msr_wdata, .flags_we, .flags_nzcv,
    .q_set, .ge_we, .ge_wdata, .j_we, .j_wdata, .cpsr_o(cpsr), .s_o(s), .j_o(j));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // Model update written with explicit masks rather than field names.
  task automatic apply();
    logic [31:0] m = 32'h0;
    if (msr_we && msr_mask.nzcvq) m |= 32'hF800_0000;
    if (msr_we && msr_mask.s)     m |= 32'h0080_0000;
    if (msr_we && msr_mask.g)     m |= 32'h000F_0000;
    model = (model & ~m) | (msr_wdata & m);
    if (flags_we && !(msr_we && msr_mask.nzcvq)) model[31:28] = flags_nzcv;
    if (q_set && !(msr_we && msr_mask.nzcvq))    model[27] = 1'b1;
    if (ge_we && !(msr_we && msr_mask.g))        model[19:16] = ge_wdata;
    if (j_we) model[24] = j_wdata;
  endtask

  task automatic cycle();
    apply();
    @(negedge clk);
    #1;
    check(cpsr == model, $sformatf("cpsr %08h exp %08h", cpsr, model));
    check(s == model[23] && j == model[24], "s_o / j_o");
    {msr_we, flags_we, q_set, ge_we, j_we} = '0;
  endtask

  initial begin
    model = 32'h0000_0010;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1 check(cpsr == 32'h0000_0010, "reset value, user mode");
    // Mode switch to VLIW and back.
    msr_we = 1; msr_mask = '{nzcvq: 0, s: 1, g: 0}; msr_wdata = 32'h0080_0000; cycle();
    check(s == 1'b1, "S set selects VLIW");
    msr_we = 1; msr_mask = '{nzcvq: 0, s: 1, g: 0}; msr_wdata = 32'h0; cycle();
    // Trigger code: J written 0, 1, 0, 1 ...
    for (int i = 0; i < 20; i++) begin
      j_we = 1; j_wdata = i[0]; cycle();
      check(j == i[0], "J follows writes");
    end
    // Q is sticky.
    q_set = 1; cycle();
    flags_we = 1; flags_nzcv = 4'b1010; cycle();
    check(cpsr[27] == 1'b1, "Q sticky after flag update");
    repeat (500) begin
      msr_we = 1'($urandom); msr_mask = 3'($urandom); msr_wdata = $urandom;
      flags_we = 1'($urandom); flags_nzcv = 4'($urandom); q_set = ($urandom % 8) == 0;
      ge_we = 1'($urandom); ge_wdata = 4'($urandom); j_we = 1'($urandom); j_wdata = 1'($urandom);
      cycle();
    end
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
