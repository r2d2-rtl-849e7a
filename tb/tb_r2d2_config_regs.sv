// tb_r2d2_config_regs: self-checking test of the privileged configuration registers.
// With three channels, the test checks the reset values (enabled, window 255,
// thresholds 63). It checks that privileged writes and reads of every register
// work, and that unprivileged writes change nothing and raise the error flag.
// It also checks that unprivileged reads return 0, and that unmapped addresses
// are rejected. A shadow copy of the registers, kept by the testbench, is the
// reference.
`timescale 1ns / 1ps
module tb_r2d2_config_regs;
  import r2d2_pkg::*;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  cfg_req_t req;
  logic [31:0] rdata;
  logic err, enable;
  logic [7:0] mtw;
  logic [N-1:0][5:0] at;
  int checks = 0, failures = 0;
  logic        sh_en;
  logic [7:0]  sh_mtw;
  logic [5:0]  sh_at [N];

  r2d2_config_regs #(.N_GUARD(N)) dut (
    .clk, .rst_n, .cfg_i(req), .cfg_rdata_o(rdata), .cfg_err_o(err),
    .enable_o(enable), .mtw_o(mtw), .at_o(at));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic check_outputs();
    check(enable == sh_en, "enable_o");
    check(mtw == sh_mtw, $sformatf("mtw_o %0d exp %0d", mtw, sh_mtw));
    for (int i = 0; i < N; i++) check(at[i] == sh_at[i], $sformatf("at_o[%0d] %0d exp %0d", i, at[i], sh_at[i]));
  endtask

  function automatic logic [31:0] shadow(input int a);
    if (a == 0) return 32'(sh_en);
    if (a == 1) return 32'(sh_mtw);
    return 32'(sh_at[a-2]);
  endfunction

  task automatic access(input bit wr, input bit priv, input int a, input logic [31:0] d);
    bit mapped = (a < 2 + N);
    @(negedge clk);
    req = '{valid: 1'b1, write: wr, priv: priv, addr: 4'(a), wdata: d};
    #1;
    check(err == !(priv && mapped), $sformatf("err for wr=%0b priv=%0b addr=%0d", wr, priv, a));
    if (!wr) check(rdata == ((priv && mapped) ? shadow(a) : 32'd0), $sformatf("rdata addr %0d = %0h", a, rdata));
    else check(rdata == 32'd0, "rdata 0 on write");
    if (wr && priv && mapped) begin
      if (a == 0) sh_en = d[0];
      else if (a == 1) sh_mtw = d[7:0];
      else sh_at[a-2] = d[5:0];
    end
    @(negedge clk);
    req = '0;
    #1 check(err == 1'b0, "no error when idle");
    check_outputs();
  endtask

  initial begin
    req = '0;
    sh_en = 1'b1; sh_mtw = 8'd255;
    for (int i = 0; i < N; i++) sh_at[i] = 6'd63;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1 check_outputs();
    for (int a = 0; a < 2 + N; a++) access(1'b0, 1'b1, a, 0);
    // Unprivileged software tries to disable detection and to retune it.
    access(1'b1, 1'b0, 0, 32'd0);
    access(1'b1, 1'b0, 1, 32'd3);
    access(1'b1, 1'b0, 3, 32'd1);
    access(1'b0, 1'b0, 1, 0);
    // Privileged programming.
    access(1'b1, 1'b1, 1, 32'd99);
    access(1'b1, 1'b1, 2, 32'd7);
    access(1'b1, 1'b1, 3, 32'd20);
    access(1'b1, 1'b1, 4, 32'd41);
    access(1'b1, 1'b1, 0, 32'd0);
    access(1'b1, 1'b1, 7, 32'd5);     // unmapped
    access(1'b0, 1'b1, 15, 0);       // unmapped
    repeat (200) access(1'($urandom), 1'($urandom), $urandom % (3 + N), $urandom);
    for (int a = 0; a < 2 + N; a++) access(1'b0, 1'b1, a, 0);
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
