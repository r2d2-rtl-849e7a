// tb_r0_payload: self-checking test of R0 with the Trojan payload.
// The test checks normal writes and reads. It then drops the asynchronous
// trigger at an odd time and checks that R0 becomes 1 within two to three clock
// edges, that writes are overridden while the trigger is active, and that normal
// writes work again once the trigger has risen.
`timescale 1ns / 1ps
module tb_r0_payload;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, trig_n = 1'b1;
  logic [31:0] wdata = '0, r0;
  int checks = 0, failures = 0;

  r0_payload dut (.clk, .rst_n, .we, .wdata, .trigger_n(trig_n), .r0_o(r0));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic write(input logic [31:0] d);
    @(negedge clk) begin we = 1'b1; wdata = d; end
    @(negedge clk) we = 1'b0;
  endtask

  initial begin
    int edges;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1 check(r0 == 32'd0, "reset value");
    for (int i = 0; i < 20; i++) begin
      automatic logic [31:0] d = $urandom;
      write(d);
      check(r0 == d, $sformatf("write %08h read %08h", d, r0));
    end
    write(32'd0);
    // Trojan fires between two edges.
    #3.3 trig_n = 1'b0;
    edges = 0;
    while (r0 != 32'd1 && edges < 10) begin @(posedge clk); #1 edges++; end
    check(r0 == 32'd1, "payload sets R0 to 1");
    check(edges >= 2 && edges <= 3, $sformatf("payload latency %0d edges", edges));
    write(32'h1234_5678);
    check(r0 == 32'd1, "payload overrides writes");
    trig_n = 1'b1;
    repeat (3) @(posedge clk);
    write(32'hCAFE_0000);
    check(r0 == 32'hCAFE_0000, "writes work after the trigger rises");
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
