// tb_inv_mulmod: fast inverse modulo 2^16+1. For each operand the result must
// equal the reference inverse, and k (*) inverse must be 1; `done` must come
// exactly 30 clocks after the edge that took `start`. Operands 0 (= 2^16),
// 1 and 0xffff are included, and some operands are issued back to back in the
// clock where `ready` returns during the last multiplication.
module tb_inv_mulmod;
  timeunit 1ns; timeprecision 1ps;
  import idea_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ready, busy, done;
  logic [15:0] k, inv;
  int checks = 0, failures = 0, back_to_back = 0;

  inv_mulmod dut (.clk(clk), .rst_n(rst_n), .start(start), .k(k), .ready(ready), .busy(busy),
                  .done(done), .inv(inv));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [15:0] op, input bit chained);
    int n;
    logic [15:0] exp;
    if (!chained) begin
      while (!ready) @(posedge clk);
      #1;
    end
    k = op; start = 1;
    @(posedge clk); #1;   // edge that takes start
    start = 0;
    n = 0;
    exp = ref_inv(op);
    while (!done) begin
      n++;
      if (n == 30 && ($urandom % 2 == 0)) begin
        // ready must be high in the last multiplication; chain the next operand
        checks++;
        if (!ready) failures++;
      end
      @(posedge clk); #1;
      if (n > 100) break;
    end
    checks += 3;
    if (n != 30) begin failures++; $display("inv latency %0d, expected 30", n); end
    if (inv != exp) begin failures++; $display("inv(%h) = %h expected %h", op, inv, exp); end
    if (ref_mul(op, inv) != 16'd1) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    one(16'd0, 0);
    one(16'd1, 0);
    one(16'hffff, 0);
    one(16'd2, 0);
    for (int t = 0; t < 100; t++) one(16'($urandom), 0);
    // back to back: start the next operand while the last multiply is running
    for (int t = 0; t < 20; t++) begin
      logic [15:0] a, b;
      a = 16'($urandom); b = 16'($urandom);
      k = a; start = 1;
      @(posedge clk); #1;
      start = 0;
      repeat (29) @(posedge clk);
      #1;
      checks++;
      if (!ready || done) failures++;
      k = b; start = 1;     // taken at edge 30 of operand a
      @(posedge clk); #1;
      start = 0;
      checks += 2;
      if (!done || inv != ref_inv(a)) failures++;
      repeat (30) @(posedge clk);
      #1;
      checks++;
      if (!done || inv != ref_inv(b)) failures++;
      else back_to_back++;
      @(posedge clk); #1;
    end
    checks++;
    if (back_to_back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
