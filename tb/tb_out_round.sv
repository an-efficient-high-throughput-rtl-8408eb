// tb_out_round: output transformation against the reference (multiply, add,
// add, multiply, with the two inner sub-blocks exchanged); y must hold while
// `en` is low.
module tb_out_round;
  timeunit 1ns; timeprecision 1ps;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0, en = 0;
  block_t x, y, yhold;
  out_keys_t k;
  int checks = 0, failures = 0;

  out_round dut (.clk(clk), .en(en), .x(x), .k(k), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      x = {$urandom, $urandom};
      for (int i = 0; i < 4; i++) k[i] = (t % 9 == 4) ? 16'd0 : 16'($urandom);
      en = 1;
      @(posedge clk); #1;
      checks++;
      if (y != ref_out(x, k[0], k[1], k[2], k[3])) begin
        failures++;
        if (failures < 5) $display("out_round mismatch x=%h y=%h", x, y);
      end
      yhold = y;
      en = 0;
      x = {$urandom, $urandom};
      @(posedge clk); #1;
      checks++;
      if (y != yhold) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
