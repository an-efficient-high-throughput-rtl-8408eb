// tb_idea_round: one round in its three steps. x and k are held for a whole
// period of phases 0,1,2; after the phase-2 edge y must equal the reference
// round (inner sub-blocks swapped) and must not have changed before it.
// Random blocks and keys, plus zero sub-blocks and keys (the 2^16 encoding).
module tb_idea_round;
  timeunit 1ns; timeprecision 1ps;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0;
  logic [1:0] phase = 0;
  block_t x, y, yprev;
  round_keys_t k;
  logic [15:0] rk [6];
  int checks = 0, failures = 0;

  idea_round dut (.clk(clk), .phase(phase), .x(x), .k(k), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      x = {$urandom, $urandom};
      for (int i = 0; i < 6; i++) begin
        k[i] = 16'($urandom);
        if (t % 7 == 1 && i % 2 == 0) k[i] = 0;
        rk[i] = k[i];
      end
      if (t % 5 == 2) x.x1 = 0;
      if (t % 5 == 3) x.x4 = 0;
      phase = 0;
      @(posedge clk); #1; yprev = y;
      phase = 1;
      @(posedge clk); #1;
      checks++;
      if (y != yprev) failures++;   // output only moves at the end of phase 2
      phase = 2;
      @(posedge clk); #1;
      checks++;
      if (y != ref_round(x, rk)) begin
        failures++;
        if (failures < 5) $display("round mismatch x=%h y=%h expected %h", x, y, ref_round(x, rk));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
