// tb_phase_ctrl: the step counter must run 0,1,2,0,... after reset, with
// `last` high exactly in step 2, one clock in three.
module tb_phase_ctrl;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, last;
  logic [1:0] phase;
  int checks = 0, failures = 0, cyc = 0, lasts = 0;

  phase_ctrl #(.PHASES(3)) dut (.clk(clk), .rst_n(rst_n), .phase(phase), .last(last));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      checks++;
      if (phase != 2'(i % 3) || last != (i % 3 == 2)) begin
        failures++;
        $display("phase_ctrl: cycle %0d phase=%0d last=%b", i, phase, last);
      end
      if (last) lasts++;
      @(posedge clk); #1;
    end
    checks++;
    if (lasts != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
