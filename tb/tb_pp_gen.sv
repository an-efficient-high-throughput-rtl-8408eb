// tb_pp_gen: every partial product row must be a * b[i] << i, and the rows
// must add up to a * b.
module tb_pp_gen;
  localparam int N = 16;
  logic [N-1:0] a, b;
  logic [N-1:0][2*N-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [2*N-1:0] acc;
      a = 16'($urandom); b = 16'($urandom);
      if (t == 0) begin a = '1; b = '1; end
      #1;
      acc = '0;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (pp[i] != (b[i] ? (32'(a) << i) : 32'd0)) failures++;
        acc += pp[i];
      end
      checks++;
      if (acc != 32'(a) * 32'(b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
