// tb_csa32: checks the 3:2 compressor on random and corner operands:
// sum must be the bitwise XOR and a+b+c must equal sum + 2*carry.
module tb_csa32;
  localparam int W = 32;
  logic [W-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  csa32 #(.W(W)) dut (.a(a), .b(b), .c(c), .sum(s), .carry(cy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom; c = $urandom;
      if (i == 0) begin a = '1; b = '1; c = '1; end
      if (i == 1) begin a = '0; b = '0; c = '0; end
      #1;
      checks++;
      if (longint'(a) + longint'(b) + longint'(c) != longint'(s) + 2 * longint'(cy) || s != (a ^ b ^ c)) begin
        failures++;
        if (failures < 5) $display("csa32 mismatch a=%h b=%h c=%h sum=%h carry=%h", a, b, c, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
