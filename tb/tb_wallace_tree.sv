// tb_wallace_tree: random 16 x 32-bit rows; sum + carry of the tree must equal
// the sum of all rows modulo 2^32. A second instance checks an odd row count (7).
module tb_wallace_tree;
  localparam int W = 32;
  logic [15:0][W-1:0] rows;
  logic [6:0][W-1:0]  rows7;
  logic [W-1:0] s, c, s7, c7;
  int checks = 0, failures = 0;

  wallace_tree #(.ROWS(16), .W(W)) dut (.rows(rows), .sum(s), .carry(c));
  wallace_tree #(.ROWS(7), .W(W)) dut7 (.rows(rows7), .sum(s7), .carry(c7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [W-1:0] acc, acc7;
      acc = '0; acc7 = '0;
      for (int i = 0; i < 16; i++) begin
        rows[i] = (t == 0) ? '1 : $urandom;
        acc += rows[i];
      end
      for (int i = 0; i < 7; i++) begin
        rows7[i] = $urandom;
        acc7 += rows7[i];
      end
      #1;
      checks += 2;
      if (s + c != acc) begin
        failures++;
        if (failures < 5) $display("wallace16 mismatch: %h + %h != %h", s, c, acc);
      end
      if (s7 + c7 != acc7) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
