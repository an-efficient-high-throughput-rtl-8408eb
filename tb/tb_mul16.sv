// tb_mul16: 16 x 16 Wallace-tree multiplier against the * operator on random
// and corner operands.
module tb_mul16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  mul16 #(.N(16)) dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      a = 16'($urandom); b = 16'($urandom);
      case (t)
        0: begin a = '1; b = '1; end
        1: begin a = 0; b = 16'h1234; end
        2: begin a = 16'h8000; b = 16'h8000; end
        3: begin a = 1; b = 16'hffff; end
        default: ;
      endcase
      #1;
      checks++;
      if (p != 32'(a) * 32'(b)) begin
        failures++;
        if (failures < 5) $display("mul16 mismatch %h * %h = %h", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
