// tb_mulmod: multiplication modulo 2^16+1 against the reference (integer %),
// including the 0 = 2^16 encoding: 0*0, 0*x, x*0, results equal to 2^16, and
// a low half smaller than the high half.
module tb_mulmod;
  import idea_ref_pkg::*;
  logic [15:0] a, b, p;
  int checks = 0, failures = 0;

  mulmod dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      a = 16'($urandom); b = 16'($urandom);
      case (t)
        0: begin a = 0; b = 0; end
        1: begin a = 0; b = 1; end
        2: begin a = 5; b = 0; end
        3: begin a = 16'hffff; b = 16'hffff; end
        4: begin a = 2; b = 16'h8000; end    // 2^16 -> encoded 0
        5: begin a = 1; b = 1; end
        6: begin a = 16'h00ff; b = 16'hff00; end
        default: ;
      endcase
      #1;
      checks++;
      if (p != ref_mul(a, b)) begin
        failures++;
        if (failures < 5) $display("mulmod mismatch %h (*) %h = %h, expected %h", a, b, p, ref_mul(a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
