// tb_cla_adder: 32-bit carry look-ahead adder against the + operator, random
// operands plus carry-chain corner cases (all ones + 1, alternating patterns).
module tb_cla_adder;
  localparam int W = 32;
  logic [W-1:0] x, y, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  cla_adder #(.W(W)) dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      x = $urandom; y = $urandom; cin = 1'($urandom);
      case (i)
        0: begin x = '1; y = '0; cin = 1'b1; end
        1: begin x = '1; y = '1; cin = 1'b1; end
        2: begin x = 32'h5555_5555; y = 32'haaaa_aaaa; cin = 1'b1; end
        3: begin x = 32'h0000_ffff; y = 32'h0000_0001; cin = 1'b0; end
        default: ;
      endcase
      #1;
      checks++;
      if ({cout, s} != 33'(x) + 33'(y) + 33'(cin)) begin
        failures++;
        if (failures < 5) $display("cla mismatch %h + %h + %b = %b_%h", x, y, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
