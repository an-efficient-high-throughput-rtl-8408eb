// tb_enc_key: sub-key selection of the key stages for all nine stage indices.
// First the key 0x31323334353637383930313233343536 with the sub-key values
// K1..K20 known for it (3132 3334 ... 686a 6c6e ... dce0 e4c0 c4c8 ccd0), then
// random keys against the reference schedule. Also checks that the key is
// registered to key_out only when `en` is high.
module tb_enc_key;
  timeunit 1ns; timeprecision 1ps;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0, en = 0;
  key_t key;
  key_t        kout [9];
  round_keys_t sk   [9];
  int checks = 0, failures = 0;

  for (genvar r = 0; r < 9; r++) begin : g_k
    enc_key #(.ROUND(r)) dut (.clk(clk), .en(en), .key_in(key), .key_out(kout[r]), .subkey(sk[r]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    ref_keys_t e;
    e = ref_enc_keys(key);
    for (int r = 0; r < 9; r++)
      for (int i = 0; i < 6; i++)
        if (6*r + i < 52) begin
          checks++;
          if (sk[r][i] != e[6*r+i]) begin
            failures++;
            if (failures < 5) $display("enc_key: K%0d = %h expected %h", 6*r+i+1, sk[r][i], e[6*r+i]);
          end
        end
  endtask

  logic [15:0] known [20] = '{16'h3132, 16'h3334, 16'h3536, 16'h3738, 16'h3930, 16'h3132, 16'h3334, 16'h3536,
                              16'h686a, 16'h6c6e, 16'h7072, 16'h6062, 16'h6466, 16'h686a, 16'h6c62, 16'h6466,
                              16'hdce0, 16'he4c0, 16'hc4c8, 16'hccd0};

  initial begin
    key = 128'h31323334353637383930313233343536;
    #1;
    for (int j = 0; j < 20; j++) begin
      checks++;
      if (sk[j/6][j%6] != known[j]) begin
        failures++;
        $display("enc_key: known K%0d = %h expected %h", j+1, sk[j/6][j%6], known[j]);
      end
    end
    check_all();
    en = 1;
    @(posedge clk); #1;
    checks++;
    if (kout[3] != key) failures++;
    en = 0;
    for (int t = 0; t < 50; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check_all();
      @(posedge clk); #1;
      checks++;
      if (kout[0] != 128'h31323334353637383930313233343536) failures++;  // en low: held
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
