// tb_dec_keygen: decryption key schedule. For the standard key
// 0001 0002 ... 0008, the key 3132...3536 and a random key, `valid` must rise
// 18 x 30 + 1 = 541 clocks after the edge that took `start` and all 52
// sub-keys must equal the reference decryption schedule.
module tb_dec_keygen;
  timeunit 1ns; timeprecision 1ps;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, valid;
  key_t key;
  all_keys_t dk;
  int checks = 0, failures = 0;

  dec_keygen dut (.clk(clk), .rst_n(rst_n), .start(start), .key(key), .busy(busy), .valid(valid), .dk(dk));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input key_t kin);
    int n;
    ref_keys_t d;
    d = ref_dec_keys(ref_enc_keys(kin));
    key = kin; start = 1;
    @(posedge clk); #1;
    start = 0;
    key = '0;   // the key input need not be held
    n = 0;
    checks++;
    if (valid || !busy) failures++;
    while (!valid && n < 2000) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != 541) begin failures++; $display("dec_keygen: %0d clocks, expected 541", n); end
    for (int j = 0; j < 52; j++) begin
      checks++;
      if (dk[j] != d[j]) begin
        failures++;
        if (failures < 8) $display("dec_keygen: DK%0d = %h expected %h", j+1, dk[j], d[j]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run(128'h0001_0002_0003_0004_0005_0006_0007_0008);
    run(128'h31323334353637383930313233343536);
    run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
