// tb_idea_dec: the decryption unit. Loads the standard key 0001..0008 and
// deciphers its known ciphertext 11fb ed2b 0198 6de5 back to 0000 0001 0002
// 0003, then a burst of random ciphertexts (made by the reference encryption).
// Then, with blocks still in the pipeline, offers the key 3132..3536: it must
// wait for key_ready, and while its sub-keys are computed in_ready must stay
// low. Checks keys_valid 541 clocks after the key is taken, every plaintext
// and the 28-clock latency.
module tb_idea_dec;
  timeunit 1ns; timeprecision 1ps;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic   clk = 0, rst_n = 0, key_valid = 0, key_ready, keys_valid, in_valid = 0, in_ready, out_valid;
  key_t   key;
  block_t c_text, p_text;
  int checks = 0, failures = 0, cyc = 0, blocked = 0, key_waits = 0;
  int exp_cyc [$];
  logic [63:0] exp_pt [$];

  idea_dec dut (.clk(clk), .rst_n(rst_n), .key_valid(key_valid), .key(key), .key_ready(key_ready),
                .keys_valid(keys_valid), .in_valid(in_valid), .in_ready(in_ready), .c_text(c_text),
                .out_valid(out_valid), .p_text(p_text));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 2;
      if (exp_pt.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        int c0;
        logic [63:0] e;
        c0 = exp_cyc.pop_front();
        e  = exp_pt.pop_front();
        if (p_text != e) begin failures++; $display("plaintext %h expected %h", p_text, e); end
        if (cyc - c0 != 28) begin failures++; $display("latency %0d", cyc - c0); end
      end
    end
    if (rst_n && in_valid && !in_ready && key_ready == 0 && !keys_valid) blocked++;
  end

  task automatic load_key(input key_t k);
    int n;
    key_valid = 1; key = k;
    while (!key_ready) begin @(posedge clk); #1; key_waits++; end
    @(posedge clk); #1;
    key_valid = 0;
    n = 0;
    in_valid = 1;   // offer a block while the sub-keys are computed: must not be taken
    while (!keys_valid && n < 2000) begin
      checks++;
      if (in_ready) failures++;
      @(posedge clk); #1; n++;
    end
    in_valid = 0;
    checks++;
    if (n != 541) begin failures++; $display("keys_valid after %0d clocks", n); end
  endtask

  task automatic send(input logic [63:0] ct, input logic [63:0] pt);
    while (!in_ready) begin @(posedge clk); #1; end
    in_valid = 1; c_text = ct;
    exp_cyc.push_back(cyc);
    exp_pt.push_back(pt);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    ref_keys_t e;
    key_t k;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    k = 128'h0001_0002_0003_0004_0005_0006_0007_0008;
    load_key(k);
    send(64'h11fb_ed2b_0198_6de5, 64'h0000_0001_0002_0003);
    e = ref_enc_keys(k);
    for (int i = 0; i < 12; i++) begin
      logic [63:0] pt;
      pt = {$urandom, $urandom};
      send(ref_crypt(pt, e), pt);
    end
    k = 128'h31323334353637383930313233343536;
    load_key(k);   // waits until the pipeline has drained
    e = ref_enc_keys(k);
    for (int i = 0; i < 12; i++) begin
      logic [63:0] pt;
      pt = {$urandom, $urandom};
      send(ref_crypt(pt, e), pt);
    end
    repeat (40) @(posedge clk);
    checks += 3;
    if (exp_pt.size() != 0) failures++;
    if (key_waits == 0) begin failures++; $display("key load never had to wait"); end
    if (blocked == 0) begin failures++; $display("input never blocked during key computation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
