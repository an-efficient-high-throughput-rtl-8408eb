// tb_idea_enc: the encryption pipeline end to end.
// Blocks: the standard IDEA test vector (key 0001..0008, plaintext
// 0000 0001 0002 0003 -> ciphertext 11fb ed2b 0198 6de5), a burst of 30
// back-to-back blocks under the key 3132..3536 with a new random key every
// fifth block, then random gaps. The key is presented only when it changes,
// so the retained key register is exercised. Checks every ciphertext against the
// reference, the latency (out_valid 28 clocks after the clock in which the
// block was taken), the rate (in_ready one clock in three, outputs of a burst
// three clocks apart), and that all nine stages were full at once.
module tb_idea_enc;
  timeunit 1ns; timeprecision 1ps;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic   clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, key_valid = 0;
  block_t p_text, c_text;
  key_t   key;
  int checks = 0, failures = 0, cyc = 0;
  int exp_cyc [$];
  logic [63:0] exp_ct [$];
  int last_out = -100, spaced3 = 0, key_changes = 0, max_inflight = 0, outputs = 0;

  idea_enc dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .p_text(p_text),
                .key_valid(key_valid), .key(key), .out_valid(out_valid), .c_text(c_text));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 2;
      outputs++;
      if (exp_ct.size() == 0) begin
        failures++;
        $display("unexpected output %h", c_text);
      end else begin
        int  c0;
        logic [63:0] e;
        c0 = exp_cyc.pop_front();
        e  = exp_ct.pop_front();
        if (c_text != e) begin
          failures++;
          $display("ciphertext %h expected %h", c_text, e);
        end
        if (cyc - c0 != 28) begin
          failures++;
          $display("latency %0d expected 28", cyc - c0);
        end
      end
      if (cyc - last_out == 3) spaced3++;
      last_out = cyc;
    end
    if (exp_ct.size() > max_inflight) max_inflight = exp_ct.size();
  end

  // offer one block in the next clock where in_ready is high
  key_t held = '0;

  // offer one block; the key is presented (key_valid) only when it changes,
  // otherwise the key bus carries garbage and the retained key must be used
  task automatic send(input logic [63:0] pt, input key_t k);
    while (!in_ready) begin @(posedge clk); #1; end
    in_valid = 1; p_text = pt;
    if (k != held) begin key_valid = 1; key = k; held = k; end
    exp_cyc.push_back(cyc);
    exp_ct.push_back(ref_crypt(pt, ref_enc_keys(k)));
    @(posedge clk); #1;
    in_valid = 0; key_valid = 0; p_text = {$urandom, $urandom}; key = {$urandom, $urandom, $urandom, $urandom};
  endtask

  initial begin
    key_t k;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // rate: in_ready one clock in three
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (in_ready != ((i % 3) == 2)) failures++;
      @(posedge clk); #1;
    end
    send(64'h0000_0001_0002_0003, 128'h0001_0002_0003_0004_0005_0006_0007_0008);
    k = 128'h31323334353637383930313233343536;
    // a key loaded in a clock with no block must be kept for the next block
    while (in_ready) begin @(posedge clk); #1; end
    key_valid = 1; key = 128'h31323334353637383930313233343536;
    @(posedge clk); #1;
    key_valid = 0; key = '0;
    held = 128'h31323334353637383930313233343536;
    for (int i = 0; i < 30; i++) begin
      if (i % 5 == 4) begin k = {$urandom, $urandom, $urandom, $urandom}; key_changes++; end
      send({$urandom, $urandom}, k);
    end
    for (int i = 0; i < 20; i++) begin
      repeat ($urandom % 7) @(posedge clk);
      #1;
      send({$urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    end
    repeat (40) @(posedge clk);
    checks += 4;
    if (exp_ct.size() != 0) begin failures++; $display("%0d blocks never came out", exp_ct.size()); end
    if (spaced3 < 25) begin failures++; $display("only %0d outputs 3 clocks apart", spaced3); end
    if (max_inflight < 9) begin failures++; $display("pipeline never full: %0d", max_inflight); end
    if (outputs != 51) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
