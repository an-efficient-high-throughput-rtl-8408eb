// tb_idea_top: whole design, default parameters, end to end.
// Plaintexts go through the encryption engine; every ciphertext is checked
// against the reference and then fed to the decryption engine, whose output
// must be the original plaintext. Two sessions run, each under its own key
// (the second key is loaded into the decryption engine after the first
// session drains). The mechanisms the design has are each made to happen and
// counted: a key change between blocks of the encryption pipeline, a full
// encryption pipeline (nine blocks in flight), an idle slot (bubble), a
// sub-block or sub-key equal to 0 (the 2^16 case of the multiplier), a
// decryption key load, and a ciphertext held off while decryption sub-keys are
// computed. A mechanism that never happened counts as a failure.
module tb_idea_top;
  timeunit 1ns; timeprecision 1ps;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   enc_in_valid = 0, enc_in_ready, enc_out_valid, enc_key_valid = 0;
  block_t enc_p_text, enc_c_text;
  key_t   enc_key, dec_key;
  logic   dec_key_valid = 0, dec_key_ready, dec_keys_valid;
  logic   dec_in_valid = 0, dec_in_ready, dec_out_valid;
  block_t dec_c_text, dec_p_text;

  int checks = 0, failures = 0, cyc = 0;
  int n_key_change = 0, n_full = 0, n_bubble = 0, n_zero = 0, n_dec_key = 0, n_held_off = 0;
  logic [63:0] enc_exp [$], pt_sent [$], ct_got [$], dec_exp [$];
  int inflight = 0;

  idea_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && enc_out_valid) begin
      logic [63:0] e;
      checks++;
      e = enc_exp.pop_front();
      inflight--;
      if (enc_c_text != e) begin failures++; $display("enc: %h expected %h", enc_c_text, e); end
      ct_got.push_back(enc_c_text);
    end
    if (rst_n && dec_out_valid) begin
      logic [63:0] e;
      checks++;
      e = dec_exp.pop_front();
      if (dec_p_text != e) begin failures++; $display("dec: %h expected %h", dec_p_text, e); end
    end
    if (rst_n && dec_in_valid && !dec_in_ready && !dec_keys_valid) n_held_off++;
    if (inflight >= 9) n_full++;
  end

  task automatic enc_send(input logic [63:0] pt, input key_t k);
    while (!enc_in_ready) begin @(posedge clk); #1; end
    enc_in_valid = 1; enc_p_text = pt;
    if (k != enc_key) begin
      n_key_change++;
      enc_key_valid = 1;   // new key: fetched once, then retained
    end
    enc_key = k;
    if (pt[63:48] == 0 || pt[15:0] == 0) n_zero++;
    enc_exp.push_back(ref_crypt(pt, ref_enc_keys(k)));
    pt_sent.push_back(pt);
    inflight++;
    @(posedge clk); #1;
    enc_in_valid = 0;
    enc_key_valid = 0;
  endtask

  task automatic dec_load(input key_t k);
    dec_key_valid = 1; dec_key = k;
    while (!dec_key_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    dec_key_valid = 0;
    n_dec_key++;
  endtask

  task automatic session(input key_t k, input int nblk);
    logic [63:0] pt;
    dec_load(k);
    for (int i = 0; i < nblk; i++) begin
      pt = {$urandom, $urandom};
      if (i == 3) pt[63:48] = 0;
      if (i == 4) pt[15:0] = 0;
      if (i == 12) begin   // one idle slot in the burst
        while (!enc_in_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        n_bubble++;
      end
      enc_send(pt, (i == 7) ? {$urandom, $urandom, $urandom, $urandom} : k);
    end
    // hold a ciphertext at the decryption input while the sub-keys are computed
    dec_in_valid = 1;
    while (!dec_keys_valid) begin @(posedge clk); #1; end
    dec_in_valid = 0;
    while (inflight != 0) begin @(posedge clk); #1; end
    for (int i = 0; i < nblk; i++) begin
      logic [63:0] ct, p0;
      ct = ct_got.pop_front();
      p0 = pt_sent.pop_front();
      if (i == 7) continue;   // enciphered under another key
      while (!dec_in_ready) begin @(posedge clk); #1; end
      dec_in_valid = 1; dec_c_text = ct;
      dec_exp.push_back(p0);
      @(posedge clk); #1;
      dec_in_valid = 0;
    end
    while (dec_exp.size() != 0) begin @(posedge clk); #1; end
  endtask

  initial begin
    enc_key = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    session(128'h0001_0002_0003_0004_0005_0006_0007_0008, 20);
    session(128'h31323334353637383930313233343536, 20);
    repeat (10) @(posedge clk);
    if (n_key_change == 0) begin failures++; $display("no key change"); end
    if (n_full == 0)       begin failures++; $display("pipeline never full"); end
    if (n_bubble == 0)     begin failures++; $display("no bubble"); end
    if (n_zero == 0)       begin failures++; $display("no zero operand"); end
    if (n_dec_key < 2)     begin failures++; $display("too few key loads"); end
    if (n_held_off == 0)   begin failures++; $display("never held off"); end
    checks += 6;
    $display("mechanisms: key_change=%0d full=%0d bubble=%0d zero=%0d dec_key_load=%0d held_off=%0d",
             n_key_change, n_full, n_bubble, n_zero, n_dec_key, n_held_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
