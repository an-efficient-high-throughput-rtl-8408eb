// dec_keygen: IDEA decryption key schedule.
//
// From a 128-bit key it produces the 52 decryption sub-keys in the order the
// round pipeline uses them. For decryption round i (0..7) and the output
// transformation (i = 8), with E the encryption sub-keys and s = 6*(8-i):
//   DK[6i]   = E[s]^-1 (mod 2^16+1)      DK[6i+3] = E[s+3]^-1
//   DK[6i+1] = -E[s+2], DK[6i+2] = -E[s+1] (mod 2^16)   for i = 1..7
//   DK[6i+1] = -E[s+1], DK[6i+2] = -E[s+2]              for i = 0 and 8
//   DK[6i+4] = E[6*(7-i)+4], DK[6i+5] = E[6*(7-i)+5]    for i = 0..7
// (the standard IDEA decryption schedule). The 34 additive inverses and copies
// are written in the clock edge that takes the key. The 18 multiplicative
// inverses are computed back to back by the fast inverse multiplier
// (inv_mulmod), 30 clocks each; the last one is stored one clock after it is
// ready, so `valid` rises 18 x 30 + 1 = 541 clocks after the edge that took
// `start`. `start` is taken only while `busy` is low; `valid` drops when it is
// taken. Reset is asynchronous, active low.
module dec_keygen
  import idea_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  key_t      key,
  output logic      busy,
  output logic      valid,
  output all_keys_t dk
);

  key_t        kreg;
  all_keys_t   ek_in, ek_reg;   // encryption sub-keys of the key input / the stored key
  logic [4:0]  n_issued;        // inverses started
  logic [4:0]  n_done;          // inverses stored
  logic        take, inv_start, inv_ready, inv_busy, inv_done;
  word_t       inv_k, inv_q;

  always_comb begin
    for (int unsigned j = 0; j < NUM_SUBKEYS; j++) begin
      ek_in[j]  = enc_subkey(key, j);
      ek_reg[j] = enc_subkey(kreg, j);
    end
  end

  assign take = start && !busy;

  always_comb begin
    inv_start = take || (busy && inv_ready && n_issued < 5'(NUM_INV_KEYS));
    inv_k     = take ? ek_in[inv_src(0)] : ek_reg[inv_src(32'(n_issued))];
  end

  inv_mulmod u_inv (
    .clk(clk), .rst_n(rst_n), .start(inv_start), .k(inv_k),
    .ready(inv_ready), .busy(inv_busy), .done(inv_done), .inv(inv_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      valid    <= 1'b0;
      n_issued <= '0;
      n_done   <= '0;
    end else if (take) begin
      busy     <= 1'b1;
      valid    <= 1'b0;
      n_issued <= 5'd1;
      n_done   <= '0;
    end else if (busy) begin
      if (inv_start) n_issued <= n_issued + 5'd1;
      if (inv_done) begin
        n_done <= n_done + 5'd1;
        if (n_done == 5'(NUM_INV_KEYS - 1)) begin
          busy  <= 1'b0;
          valid <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      kreg <= key;
      for (int unsigned i = 0; i <= NUM_ROUNDS; i++) begin
        if (i == 0 || i == NUM_ROUNDS) begin
          dk[6*i+1] <= -ek_in[6*(8-i)+1];
          dk[6*i+2] <= -ek_in[6*(8-i)+2];
        end else begin
          dk[6*i+1] <= -ek_in[6*(8-i)+2];
          dk[6*i+2] <= -ek_in[6*(8-i)+1];
        end
        if (i < NUM_ROUNDS) begin
          dk[6*i+4] <= ek_in[6*(7-i)+4];
          dk[6*i+5] <= ek_in[6*(7-i)+5];
        end
      end
    end else if (busy && inv_done) begin
      dk[inv_dst(32'(n_done))] <= inv_q;
    end
  end

  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n) inv_start |-> inv_ready)
    else $error("dec_keygen: inverse started while the inverter is not ready");
  a_inv_idle: assert property (@(posedge clk) disable iff (!rst_n) !busy |-> !inv_busy)
    else $error("dec_keygen: inverter running while no key is being processed");

endmodule
