// enc_key: key stage of one IDEA pipeline stage (encryption).
//
// The 128-bit key of the block in this stage arrives on key_in. The stage hands
// its round the six sub-keys K(6*ROUND+1) .. K(6*ROUND+6): sub-keys are the
// eight 16-bit words of the key (most significant first), then of the key
// rotated left by 25 bits, by 50 bits and so on, so each sub-key is a fixed
// selection of key bits and needs no storage. The key is registered on key_out
// when `en` is high, so it moves down the pipeline together with its block and
// a new key can come with any block. With ROUND = 8 the first four outputs are
// the output transformation's K49..K52 (its last two outputs are then 0).
// Sub-keys are pure wiring from key_in: no logic lies between them.
module enc_key
  import idea_pkg::*;
#(
  parameter int unsigned ROUND = 0
) (
  input  logic        clk,
  input  logic        en,
  input  key_t        key_in,
  output key_t        key_out,
  output round_keys_t subkey
);

  always_comb begin
    for (int unsigned i = 0; i < 6; i++) begin
      if (6 * ROUND + i < NUM_SUBKEYS) subkey[i] = enc_subkey(key_in, 6 * ROUND + i);
      else                             subkey[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (en) key_out <= key_in;
  end

endmodule
