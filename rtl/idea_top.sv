// idea_top: IDEA encryption and decryption engines side by side.
//
// The encryption engine (idea_enc) is a nine-stage pipeline, eight rounds and
// the output transformation, that takes a 64-bit plaintext with its 128-bit key
// every third clock and derives all sub-keys on the fly from a retained key,
// which travels down the pipeline with its block. The decryption engine (idea_dec)
// first turns a key into the 52 decryption sub-keys with a 30-clock fast
// modular inverter (541 clocks per key) and then deciphers a block every third
// clock through an identical round pipeline. Each engine has its own ports,
// prefixed enc_ and dec_; see idea_enc and idea_dec for their timing. Both
// share clock and the asynchronous active-low reset.
module idea_top
  import idea_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // encryption
  input  logic   enc_in_valid,
  output logic   enc_in_ready,
  input  block_t enc_p_text,
  input  logic   enc_key_valid,
  input  key_t   enc_key,
  output logic   enc_out_valid,
  output block_t enc_c_text,
  // decryption
  input  logic   dec_key_valid,
  input  key_t   dec_key,
  output logic   dec_key_ready,
  output logic   dec_keys_valid,
  input  logic   dec_in_valid,
  output logic   dec_in_ready,
  input  block_t dec_c_text,
  output logic   dec_out_valid,
  output block_t dec_p_text
);

  idea_enc u_enc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .p_text(enc_p_text),
    .key_valid(enc_key_valid), .key(enc_key),
    .out_valid(enc_out_valid), .c_text(enc_c_text)
  );

  idea_dec u_dec (
    .clk(clk), .rst_n(rst_n),
    .key_valid(dec_key_valid), .key(dec_key), .key_ready(dec_key_ready), .keys_valid(dec_keys_valid),
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .c_text(dec_c_text),
    .out_valid(dec_out_valid), .p_text(dec_p_text)
  );

endmodule
