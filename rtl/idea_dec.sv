// idea_dec: IDEA decryption unit.
//
// Decryption runs the ciphertext through the same round pipeline as encryption
// (idea_round x 8, then out_round), but with the 52 decryption sub-keys:
// multiplicative and additive inverses of the encryption sub-keys in reverse
// order. dec_keygen computes them once per key, using the 30-clock fast inverse
// multiplier for the 18 multiplicative ones, and holds them in registers.
// Key loading: `key` is taken at a clock edge with `key_valid` while
// `key_ready` is high (no sub-key computation running and no block in the
// pipeline). `keys_valid` rises 541 clocks later. Blocks: while `keys_valid` is
// high, `in_ready` is high one clock in three (the pipeline period, as in
// idea_enc) unless a key is being offered; a ciphertext offered with `in_valid`
// then is taken and its plaintext appears with a one-clock `out_valid` strobe
// 28 clocks after the clock in which it was taken. Reset (asynchronous, active
// low) clears the valid flags. Blocking new blocks while a key is computed is
// this design's own choice.
module idea_dec
  import idea_pkg::*;
#(
  parameter int unsigned ROUNDS = NUM_ROUNDS,
  parameter int unsigned PHASES = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_valid,
  input  key_t   key,
  output logic   key_ready,
  output logic   keys_valid,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t c_text,
  output logic   out_valid,
  output block_t p_text
);

  logic [1:0]        phase;
  logic              last;
  logic              kg_busy;
  all_keys_t         dk;
  block_t            data [ROUNDS+1];
  logic [ROUNDS+1:0] v;
  logic              take_key;

  phase_ctrl #(.PHASES(PHASES)) u_ctrl (.clk(clk), .rst_n(rst_n), .phase(phase), .last(last));

  assign key_ready = !kg_busy && (v == '0);
  assign take_key  = key_valid && key_ready;
  assign in_ready  = last && keys_valid && !kg_busy && !key_valid;

  dec_keygen u_keygen (
    .clk(clk), .rst_n(rst_n), .start(take_key), .key(key),
    .busy(kg_busy), .valid(keys_valid), .dk(dk)
  );

  always_ff @(posedge clk) begin
    if (last) data[0] <= c_text;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    v <= '0;
    else if (last) v <= {v[ROUNDS:0], in_valid && in_ready};
  end

  for (genvar r = 1; r <= ROUNDS; r++) begin : g_stage
    idea_round u_round (
      .clk(clk), .phase(phase), .x(data[r-1]), .k(dk[6*(r-1) +: 6]), .y(data[r])
    );
  end

  out_round u_out (
    .clk(clk), .en(last), .x(data[ROUNDS]), .k(dk[6*ROUNDS +: 4]), .y(p_text)
  );

  assign out_valid = v[ROUNDS+1] && (phase == 2'd0);

  a_key_idle: assert property (@(posedge clk) disable iff (!rst_n) take_key |-> (v == '0))
    else $error("idea_dec: key changed with blocks in the pipeline");

endmodule
