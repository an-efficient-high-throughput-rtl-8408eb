// idea_enc: pipelined IDEA encryption, eight rounds and the output
// transformation working on nine different blocks at once.
//
// The key is fetched once: `key` is stored in a key register in any clock where
// `key_valid` is high and is kept for all later blocks until a new key comes.
// A key offered with `key_valid` in the clock a block is taken already applies
// to that block. Stage 0 is an input register for the plaintext, its key and a
// valid flag. Stages 1..8 each hold one round (idea_round) and one key stage
// (enc_key) that picks that round's six sub-keys straight from the key bits and
// passes the key on beside the block, so no sub-key memory is needed and every
// block may bring its own key. Stage 9 is the output transformation (out_round)
// with sub-keys K49..K52.
// A shared step counter (phase_ctrl) splits time into periods of PHASES = 3
// clocks; every stage register advances in the last step of a period. So
// `in_ready` is high one clock in three; a block offered with `in_valid` in
// that clock is taken. Its ciphertext appears on `c_text` with a one-clock
// `out_valid` strobe 28 clocks after the clock in which it was taken, and stays
// on `c_text` for 3 clocks. There is no back-pressure on the output. Throughput
// is 64 bits per 3 clocks (1.42 Gbit/s at 66.67 MHz). The 3-clock period is
// this design's reading of the target rate; reset (asynchronous, active low)
// clears only the valid flags.
module idea_enc
  import idea_pkg::*;
#(
  parameter int unsigned ROUNDS = NUM_ROUNDS,
  parameter int unsigned PHASES = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t p_text,
  input  logic   key_valid,
  input  key_t   key,
  output logic   out_valid,
  output block_t c_text
);

  logic [1:0] phase;
  logic       last;

  block_t            data [ROUNDS+1];   // data[0]: input register, data[r]: round r output
  key_t              keyr [ROUNDS+1];   // key held by each stage
  logic [ROUNDS+1:0] v;                 // v[r]: stage r holds a block; v[ROUNDS+1]: output

  phase_ctrl #(.PHASES(PHASES)) u_ctrl (.clk(clk), .rst_n(rst_n), .phase(phase), .last(last));

  key_t key_hold;   // retained key
  key_t key_cur;    // key for a block taken now

  assign in_ready = last;
  assign key_cur  = key_valid ? key : key_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         key_hold <= '0;
    else if (key_valid) key_hold <= key;
  end

  always_ff @(posedge clk) begin
    if (last) begin
      data[0] <= p_text;
      keyr[0] <= key_cur;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    v <= '0;
    else if (last) v <= {v[ROUNDS:0], in_valid};
  end

  for (genvar r = 1; r <= ROUNDS; r++) begin : g_stage
    round_keys_t rk;

    enc_key #(.ROUND(r - 1)) u_key (
      .clk(clk), .en(last), .key_in(keyr[r-1]), .key_out(keyr[r]), .subkey(rk)
    );

    idea_round u_round (
      .clk(clk), .phase(phase), .x(data[r-1]), .k(rk), .y(data[r])
    );
  end

  round_keys_t okey;
  key_t        unused_key;

  enc_key #(.ROUND(ROUNDS)) u_key_out (
    .clk(clk), .en(1'b0), .key_in(keyr[ROUNDS]), .key_out(unused_key), .subkey(okey)
  );

  out_round u_out (
    .clk(clk), .en(last), .x(data[ROUNDS]), .k(okey[3:0]), .y(c_text)
  );

  // the output register was loaded at the end of the previous period
  assign out_valid = v[ROUNDS+1] && (phase == 2'd0);

endmodule
