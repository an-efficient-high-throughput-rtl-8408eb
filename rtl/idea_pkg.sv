// idea_pkg: types and key-schedule helpers shared by the IDEA datapath.
//
// IDEA works on 64-bit blocks split into four 16-bit sub-blocks and uses 52
// 16-bit sub-keys drawn from a 128-bit key. block_t keeps sub-block 1 in the
// most significant 16 bits, so a 64-bit vector casts straight into it.
// enc_subkey() gives encryption sub-key j (0-based): sub-keys are taken eight
// at a time, most significant word first, from the key rotated left by 25 bits
// once per group of eight. The decryption helpers name which encryption
// sub-key each of the 18 multiplicative-inverse decryption sub-keys comes from;
// that ordering is the standard IDEA decryption schedule.
package idea_pkg;

  typedef logic [15:0]  word_t;
  typedef logic [127:0] key_t;

  typedef struct packed {
    word_t x1;
    word_t x2;
    word_t x3;
    word_t x4;
  } block_t;

  typedef logic [5:0][15:0]  round_keys_t;   // K1..K6 of one round, [0] = K1
  typedef logic [3:0][15:0]  out_keys_t;     // K49..K52, [0] = K49
  typedef logic [51:0][15:0] all_keys_t;     // all 52 sub-keys, [0] = K1

  localparam int unsigned NUM_ROUNDS    = 8;
  localparam int unsigned NUM_SUBKEYS   = 52;
  localparam int unsigned NUM_INV_KEYS  = 18;  // two per round plus two in the output transformation
  localparam int unsigned KEY_ROTATE    = 25;

  // Encryption sub-key j, 0 <= j < 52.
  function automatic word_t enc_subkey(key_t key, int unsigned j);
    int unsigned rot;
    key_t        r;
    rot = (KEY_ROTATE * (j / 8)) % 128;
    r   = (key << rot) | (key >> ((128 - rot) % 128));
    if (rot == 0) r = key;
    return r[127 - 16 * (j % 8) -: 16];
  endfunction

  // n-th multiplicative decryption sub-key (0 <= n < 18): where it is stored ...
  function automatic int unsigned inv_dst(int unsigned n);
    return 6 * (n / 2) + 3 * (n % 2);
  endfunction

  // ... and which encryption sub-key it inverts.
  function automatic int unsigned inv_src(int unsigned n);
    return 6 * (8 - n / 2) + 3 * (n % 2);
  endfunction

endpackage
