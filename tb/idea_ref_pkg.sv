// idea_ref_pkg: plain behavioural IDEA reference used by the testbenches.
//
// Written from the arithmetic definition of IDEA with ordinary integer
// operators (%, *, +), independent of the hardware's multiplier and key
// stages: ref_mul is multiplication modulo 2^16+1 with 0 standing for 2^16,
// ref_inv the inverse by exhaustive exponentiation, ref_enc_keys the 52
// encryption sub-keys by repeated 25-bit rotation, ref_dec_keys the standard
// decryption schedule and ref_crypt one block through 8 rounds and the output
// transformation.
package idea_ref_pkg;

  function automatic logic [15:0] ref_mul(logic [15:0] a, logic [15:0] b);
    longint unsigned x, y;
    x = (a == 0) ? 65536 : a;
    y = (b == 0) ? 65536 : b;
    return 16'((x * y) % 65537);
  endfunction

  function automatic logic [15:0] ref_inv(logic [15:0] a);
    longint unsigned r, base, e;
    r = 1; base = (a == 0) ? 65536 : a; e = 65535;
    while (e != 0) begin
      if (e[0]) r = (r * base) % 65537;
      base = (base * base) % 65537;
      e = e >> 1;
    end
    return 16'(r);
  endfunction

  typedef logic [15:0] ref_keys_t [52];

  function automatic ref_keys_t ref_enc_keys(logic [127:0] key);
    ref_keys_t k;
    logic [127:0] kk;
    kk = key;
    for (int i = 0; i < 52; i++) begin
      if (i != 0 && i % 8 == 0) kk = {kk[102:0], kk[127:103]};
      k[i] = kk[127 - 16*(i%8) -: 16];
    end
    return k;
  endfunction

  function automatic ref_keys_t ref_dec_keys(ref_keys_t e);
    ref_keys_t d;
    for (int i = 0; i < 9; i++) begin
      int s;
      s = 6 * (8 - i);
      d[6*i]   = ref_inv(e[s]);
      d[6*i+3] = ref_inv(e[s+3]);
      if (i == 0 || i == 8) begin
        d[6*i+1] = 16'(65536 - e[s+1]);
        d[6*i+2] = 16'(65536 - e[s+2]);
      end else begin
        d[6*i+1] = 16'(65536 - e[s+2]);
        d[6*i+2] = 16'(65536 - e[s+1]);
      end
      if (i < 8) begin
        d[6*i+4] = e[6*(7-i)+4];
        d[6*i+5] = e[6*(7-i)+5];
      end
    end
    return d;
  endfunction

  // one round; output with the inner sub-blocks swapped
  function automatic logic [63:0] ref_round(logic [63:0] blk, logic [15:0] k [6]);
    logic [15:0] x1, x2, x3, x4, s1, s2, s3, s4, s7, s8, s9, s10;
    {x1, x2, x3, x4} = blk;
    s1 = ref_mul(x1, k[0]); s2 = x2 + k[1]; s3 = x3 + k[2]; s4 = ref_mul(x4, k[3]);
    s7 = ref_mul(s1 ^ s3, k[4]); s8 = (s2 ^ s4) + s7;
    s9 = ref_mul(s8, k[5]); s10 = s7 + s9;
    return {s1 ^ s9, s3 ^ s9, s2 ^ s10, s4 ^ s10};
  endfunction

  function automatic logic [63:0] ref_out(logic [63:0] blk, logic [15:0] k0, logic [15:0] k1,
                                          logic [15:0] k2, logic [15:0] k3);
    logic [15:0] x1, x2, x3, x4;
    {x1, x2, x3, x4} = blk;
    return {ref_mul(x1, k0), 16'(x3 + k1), 16'(x2 + k2), ref_mul(x4, k3)};
  endfunction

  function automatic logic [63:0] ref_crypt(logic [63:0] blk, ref_keys_t k);
    logic [15:0] rk [6];
    for (int r = 0; r < 8; r++) begin
      for (int i = 0; i < 6; i++) rk[i] = k[6*r+i];
      blk = ref_round(blk, rk);
    end
    return ref_out(blk, k[48], k[49], k[50], k[51]);
  endfunction

endpackage
