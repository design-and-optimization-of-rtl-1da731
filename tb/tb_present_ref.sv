// Reference model of the PRESENT-80 cipher for the testbenches.
//
// Written independently of the RTL: the S-box is read from a packed nibble
// string, the permutation is computed bit by bit from its formula, and all 32
// round keys are expanded into an array up front. Encryption and decryption
// follow the textbook description of the cipher.
package tb_present_ref;

  // S[x] is nibble x counted from the left of this constant.
  localparam logic [63:0] SBOX_STR = 64'hC56B_90AD_3EF8_4712;

  function automatic logic [3:0] ref_s(logic [3:0] x);
    return SBOX_STR[63 - 4*x -: 4];
  endfunction

  function automatic logic [3:0] ref_s_inv(logic [3:0] y);
    for (int x = 0; x < 16; x++) if (ref_s(4'(x)) == y) return 4'(x);
    return 4'h0;
  endfunction

  function automatic logic [63:0] ref_slayer(logic [63:0] s);
    logic [63:0] o;
    for (int n = 0; n < 16; n++) o[4*n +: 4] = ref_s(s[4*n +: 4]);
    return o;
  endfunction

  function automatic logic [63:0] ref_slayer_inv(logic [63:0] s);
    logic [63:0] o;
    for (int n = 0; n < 16; n++) o[4*n +: 4] = ref_s_inv(s[4*n +: 4]);
    return o;
  endfunction

  function automatic logic [63:0] ref_perm(logic [63:0] s);
    logic [63:0] o;
    for (int i = 0; i < 64; i++) o[(i == 63) ? 63 : ((i * 16) % 63)] = s[i];
    return o;
  endfunction

  function automatic logic [63:0] ref_perm_inv(logic [63:0] s);
    logic [63:0] o;
    for (int i = 0; i < 64; i++) o[i] = s[(i == 63) ? 63 : ((i * 16) % 63)];
    return o;
  endfunction

  // One forward key-schedule step after round `rc`.
  function automatic logic [79:0] ref_key_next(logic [79:0] k, int rc);
    logic [79:0] t;
    t = (k << 61) | (k >> 19);
    t[79:76] = ref_s(t[79:76]);
    t[19:15] = t[19:15] ^ 5'(rc);
    return t;
  endfunction

  typedef logic [79:0] rk_array_t [1:32];

  function automatic rk_array_t ref_round_keys(logic [79:0] key);
    rk_array_t rk;
    rk[1] = key;
    for (int r = 1; r <= 31; r++) rk[r+1] = ref_key_next(rk[r], r);
    return rk;
  endfunction

  function automatic logic [63:0] ref_encrypt(logic [63:0] pt, logic [79:0] key);
    rk_array_t   rk = ref_round_keys(key);
    logic [63:0] s  = pt;
    for (int r = 1; r <= 31; r++) s = ref_perm(ref_slayer(s ^ rk[r][79:16]));
    return s ^ rk[32][79:16];
  endfunction

  function automatic logic [63:0] ref_decrypt(logic [63:0] ct, logic [79:0] key);
    rk_array_t   rk = ref_round_keys(key);
    logic [63:0] s  = ct ^ rk[32][79:16];
    for (int r = 31; r >= 1; r--) s = ref_slayer_inv(ref_perm_inv(s)) ^ rk[r][79:16];
    return s;
  endfunction

  function automatic logic [79:0] rand_key();
    return {16'($urandom), $urandom, $urandom};
  endfunction

  function automatic logic [63:0] rand_block();
    return {$urandom, $urandom};
  endfunction

endpackage
