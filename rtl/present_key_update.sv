// Key module: one step of the 80-bit PRESENT key schedule, forward or inverse.
//
// The design names key rotation and key replacement as the two main actions
// on the key; this block performs both, plus the round-counter XOR of the
// PRESENT schedule, in one combinational step:
//   forward  (K_r -> K_r+1):  k = k <<< 61;  k[79:76] = S(k[79:76]);
//                             k[19:15] ^= rc
//   inverse  (K_r+1 -> K_r):  k[19:15] ^= rc; k[79:76] = S^-1(k[79:76]);
//                             k = k >>> 61
// `rc` is the number r of the round that has just used K_r (1..31). The
// replacement uses a single present_sbox lookup table shared by both
// directions. The inverse step is this design's choice: it lets decryption
// walk the round keys backwards without storing them.
module present_key_update
  import present_pkg::*;
(
  input  key_t k_in,
  input  rc_t  rc,
  input  logic inverse,
  output key_t k_out
);

  key_t       rot;    // forward: rotated key
  key_t       pre;    // inverse: key with counter removed
  logic [3:0] sb_in, sb_out;

  assign rot   = {k_in[18:0], k_in[79:19]};
  assign pre   = {k_in[79:20], k_in[19:15] ^ rc, k_in[14:0]};
  assign sb_in = inverse ? pre[79:76] : rot[79:76];

  present_sbox u_sbox (
    .inverse (inverse),
    .x       (sb_in),
    .y       (sb_out)
  );

  always_comb begin
    key_t t;
    if (!inverse) begin
      t        = rot;
      t[79:76] = sb_out;
      t[19:15] = t[19:15] ^ rc;
    end else begin
      t        = pre;
      t[79:76] = sb_out;
      t        = {t[60:0], t[79:61]};
    end
    k_out = t;
  end

endmodule
