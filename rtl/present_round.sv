// One PRESENT round on the 64-bit state, forward or inverse.
//
// Forward (encryption):  out = pLayer(sLayer(in ^ RK))
// Inverse (decryption):  out = sLayer^-1(pLayer^-1(in)) ^ RK
// RK (`rk64`) is the leftmost 64 bits of the 80-bit key register. The substitution
// layer is sixteen copies of the present_sbox lookup table, shared by both
// directions through input and output multiplexers. Purely combinational.
// The round structure is that of the published PRESENT cipher.
module present_round
  import present_pkg::*;
(
  input  block_t s_in,
  input  block_t rk64,
  input  logic   inverse,
  output block_t s_out
);

  block_t sb_in, sb_out;

  assign sb_in = inverse ? inv_player(s_in) : (s_in ^ rk64);

  for (genvar n = 0; n < BLOCK_W / 4; n++) begin : g_sbox
    present_sbox u_sbox (
      .inverse (inverse),
      .x       (sb_in[4*n +: 4]),
      .y       (sb_out[4*n +: 4])
    );
  end

  assign s_out = inverse ? (sb_out ^ rk64) : player(sb_out);

endmodule
