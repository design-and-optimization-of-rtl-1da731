// Shared types, sizes and the bit permutation of the PRESENT-80 block cipher.
//
// The cipher works on a 64-bit block with an 80-bit key and 31 rounds. The
// block and key widths are the design's stated ones; the round count, the bit
// permutation (pLayer) and the S-box contents (see present_sbox) are those of
// the published PRESENT cipher, which the design uses unchanged.
//
// pLayer: bit i of the input goes to bit P(i) = 16*i mod 63 of the output for
// i < 63, and bit 63 stays in place. inv_player undoes it. The 64-bit round
// key is always the leftmost 64 bits of the 80-bit key register.
package present_pkg;

  localparam int unsigned BLOCK_W    = 64;
  localparam int unsigned KEY_W      = 80;
  localparam int unsigned NUM_ROUNDS = 31;
  localparam int unsigned RC_W       = 5;   // round counter width

  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [KEY_W-1:0]   key_t;
  typedef logic [RC_W-1:0]    rc_t;

  // Destination of bit i under the pLayer.
  function automatic int unsigned p_index(int unsigned i);
    return (i == BLOCK_W - 1) ? i : (16 * i) % (BLOCK_W - 1);
  endfunction

  function automatic block_t player(block_t x);
    block_t y;
    for (int unsigned i = 0; i < BLOCK_W; i++) y[p_index(i)] = x[i];
    return y;
  endfunction

  function automatic block_t inv_player(block_t x);
    block_t y;
    for (int unsigned i = 0; i < BLOCK_W; i++) y[i] = x[p_index(i)];
    return y;
  endfunction

endpackage
