// morus_ref_pkg: software model of the MORUS StateUpdate, written round by
// round from the five-round description (rotate / shift / pass), with the
// state held as 4-word arrays. Used by the MORUS testbenches.
//
// Interface: static functions morus_ref#(N)::rot_words, rot_block and
// update(state, input). Rotations follow the MORUS constants for
// MORUS-640 and MORUS-1280; rotation (not shift) is this design's reading.
// Timing: none (software model).
package morus_ref_pkg;

class morus_ref #(int unsigned N = 128);
  localparam int unsigned WW = N / 4;
  typedef logic [N-1:0] blk_t;
  typedef blk_t state_t [5];

  static function blk_t rot_words(blk_t v, int b);
    blk_t r;
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < WW; j++)
        r[k*WW + (j + b) % WW] = v[k*WW + j];
    return r;
  endfunction

  static function blk_t rot_block(blk_t v, int w);
    blk_t r;
    for (int j = 0; j < N; j++) r[(j + w) % N] = v[j];
    return r;
  endfunction

  static function void update(ref state_t s, input blk_t m);
    int b [5], w [5];
    if (N == 256) begin
      b = '{13, 46, 38, 7, 4}; w = '{64, 128, 192, 128, 64};
    end else begin
      b = '{5, 31, 7, 22, 13}; w = '{32, 64, 96, 64, 32};
    end
    // round 1 (no message input)
    s[0] = rot_words(s[0] ^ (s[1] & s[2]) ^ s[3], b[0]);
    s[3] = rot_block(s[3], w[0]);
    // round 2
    s[1] = rot_words(s[1] ^ (s[2] & s[3]) ^ s[4] ^ m, b[1]);
    s[4] = rot_block(s[4], w[1]);
    // round 3
    s[2] = rot_words(s[2] ^ (s[3] & s[4]) ^ s[0] ^ m, b[2]);
    s[0] = rot_block(s[0], w[2]);
    // round 4
    s[3] = rot_words(s[3] ^ (s[4] & s[0]) ^ s[1] ^ m, b[3]);
    s[1] = rot_block(s[1], w[3]);
    // round 5
    s[4] = rot_words(s[4] ^ (s[0] & s[1]) ^ s[2] ^ m, b[4]);
    s[2] = rot_block(s[2], w[4]);
  endfunction
endclass

endpackage
