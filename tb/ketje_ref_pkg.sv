// ketje_ref_pkg: holds ketje_ref, a bit-level software model of one KECCAK-p round for lane width
// W, used by the Ketje testbenches. Round constants come from the rc[t] LFSR
// (x^8+x^6+x^5+x^4+1) and the rho offsets from the KECCAK offset table, so
// the model shares nothing with the RTL's constant tables.
//
// Interface: static functions ketje_ref#(W)::rc_bit(t) and
// ketje_ref#(W)::round(state, ir), where ir is the absolute round index
// (the start call's rounds are 8..19 of KECCAK-f[400], 6..17 of [200]).
// Timing: none (software model).
package ketje_ref_pkg;

class ketje_ref #(int unsigned W = 16);
  localparam int unsigned B = 25 * W;
  localparam int RHO_TAB [5][5] = '{   // [x][y]
    '{0, 36, 3, 41, 18}, '{1, 44, 10, 45, 2}, '{62, 6, 43, 15, 61},
    '{28, 55, 25, 21, 56}, '{27, 20, 39, 8, 14}};

  // ------------------------------------------------------------ model
  static function bit rc_bit(int t);
    bit [8:0] r;
    if (t % 255 == 0) return 1;
    r = 9'h1;
    for (int i = 1; i <= t % 255; i++) begin
      r = r << 1;
      if (r[8]) r = r ^ 9'h171;   // x^8 + x^6 + x^5 + x^4 + 1
    end
    return r[0];
  endfunction

  static function logic [B-1:0] round(logic [B-1:0] a, int ir);
    logic [B-1:0] t, u, v;
    bit col [5][W];
    int l;
    l = $clog2(W);
    foreach (col[x, z]) col[x][z] = a[W*x+z] ^ a[W*(5+x)+z] ^ a[W*(10+x)+z]
                                    ^ a[W*(15+x)+z] ^ a[W*(20+x)+z];
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) for (int z = 0; z < W; z++)
      t[W*(5*y+x)+z] = a[W*(5*y+x)+z] ^ col[(x+4)%5][z] ^ col[(x+1)%5][(z+W-1)%W];
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) for (int z = 0; z < W; z++)
      // rho then pi: position (y, 2x+3y)
      u[W*(5*((2*x+3*y)%5)+y) + (z + RHO_TAB[x][y]) % W] = t[W*(5*y+x)+z];
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) for (int z = 0; z < W; z++)
      v[W*(5*y+x)+z] = u[W*(5*y+x)+z] ^ (!u[W*(5*y+(x+1)%5)+z] & u[W*(5*y+(x+2)%5)+z]);
    for (int j = 0; j <= l; j++) v[(1 << j) - 1] ^= rc_bit(j + 7 * ir);
    return v;
  endfunction

endclass

endpackage
