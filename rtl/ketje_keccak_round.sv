// ketje_keccak_round: one KECCAK-p round on a 25*W-bit state, purely
// combinational (the speed-optimised round of the Ketje ciphercore).
//
// State bit i = W*(5*y + x) + z holds s[x,y,z]. The round applies
//   theta : every bit is xored with the parities of columns x-1 (slice z)
//           and x+1 (slice z-1),
//   rho   : lane (x,y) is rotated towards higher z by its offset mod W,
//   pi    : lane (x,y) moves to (y, 2x+3y),
//   chi   : a[x] ^= ~a[x+1] & a[x+2] along every row,
//   iota  : the round constant `rc` is xored into lane (0,0).
// W = 16 gives KECCAK-p[400] (KetjeSr), W = 8 gives KECCAK-p[200] (KetjeJr).
// Interface: state_i, rc -> state_o, no clock; the caller registers the result,
// so a full round takes one clock cycle as in the source design.
module ketje_keccak_round #(
  parameter int unsigned W = 16
) (
  input  logic [25*W-1:0] state_i,
  input  logic [W-1:0]    rc,
  output logic [25*W-1:0] state_o
);

  typedef logic [W-1:0] lane_t;

  function automatic lane_t rotl(lane_t v, int unsigned n);
    int unsigned k;
    k = n % W;
    if (k == 0) return v;
    return (v << k) | (v >> (W - k));
  endfunction

  lane_t a [5][5];
  lane_t b [5][5];
  lane_t c [5];
  lane_t d [5];
  lane_t e [5][5];

  always_comb begin
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x][y] = state_i[W*(5*y+x) +: W];
    // theta
    for (int x = 0; x < 5; x++)
      c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    // rho and pi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y][(2*x+3*y)%5] = rotl(a[x][y] ^ d[x], ketje_pkg::rho_offset(x, y));
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        e[x][y] = b[x][y] ^ (~b[(x+1)%5][y] & b[(x+2)%5][y]);
    // iota
    e[0][0] = e[0][0] ^ rc;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        state_o[W*(5*y+x) +: W] = e[x][y];
  end

endmodule
