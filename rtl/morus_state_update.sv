// morus_state_update: the MORUS StateUpdate function, five rounds in one
// clock cycle (purely combinational; the caller registers the state).
//
// The state is five N-bit blocks s[0..4] (N = 128 for MORUS-640, 256 for
// MORUS-1280); m is the state input (an AD or message block, the length block
// or zero). Round i (0..4) rewrites one block with
//   Rotl_xxx_yy(s[i] ^ (s[i+1] & s[i+2]) ^ s[i+3] ^ m, b_i)
// (indices mod 5, m left out in round 0), where Rotl_xxx_yy rotates each of
// the four N/4-bit words left by b_i, and rotates block s[i+3] left by w_i
// bits as a whole; the other blocks pass unchanged. Rotation constants
// b = 5, 31, 7, 22, 13 (640) or 13, 46, 38, 7, 4 (1280) and
// w = 32, 64, 96, 64, 32 (640) or 64, 128, 192, 128, 64 (1280) are those of
// the source design. Bit k of a block is word k/(N/4), bit k%(N/4); "rotate
// left" moves bit k to bit k+n (mod the width) - this bit order is this
// design's convention.
module morus_state_update #(
  parameter int unsigned N = 128
) (
  input  logic [4:0][N-1:0] s_i,
  input  logic [N-1:0]      m,
  output logic [4:0][N-1:0] s_o
);

  localparam int unsigned WW = N / 4;   // word width of Rotl_xxx_yy

  typedef int unsigned const_t [5];
  localparam const_t B_ROT = (N == 256) ? '{13, 46, 38, 7, 4} : '{5, 31, 7, 22, 13};
  localparam const_t W_ROT = (N == 256) ? '{64, 128, 192, 128, 64} : '{32, 64, 96, 64, 32};

  function automatic logic [N-1:0] rotl_block(logic [N-1:0] v, int unsigned n);
    return (v << n) | (v >> (N - n));
  endfunction

  function automatic logic [N-1:0] rotl_words(logic [N-1:0] v, int unsigned n);
    logic [N-1:0] r;
    for (int unsigned k = 0; k < 4; k++)
      r[k*WW +: WW] = (v[k*WW +: WW] << n) | (v[k*WW +: WW] >> (WW - n));
    return r;
  endfunction

  logic [4:0][N-1:0] st [6];

  always_comb begin
    st[0] = s_i;
    for (int unsigned i = 0; i < 5; i++) begin
      st[i+1] = st[i];
      st[i+1][i] = rotl_words(st[i][i] ^ (st[i][(i+1)%5] & st[i][(i+2)%5]) ^ st[i][(i+3)%5]
                              ^ ((i == 0) ? '0 : m), B_ROT[i]);
      st[i+1][(i+3)%5] = rotl_block(st[i][(i+3)%5], W_ROT[i]);
    end
    s_o = st[5];
  end

endmodule
