// trivia_vhorner: VHorner block of Trivia-ck's VPV-Hash - Horner-rule
// evaluation of the D rows of the Vandermonde ECCCode matrix over GF(2^WW).
//
// Word j (0..D-1) accumulates y_j = sum_i alpha^(j*(k-i)) x_i over the inputs
// x_1..x_k: on every `en` cycle y_j <= alpha^j * y_j ^ x (word 0 is a plain
// xor). `clr` zeroes all words. WW = 64 with D = 4 or 3 gives the checksum
// blocks VHorner64/4 and VHorner64/3 (field p64), WW = 32 with D = 5 or 4 the
// tag blocks VHorner32/5 and VHorner32/4 (field p32). Word j is y[j*WW +: WW].
// One register per word; the result of an input is visible the next cycle.
// The Horner structure follows the source design; giving word j the power
// alpha^j (word 0 unmultiplied) is this design's reading of the matrix rows.
module trivia_vhorner #(
  parameter int unsigned WW = 64,
  parameter int unsigned D  = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            clr,
  input  logic            en,
  input  logic [WW-1:0]   x,
  output logic [WW*D-1:0] y
);

  function automatic logic [WW-1:0] mul_alpha_pow(logic [WW-1:0] v, int unsigned n);
    logic [WW-1:0] r;
    r = v;
    for (int unsigned i = 0; i < n; i++)
      if (WW == 64) r = WW'(trivia_pkg::mul_alpha64(64'(r)));
      else          r = WW'(trivia_pkg::mul_alpha32(32'(r)));
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      y <= '0;
    end else if (en) begin
      for (int unsigned j = 0; j < D; j++)
        y[j*WW +: WW] <= mul_alpha_pow(y[j*WW +: WW], j) ^ x;
    end
  end

endmodule
