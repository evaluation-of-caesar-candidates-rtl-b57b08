// trivia_pkg: Galois-field helpers shared by the Trivia-ck blocks.
//
// GF(2^32) uses p32(x) = x^32 + x^22 + x^2 + x + 1 and GF(2^64) uses
// p64(x) = x^64 + x^4 + x^3 + x + 1. Bit i of a word is the coefficient of
// x^i; multiplying by the primitive element alpha = x is a left shift by one
// and, when the bit shifted out is 1, an xor with the low part of p(x).
// Interface: constants P32_LOW, P64_LOW and the functions mul_alpha32/64
// (one multiplication by alpha, combinational). The shift-and-xor alpha
// multiplication follows the source design; the polynomials are those of
// the Trivia-ck specification, which the source design does not print.
package trivia_pkg;

  localparam logic [31:0] P32_LOW = 32'h0040_0007;   // x^22 + x^2 + x + 1
  localparam logic [63:0] P64_LOW = 64'h0000_0000_0000_001B;  // x^4 + x^3 + x + 1

  function automatic logic [31:0] mul_alpha32(logic [31:0] v);
    return {v[30:0], 1'b0} ^ (v[31] ? P32_LOW : 32'h0);
  endfunction

  function automatic logic [63:0] mul_alpha64(logic [63:0] v);
    return {v[62:0], 1'b0} ^ (v[63] ? P64_LOW : 64'h0);
  endfunction

endpackage
