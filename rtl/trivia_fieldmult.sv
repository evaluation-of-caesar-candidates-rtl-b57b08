// trivia_fieldmult: pipelined GF(2^32) multiplier of Trivia-ck's VPV-Hash
// (speed-optimised version).
//
// The product is built by Horner's rule over the bits of B, most significant
// first, with one FM block per bit: an FM block xors A into the running
// result when its bit of B is 1 and then multiplies by alpha; the last FM
// block (bit 0) has no alpha multiplication. A register follows each of the
// first 31 FM blocks, so a new operand pair can enter every cycle and its
// product appears on `p` (with `valid_o`) 31 cycles later, straight from the
// last FM block. A and B travel down the pipeline with the partial result so
// that each stage works on its own operands (the source design draws A as
// one shared wire; registering it is this design's choice).
module trivia_fieldmult (
  input  logic        clk,
  input  logic        rst,
  input  logic        valid_i,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        valid_o,
  output logic [31:0] p
);

  localparam int unsigned STAGES = 32;   // one FM block per bit of B

  logic [31:0] r_q [STAGES-1];   // partial results after FM blocks 0..STAGES-2
  logic [31:0] a_q [STAGES-1];
  logic [31:0] b_q [STAGES-1];
  logic        v_q [STAGES-1];

  // FM block: select (result ^ A) or result by one bit of B, then times alpha
  function automatic logic [31:0] fm(logic [31:0] r, logic [31:0] av, logic bit_n, logic last);
    logic [31:0] m;
    m = bit_n ? (r ^ av) : r;
    return last ? m : trivia_pkg::mul_alpha32(m);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < STAGES - 1; i++) begin
        r_q[i] <= '0; a_q[i] <= '0; b_q[i] <= '0; v_q[i] <= 1'b0;
      end
    end else begin
      r_q[0] <= fm(32'h0, a, b[STAGES-1], 1'b0);
      a_q[0] <= a;
      b_q[0] <= b;
      v_q[0] <= valid_i;
      for (int i = 1; i < STAGES - 1; i++) begin
        r_q[i] <= fm(r_q[i-1], a_q[i-1], b_q[i-1][STAGES-1-i], 1'b0);
        a_q[i] <= a_q[i-1];
        b_q[i] <= b_q[i-1];
        v_q[i] <= v_q[i-1];
      end
    end
  end

  assign p       = fm(r_q[STAGES-2], a_q[STAGES-2], b_q[STAGES-2][0], 1'b1);
  assign valid_o = v_q[STAGES-2];

endmodule
