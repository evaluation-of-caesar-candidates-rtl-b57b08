// trivia_vpvhash: VPV-Hash of Trivia-ck (VPVHash5: 256-bit checksum and
// 160-bit tag with CW = 4, TW = 5; VPVHash4: 192-bit checksum and 128-bit
// tag with CW = 3, TW = 4).
//
// Per `absorb` cycle a 64-bit data block x enters the checksum VHorner64/CW,
// and the multiplexer passes x on. Per `emit` cycle the multiplexer instead
// passes checksum word `word` (0..CW-1). The 64-bit multiplexer output is
// xored with the 64 stream bits k (StExt64); its upper and lower halves are
// the operands A and B of the pipelined GF(2^32) field multiplier, and each
// product, 31 cycles later, enters the tag VHorner32/TW. `busy` is high while
// products are still in the multiplier. `clr` starts a new hash.
// Structure and field sizes follow the source design; the word order of the
// checksum read-out (word 0 first) is this design's choice.
module trivia_vpvhash #(
  parameter int unsigned CW = 4,
  parameter int unsigned TW = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             absorb,
  input  logic             emit,
  input  logic [$clog2(CW)-1:0] word,
  input  logic [63:0]      x,
  input  logic [63:0]      k,
  output logic [64*CW-1:0] checksum,
  output logic [32*TW-1:0] tag,
  output logic             busy
);

  logic [63:0] mux_out, op;
  logic        m_valid, p_valid;
  logic [31:0] prod;
  logic [30:0] inflight;     // one bit per pipeline register in the multiplier

  trivia_vhorner #(.WW(64), .D(CW)) u_checksum (
    .clk, .rst, .clr, .en(absorb), .x(x), .y(checksum));

  assign mux_out = emit ? checksum[64*word +: 64] : x;
  assign op      = mux_out ^ k;
  assign m_valid = absorb || emit;

  trivia_fieldmult u_mult (
    .clk, .rst, .valid_i(m_valid), .a(op[63:32]), .b(op[31:0]),
    .valid_o(p_valid), .p(prod));

  trivia_vhorner #(.WW(32), .D(TW)) u_tag (
    .clk, .rst, .clr, .en(p_valid), .x(prod), .y(tag));

  always_ff @(posedge clk) begin
    if (rst) inflight <= '0;
    else     inflight <= {inflight[29:0], m_valid};
  end
  assign busy = |inflight;

  // a new hash may only start when the multiplier is empty
  assert property (@(posedge clk) disable iff (rst) clr |-> !busy);

endmodule
