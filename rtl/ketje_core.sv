// ketje_core: Ketje authenticated-encryption ciphercore, speed-optimised
// version with the merged "wrap/step" state machine.
//
// The core keeps the whole 25*W-bit MonkeyDuplex state in one register and
// computes one KECCAK-p round per clock (ketje_keccak_round). MonkeyWrap is
// run as follows:
//   init     state = pad10*1(keypack(K) || N) over the full width,
//   start    12 rounds,
//   AD       per block: absorb pad10*1(A_i || frame) into the first r bits,
//            frame "00" (more AD follows) or "01" (last AD block), 1 round,
//   message  per block: C_i = B_i ^ first rho bits of the state, absorb
//            pad10*1(B_i || frame), frame "11", 1 round; on the last block
//            frame "10" and 6 rounds (stride),
//   tag      the first rho bits are a tag piece; while pieces are missing,
//            absorb a padded single "0" bit and run 1 round.
// A bit string is laid out LSB first: byte k of bdi/bdo/key/npub is bits
// [8k+7:8k], and string bit j is state bit j (s[x,y,z] at W*(5y+x)+z).
// Frame-bit strings are written first character first.
//
// W = 16 is KetjeSr (rho = 32-bit blocks, 128-bit key, 128-bit nonce, four tag
// pieces); W = 8 is KetjeJr (16-bit blocks, 96-bit key, 80-bit nonce, six
// pieces). The round constants, rate r = rho + 4, keypack (length byte, key,
// 10* byte), frame bits, and piece counts follow the source design; the
// handshake below, the byte-count padding input and the single-cycle
// per-state timing are this design's choices.
//
// Interface (AEAD ciphercore style): the pre-processor holds `key` and `npub`
// stable while key_ready / npub_ready are high. Blocks arrive on bdi with
// bdi_size valid bytes (0..rho/8, LSB first) and bdi_eot on the last block of
// a type: first the AD blocks, then the message (or ciphertext) blocks. An
// empty AD or message is sent as one block with bdi_size = 0 and bdi_eot = 1.
// A block is taken in the cycle bdi_ready && bdi_read. bdo is valid with
// bdo_write (bytes beyond bdo_size are zero). In the final state the tag is
// written (tag_write when tag_ready) or, with bdi_decrypt, compared with
// exp_tag (msg_auth_done, msg_auth_valid).
// Timing: 3 cycles per AD/message block (wait, wrap, step) when the
// pre-processor is always ready; 12 rounds for start, 6 for the stride.
// From taking the nonce to the tag: 3 cycles per block plus 26 (KetjeSr)
// or 30 (KetjeJr) cycles. The source design quotes 27 and 30.
module ketje_core #(
  parameter int unsigned W          = 16,
  parameter int unsigned KEY_BITS   = (W == 8) ? 96 : 128,
  parameter int unsigned NONCE_BITS = (W == 8) ? 80 : 128,
  parameter int unsigned TAG_WORDS  = (W == 8) ? 6 : 4,
  localparam int unsigned B         = 25 * W,
  localparam int unsigned RHO       = 2 * W,
  localparam int unsigned R         = RHO + 4,
  localparam int unsigned TAG_BITS  = TAG_WORDS * RHO,
  localparam int unsigned SZW       = $clog2(RHO / 8 + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  // key and public message number from the pre-processor
  input  logic [KEY_BITS-1:0]   key,
  input  logic                  key_ready,
  output logic                  key_updated,
  input  logic [NONCE_BITS-1:0] npub,
  input  logic                  npub_ready,
  output logic                  npub_read,
  // block data input
  input  logic [RHO-1:0]        bdi,
  input  logic [SZW-1:0]        bdi_size,
  input  logic                  bdi_eot,
  input  logic                  bdi_ready,
  input  logic                  bdi_decrypt,
  output logic                  bdi_read,
  // block data output
  output logic [RHO-1:0]        bdo,
  output logic [SZW-1:0]        bdo_size,
  output logic                  bdo_write,
  input  logic                  bdo_ready,
  // tag
  output logic [TAG_BITS-1:0]   tag,
  output logic                  tag_write,
  input  logic                  tag_ready,
  input  logic [TAG_BITS-1:0]   exp_tag,
  output logic                  msg_auth_done,
  output logic                  msg_auth_valid
);

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT_NPUB, S_INIT, S_START, S_WAIT_AD, S_WRAP, S_STEP,
    S_WAIT_M, S_GENTAG, S_INCCOUNTER, S_PADTAG, S_FINAL
  } state_e;

  state_e               st;
  logic [B-1:0]         s;            // MonkeyDuplex state
  logic [B-1:0]         s_round;      // state after one round
  logic [W-1:0]         rc;
  logic [3:0]           cnt;          // round counter
  logic [3:0]           rc_idx;
  logic [$clog2(TAG_WORDS+1)-1:0] tagcount;
  logic [RHO-1:0]       d_reg;        // input block register
  logic [SZW-1:0]       size_reg;
  logic [1:0]           frame_reg;    // frame_reg[0] is the first frame bit
  logic                 last_reg;
  logic                 msg_phase;    // 0: AD, 1: message
  logic                 dec_reg;
  logic [TAG_BITS-1:0]  tag_buf;

  // ---------------------------------------------------------------- helpers
  function automatic logic [RHO-1:0] byte_mask(logic [SZW-1:0] n);
    logic [RHO-1:0] m;
    m = '0;
    for (int unsigned k = 0; k < RHO / 8; k++)
      if (k < n) m[8*k +: 8] = 8'hFF;
    return m;
  endfunction

  // pad10*1 over r bits of (data[8n-1:0] || f0 || f1)
  function automatic logic [R-1:0] pad_block(logic [RHO-1:0] data, logic [SZW-1:0] n,
                                             logic [1:0] frame);
    logic [R-1:0] p;
    p = {4'b0000, data & byte_mask(n)};
    p[8*n]     = frame[0];
    p[8*n + 1] = frame[1];
    p[8*n + 2] = 1'b1;
    p[R-1]     = p[R-1] ^ 1'b1;
    return p;
  endfunction

  // pad10*1 over the full width of (keypack(K) || N)
  function automatic logic [B-1:0] start_input(logic [KEY_BITS-1:0] k,
                                               logic [NONCE_BITS-1:0] n);
    localparam int unsigned KP = KEY_BITS + 16;
    logic [B-1:0] v;
    v = '0;
    v[7:0]                   = 8'(KP / 8);
    v[8 +: KEY_BITS]         = k;
    v[8 + KEY_BITS +: 8]     = 8'h01;
    v[KP +: NONCE_BITS]      = n;
    v[KP + NONCE_BITS]       = 1'b1;
    v[B-1]                   = 1'b1;
    return v;
  endfunction

  // ---------------------------------------------------------------- round
  always_comb begin
    unique case (st)
      S_START:  rc_idx = cnt;
      S_GENTAG: rc_idx = 4'(ketje_pkg::N_START - ketje_pkg::N_STRIDE) + cnt;
      default:  rc_idx = 4'(ketje_pkg::N_START - ketje_pkg::N_STEP);
    endcase
    rc = W'(ketje_pkg::round_const(W, rc_idx));
  end

  ketje_keccak_round #(.W(W)) u_round (.state_i(s), .rc(rc), .state_o(s_round));

  // ---------------------------------------------------------------- wrap data
  logic [RHO-1:0] z;          // first rho bits of the state (key stream)
  logic [RHO-1:0] xor_out;    // ciphertext (encrypt) or plaintext (decrypt)
  logic [RHO-1:0] absorbed;   // plaintext block that enters the state
  logic [R-1:0]   padded;
  assign z        = s[RHO-1:0];
  assign xor_out  = (d_reg ^ z) & byte_mask(size_reg);
  assign absorbed = (msg_phase && dec_reg) ? xor_out : d_reg;
  assign padded   = pad_block(absorbed, size_reg, frame_reg);

  // ---------------------------------------------------------------- control
  always_comb begin
    key_updated    = (st == S_WAIT_NPUB) && npub_ready;
    npub_read      = (st == S_WAIT_NPUB) && npub_ready;
    bdi_read       = ((st == S_WAIT_AD) && bdi_ready) ||
                     ((st == S_WAIT_M) && bdi_ready && bdo_ready);
    bdo            = xor_out;
    bdo_size       = size_reg;
    bdo_write      = (st == S_WRAP) && msg_phase;
    tag            = tag_buf;
    tag_write      = (st == S_FINAL) && !dec_reg && tag_ready;
    msg_auth_done  = (st == S_FINAL) && dec_reg;
    msg_auth_valid = (st == S_FINAL) && dec_reg && (tag_buf == exp_tag);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      s         <= '0;
      cnt       <= '0;
      tagcount  <= '0;
      d_reg     <= '0;
      size_reg  <= '0;
      frame_reg <= '0;
      last_reg  <= 1'b0;
      msg_phase <= 1'b0;
      dec_reg   <= 1'b0;
      tag_buf   <= '0;
    end else begin
      unique case (st)
        S_IDLE:      if (key_ready) st <= S_WAIT_NPUB;
        S_WAIT_NPUB: if (npub_ready) st <= S_INIT;
        S_INIT: begin
          s         <= start_input(key, npub);
          cnt       <= '0;
          msg_phase <= 1'b0;
          tagcount  <= '0;
          st        <= S_START;
        end
        S_START: begin
          s   <= s_round;
          cnt <= cnt + 1'b1;
          if (cnt == 4'(ketje_pkg::N_START - 1)) st <= S_WAIT_AD;
        end
        S_WAIT_AD, S_WAIT_M: begin
          if (bdi_read) begin
            d_reg     <= bdi;
            size_reg  <= bdi_size;
            last_reg  <= bdi_eot;
            dec_reg   <= bdi_decrypt;
            // AD: "00" / last "01"; message: "11" / last "10"
            frame_reg <= (st == S_WAIT_AD) ? {bdi_eot, 1'b0} : {!bdi_eot, 1'b1};
            st        <= S_WRAP;
          end
        end
        S_WRAP: begin
          s[R-1:0] <= s[R-1:0] ^ padded;
          cnt      <= '0;
          st       <= (msg_phase && last_reg) ? S_GENTAG : S_STEP;
        end
        S_STEP: begin
          s <= s_round;
          if (last_reg) msg_phase <= 1'b1;
          st <= (last_reg || msg_phase) ? S_WAIT_M : S_WAIT_AD;
        end
        S_GENTAG: begin
          s   <= s_round;
          cnt <= cnt + 1'b1;
          if (cnt == 4'(ketje_pkg::N_STRIDE - 1)) st <= S_INCCOUNTER;
        end
        S_INCCOUNTER: begin
          tag_buf[tagcount*RHO +: RHO] <= z;
          tagcount <= tagcount + 1'b1;
          if (tagcount == ($bits(tagcount))'(TAG_WORDS - 1)) begin
            st <= S_FINAL;
          end else begin
            // absorb pad10*1 of the single bit "0"
            s[1]   <= s[1] ^ 1'b1;
            s[R-1] <= s[R-1] ^ 1'b1;
            st     <= S_PADTAG;
          end
        end
        S_PADTAG: begin
          s  <= s_round;
          st <= S_INCCOUNTER;
        end
        S_FINAL: if (dec_reg || tag_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // A block is only taken while the core waits for one.
  assert property (@(posedge clk) disable iff (rst)
                   bdi_read |-> (st == S_WAIT_AD || st == S_WAIT_M));

endmodule
