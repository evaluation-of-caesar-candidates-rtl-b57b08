// trivia_ck_core: Trivia-ck (first-round version, ck = 0) authenticated-
// encryption ciphercore, speed-optimised: 64 Trivia-SC iterations per clock
// and a pipelined field multiplier in each VPV-Hash.
//
// Data path: the Trivia-SC state (trivia_sc), VPVHash5 for the associated
// data (256-bit checksum, 160-bit intermediate tag) and VPVHash4 for the
// message (192-bit checksum, 128-bit tag), and a one-hot counter (a 36-bit
// shift register whose single 1 moves left on each counted cycle, so every
// compare tests one bit). The state machine runs
//   load       key and nonce into the state,
//   init       18 x Update64,
//   loop1      per AD block: VPVHash5 absorbs the block with StExt64 as the
//              multiplier key, then Update64,
//   loop1end   4 cycles: the 4 checksum words go through the multiplier, each
//              with StExt64 and an Update64; the KeyExt64 outputs of the
//              first three cycles form the 160-bit mask K_D*,
//   update T   32 cycles that empty the multiplier pipeline,
//   midstate   intermediate tag = VPVHash5 tag ^ K_D*, xored into A and the
//              first 28 bits of B (Insert),
//   init       18 x Update64 again,
//   loop2      per message block: C = M ^ KeyExt64; VPVHash4 absorbs the
//              plaintext with StExt64, then Update64,
//   loop2end   3 cycles for the 3 checksum words; KeyExt64 of the first and
//              last cycle form the 128-bit mask K_M*,
//   update Tag 32 cycles to empty the pipeline,
//   final      tag = VPVHash4 tag ^ K_M*; write it, or compare it when
//              decrypting.
// Blocks are 64 bits, LSB first (byte k at bits [8k+7:8k]). A short or empty
// last block is padded 10* (a 1 at bit 8*size, then zeros) before hashing;
// the ciphertext keeps only the valid bytes. The sequence and the counts
// follow the source design; which KeyExt64 outputs build each mask, the
// checksum word order, the padding of message blocks and the handshake are
// this design's choices.
//
// Interface: as the other ciphercores (key and npub held while *_ready;
// blocks on bdi with bdi_size valid bytes, bdi_eot on the last block of a
// type, AD first, then message; an empty type is one block of size 0).
// npub is the 128-bit IV (param and public number together).
// Timing: 2 cycles per AD or message block (wait, loop) with ready inputs;
// 110 fixed cycles from load to final.
// Lint note: the checksum outputs of both VPV-Hash instances (h5_ck, h4_ck)
// are connected but unused here; the core only needs the checksum words as
// they are fed back through the hash's own multiplexer. The outputs stay
// on trivia_vpvhash so the hash can be checked on its own.
module trivia_ck_core (
  input  logic         clk,
  input  logic         rst,
  input  logic [127:0] key,
  input  logic         key_ready,
  output logic         key_updated,
  input  logic [127:0] npub,
  input  logic         npub_ready,
  output logic         npub_read,
  input  logic [63:0]  bdi,
  input  logic [3:0]   bdi_size,
  input  logic         bdi_eot,
  input  logic         bdi_ready,
  input  logic         bdi_decrypt,
  output logic         bdi_read,
  output logic [63:0]  bdo,
  output logic [3:0]   bdo_size,
  output logic         bdo_write,
  input  logic         bdo_ready,
  output logic [127:0] tag,
  output logic         tag_write,
  input  logic         tag_ready,
  input  logic [127:0] exp_tag,
  output logic         msg_auth_done,
  output logic         msg_auth_valid
);

  localparam int unsigned N_INIT  = 18;   // Update64 calls per initialisation
  localparam int unsigned N_FLUSH = 32;   // cycles to empty the multiplier
  localparam int unsigned CNT_W   = 36;

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT_NPUB, S_LOAD, S_INIT, S_WAIT_AD, S_LOOP1, S_LOOP1END, S_UPDATE_T,
    S_MIDSTATE, S_WAIT_M, S_LOOP2, S_LOOP2END, S_UPDATE_TAG, S_FINAL
  } state_e;

  state_e         st;
  logic           msg_phase;          // second init leads to the message
  logic [CNT_W-1:0] cnt;              // one-hot counter
  logic           cnt_rst, cnt_en;
  logic [63:0]    d_reg;
  logic [3:0]     size_reg;
  logic           last_reg, dec_reg;
  logic [63:0]    ks [3];             // KeyExt64 outputs kept for the masks

  // Trivia-SC
  logic           sc_load, sc_insert, sc_update;
  logic [159:0]   itag;
  logic [63:0]    keyext, stext;

  trivia_sc #(.ITAG(160)) u_sc (
    .clk, .rst, .load(sc_load), .key, .iv(npub), .insert(sc_insert), .itag,
    .update(sc_update), .keyext, .stext);

  // VPV-Hash blocks
  logic           h5_absorb, h5_emit, h4_absorb, h4_emit, h5_busy, h4_busy, h_clr;
  logic [1:0]     word;
  logic [255:0]   h5_ck;
  logic [191:0]   h4_ck;
  logic [159:0]   h5_tag;
  logic [127:0]   h4_tag;
  logic [63:0]    m_blk;              // padded plaintext block for the hash

  trivia_vpvhash #(.CW(4), .TW(5)) u_vpv5 (
    .clk, .rst, .clr(h_clr), .absorb(h5_absorb), .emit(h5_emit), .word(word),
    .x(d_reg), .k(stext), .checksum(h5_ck), .tag(h5_tag), .busy(h5_busy));

  trivia_vpvhash #(.CW(3), .TW(4)) u_vpv4 (
    .clk, .rst, .clr(h_clr), .absorb(h4_absorb), .emit(h4_emit), .word(word),
    .x(m_blk), .k(stext), .checksum(h4_ck), .tag(h4_tag), .busy(h4_busy));

  function automatic logic [63:0] byte_mask(logic [3:0] n);
    logic [63:0] m;
    m = '0;
    for (int unsigned i = 0; i < 8; i++) if (i < n) m[8*i +: 8] = 8'hFF;
    return m;
  endfunction

  // 10* padding of a block with n valid bytes (full blocks unchanged)
  function automatic logic [63:0] pad10(logic [63:0] v, logic [3:0] n);
    logic [63:0] r;
    r = v & byte_mask(n);
    if (n < 4'd8) r[8*n] = 1'b1;
    return r;
  endfunction

  logic [63:0] xor_out;
  assign xor_out = (d_reg ^ keyext) & byte_mask(size_reg);
  assign m_blk   = pad10(dec_reg ? xor_out : d_reg, size_reg);
  assign itag    = h5_tag ^ {ks[2][31:0], ks[1], ks[0]};

  // binary index of the one-hot counter for the checksum words
  assign word = cnt[1] ? 2'd1 : cnt[2] ? 2'd2 : cnt[3] ? 2'd3 : 2'd0;

  always_comb begin
    sc_load    = (st == S_LOAD);
    sc_insert  = (st == S_MIDSTATE);
    sc_update  = (st == S_INIT) || (st == S_LOOP1) || (st == S_LOOP1END) ||
                 (st == S_LOOP2) || (st == S_LOOP2END);
    h_clr      = (st == S_LOAD);
    h5_absorb  = (st == S_LOOP1);
    h5_emit    = (st == S_LOOP1END);
    h4_absorb  = (st == S_LOOP2);
    h4_emit    = (st == S_LOOP2END);
    cnt_en     = (st == S_INIT) || (st == S_LOOP1END) || (st == S_UPDATE_T) ||
                 (st == S_LOOP2END) || (st == S_UPDATE_TAG);
    cnt_rst    = (st == S_LOAD) || (st == S_WAIT_AD) || (st == S_WAIT_M) ||
                 (st == S_MIDSTATE) ||
                 ((st == S_LOOP1END) && cnt[3]) || ((st == S_LOOP2END) && cnt[2]);
    key_updated    = (st == S_WAIT_NPUB) && npub_ready;
    npub_read      = (st == S_WAIT_NPUB) && npub_ready;
    bdi_read       = ((st == S_WAIT_AD) && bdi_ready) ||
                     ((st == S_WAIT_M) && bdi_ready && bdo_ready);
    bdo            = xor_out;
    bdo_size       = size_reg;
    bdo_write      = (st == S_LOOP2) && (size_reg != 4'd0);
    tag            = h4_tag ^ {ks[2], ks[0]};
    tag_write      = (st == S_FINAL) && !dec_reg && tag_ready;
    msg_auth_done  = (st == S_FINAL) && dec_reg;
    msg_auth_valid = (st == S_FINAL) && dec_reg && (tag == exp_tag);
  end

  always_ff @(posedge clk) begin
    if (rst || cnt_rst) cnt <= CNT_W'(1);
    else if (cnt_en)    cnt <= {cnt[CNT_W-2:0], 1'b0};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      msg_phase <= 1'b0;
      d_reg     <= '0;
      size_reg  <= '0;
      last_reg  <= 1'b0;
      dec_reg   <= 1'b0;
      for (int i = 0; i < 3; i++) ks[i] <= '0;
    end else begin
      unique case (st)
        S_IDLE:      if (key_ready) st <= S_WAIT_NPUB;
        S_WAIT_NPUB: if (npub_ready) st <= S_LOAD;
        S_LOAD: begin
          msg_phase <= 1'b0;
          st        <= S_INIT;
        end
        S_INIT: if (cnt[N_INIT-1]) st <= msg_phase ? S_WAIT_M : S_WAIT_AD;
        S_WAIT_AD: if (bdi_read) begin
          d_reg    <= pad10(bdi, bdi_size);
          size_reg <= bdi_size;
          last_reg <= bdi_eot;
          dec_reg  <= bdi_decrypt;
          st       <= S_LOOP1;
        end
        S_LOOP1: st <= last_reg ? S_LOOP1END : S_WAIT_AD;
        S_LOOP1END: begin
          if (!cnt[3]) ks[word] <= keyext;
          if (cnt[3]) st <= S_UPDATE_T;
        end
        S_UPDATE_T: if (cnt[N_FLUSH-1]) st <= S_MIDSTATE;
        S_MIDSTATE: begin
          msg_phase <= 1'b1;
          st        <= S_INIT;
        end
        S_WAIT_M: if (bdi_read) begin
          d_reg    <= bdi & byte_mask(bdi_size);
          size_reg <= bdi_size;
          last_reg <= bdi_eot;
          dec_reg  <= bdi_decrypt;
          st       <= S_LOOP2;
        end
        S_LOOP2: st <= last_reg ? S_LOOP2END : S_WAIT_M;
        S_LOOP2END: begin
          if (cnt[0]) ks[0] <= keyext;
          if (cnt[2]) begin
            ks[2] <= keyext;
            st    <= S_UPDATE_TAG;
          end
        end
        S_UPDATE_TAG: if (cnt[N_FLUSH-1]) st <= S_FINAL;
        S_FINAL: if (dec_reg || tag_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // the intermediate tag is inserted and the final tag read only once the
  // multiplier pipelines are empty
  assert property (@(posedge clk) disable iff (rst) (st == S_MIDSTATE) |-> !h5_busy);
  assert property (@(posedge clk) disable iff (rst) (st == S_FINAL) |-> !h4_busy);

endmodule
