// morus_core: MORUS authenticated-encryption ciphercore (MORUS-640-128 with
// N = 128, MORUS-1280-128 with N = 256).
//
// The five N-bit state blocks live in registers and morus_state_update
// performs one full StateUpdate (five rounds) per clock. The sequence is
//   load      s0 = npub (zero-padded), s1 = key (key||key for N = 256),
//             s2 = all ones, s3/s4 = the Fibonacci constant (MORUS-640: its
//             low and high 128 bits; MORUS-1280: s3 = 0, s4 = all 256 bits),
//   init      16 updates with input 0, then s1 ^= key ("init last"),
//   AD        per block: one update with the zero-padded block as input,
//   message   per block: out = in ^ s0 ^ (s1 <<< 3N/4) ^ (s2 & s3); one update
//             with the plaintext (the input when encrypting, the output,
//             cut to the valid bytes, when decrypting),
//   tag       s4 ^= s0, 8 updates with input {mlen, adlen} in bits (64 bits
//             each, zero-padded to N), tag = low 128 bits of s1^s2^s3^s4.
// The constant has byte i = Fibonacci(i) mod 256 (F(0) = 0, F(1) = 1), byte i
// at bits [8i+7:8i]. Block data is LSB-first in the same way.
// The order of steps, the state machine (wait, proc, [dec], round per block;
// tag load, tag proc, write tag, final) and the tag formula follow the source
// design; the byte order, the length input and the handshake are this
// design's choices.
//
// Interface: as the other ciphercores (key/npub held while *_ready; blocks on
// bdi with bdi_size valid bytes and bdi_eot on the last block of a type, AD
// first, then message; an empty type is one block with bdi_size = 0, which
// is passed over without a state update). With
// each block the pre-processor also gives bdi_seglen, the byte length of the
// whole current segment, which the core stores for the tag.
// Timing: 3 cycles per block when encrypting, 4 per message block when
// decrypting (extra "dec" state), 2 for an empty AD or message (no update);
// 29 fixed cycles from taking the nonce to the tag (the source design
// quotes 28).
module morus_core #(
  parameter int unsigned N        = 128,
  parameter int unsigned KEY_BITS = 128,
  localparam int unsigned SZW     = $clog2(N / 8 + 1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [KEY_BITS-1:0] key,
  input  logic                key_ready,
  output logic                key_updated,
  input  logic [127:0]        npub,
  input  logic                npub_ready,
  output logic                npub_read,
  input  logic [N-1:0]        bdi,
  input  logic [SZW-1:0]      bdi_size,
  input  logic [63:0]         bdi_seglen,
  input  logic                bdi_eot,
  input  logic                bdi_ready,
  input  logic                bdi_decrypt,
  output logic                bdi_read,
  output logic [N-1:0]        bdo,
  output logic [SZW-1:0]      bdo_size,
  output logic                bdo_write,
  input  logic                bdo_ready,
  output logic [127:0]        tag,
  output logic                tag_write,
  input  logic                tag_ready,
  input  logic [127:0]        exp_tag,
  output logic                msg_auth_done,
  output logic                msg_auth_valid
);

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT_NPUB, S_LOAD, S_INIT, S_INIT_LAST, S_WAIT_AD, S_AD_PROC, S_AD_ROUND,
    S_WAIT_M, S_M_PROC, S_DEC, S_M_ROUND, S_TAG_LOAD, S_TAG_PROC, S_WRITE_TAG, S_FINAL
  } state_e;

  localparam int unsigned N_INIT = 16;
  localparam int unsigned N_TAG  = 8;

  // 256-bit Fibonacci constant, byte i = F(i) mod 256
  function automatic logic [255:0] fib_const();
    logic [255:0] c;
    logic [7:0] f0, f1, f2;
    f0 = 8'd0; f1 = 8'd1;
    for (int i = 0; i < 32; i++) begin
      c[8*i +: 8] = f0;
      f2 = f0 + f1; f0 = f1; f1 = f2;
    end
    return c;
  endfunction
  localparam logic [255:0] CONST = fib_const();

  function automatic logic [N-1:0] byte_mask(logic [SZW-1:0] n);
    logic [N-1:0] m;
    m = '0;
    for (int unsigned k = 0; k < N / 8; k++)
      if (k < n) m[8*k +: 8] = 8'hFF;
    return m;
  endfunction

  function automatic logic [N-1:0] rotl(logic [N-1:0] v, int unsigned n);
    return (v << n) | (v >> (N - n));
  endfunction

  state_e            st;
  logic [4:0][N-1:0] s, s_next;
  logic [N-1:0]      m_reg;       // state input register
  logic [N-1:0]      d_reg;       // input block
  logic [N-1:0]      o_reg;       // output block
  logic [SZW-1:0]    size_reg;
  logic              last_reg, dec_reg;
  logic [63:0]       adlen, mlen; // bytes
  logic [4:0]        cnt;
  logic [127:0]      tag_reg;
  logic [N-1:0]      key_n, ks, out_blk;

  assign key_n   = (N == 256) ? N'({key, key}) : N'(key);
  assign ks      = s[0] ^ rotl(s[1], 3 * N / 4) ^ (s[2] & s[3]);
  assign out_blk = (d_reg ^ ks) & byte_mask(size_reg);

  morus_state_update #(.N(N)) u_update (.s_i(s), .m(m_reg), .s_o(s_next));

  always_comb begin
    key_updated    = (st == S_WAIT_NPUB) && npub_ready;
    npub_read      = (st == S_WAIT_NPUB) && npub_ready;
    bdi_read       = ((st == S_WAIT_AD) && bdi_ready) ||
                     ((st == S_WAIT_M) && bdi_ready && bdo_ready);
    bdo            = out_blk;
    bdo_size       = size_reg;
    bdo_write      = (st == S_M_PROC) && (size_reg != '0);
    tag            = tag_reg;
    tag_write      = (st == S_FINAL) && !dec_reg && tag_ready;
    msg_auth_done  = (st == S_FINAL) && dec_reg;
    msg_auth_valid = (st == S_FINAL) && dec_reg && (tag_reg == exp_tag);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      s        <= '0;
      m_reg    <= '0;
      d_reg    <= '0;
      o_reg    <= '0;
      size_reg <= '0;
      last_reg <= 1'b0;
      dec_reg  <= 1'b0;
      adlen    <= '0;
      mlen     <= '0;
      cnt      <= '0;
      tag_reg  <= '0;
    end else begin
      unique case (st)
        S_IDLE:      if (key_ready) st <= S_WAIT_NPUB;
        S_WAIT_NPUB: if (npub_ready) st <= S_LOAD;
        S_LOAD: begin
          s[0]  <= N'(npub);
          s[1]  <= key_n;
          s[2]  <= '1;
          s[3]  <= (N == 256) ? '0 : N'(CONST[127:0]);
          s[4]  <= (N == 256) ? N'(CONST) : N'(CONST[255:128]);
          m_reg <= '0;
          cnt   <= '0;
          st    <= S_INIT;
        end
        S_INIT: begin
          s   <= s_next;
          cnt <= cnt + 1'b1;
          if (cnt == 5'(N_INIT - 1)) st <= S_INIT_LAST;
        end
        S_INIT_LAST: begin
          s[1] <= s[1] ^ key_n;
          st   <= S_WAIT_AD;
        end
        S_WAIT_AD, S_WAIT_M: if (bdi_read) begin
          d_reg    <= bdi & byte_mask(bdi_size);
          size_reg <= bdi_size;
          last_reg <= bdi_eot;
          dec_reg  <= bdi_decrypt;
          if (st == S_WAIT_AD) adlen <= bdi_seglen; else mlen <= bdi_seglen;
          st       <= (st == S_WAIT_AD) ? S_AD_PROC : S_M_PROC;
        end
        S_AD_PROC: begin
          m_reg <= d_reg;
          // an empty AD is one block of size 0 and is not absorbed
          if (size_reg == '0) st <= S_WAIT_M;
          else                st <= S_AD_ROUND;
        end
        S_AD_ROUND: begin
          s  <= s_next;
          st <= last_reg ? S_WAIT_M : S_WAIT_AD;
        end
        S_M_PROC: begin
          o_reg <= out_blk;
          m_reg <= d_reg;
          // an empty message is one block of size 0 and is not absorbed
          if (size_reg == '0) st <= S_TAG_LOAD;
          else                st <= dec_reg ? S_DEC : S_M_ROUND;
        end
        S_DEC: begin
          m_reg <= o_reg;
          st    <= S_M_ROUND;
        end
        S_M_ROUND: begin
          s  <= s_next;
          st <= last_reg ? S_TAG_LOAD : S_WAIT_M;
        end
        S_TAG_LOAD: begin
          s[4]  <= s[4] ^ s[0];
          m_reg <= N'({mlen << 3, adlen << 3});
          cnt   <= '0;
          st    <= S_TAG_PROC;
        end
        S_TAG_PROC: begin
          s   <= s_next;
          cnt <= cnt + 1'b1;
          if (cnt == 5'(N_TAG - 1)) st <= S_WRITE_TAG;
        end
        S_WRITE_TAG: begin
          tag_reg <= 128'(s[1] ^ s[2] ^ s[3] ^ s[4]);
          st      <= S_FINAL;
        end
        S_FINAL: if (dec_reg || tag_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst)
                   bdo_write |-> (st == S_M_PROC));

endmodule
