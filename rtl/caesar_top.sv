// caesar_top: the three CAESAR ciphercores evaluated in the thesis, side by
// side: Trivia-ck (64-bit datapath), Ketje (KetjeSr by default, KetjeJr with
// KETJE_W = 8) and MORUS (MORUS-640 by default, MORUS-1280 with
// MORUS_N = 256), each in its speed-optimised form.
//
// How it works: the cores share only clock and synchronous active-high
// reset. They do not belong together, so each keeps its own full set of
// ciphercore ports, prefixed tv_, kj_ and mr_. In the thesis each core sits
// between the AEAD hardware API's pre-processor and post-processor (the
// segment parser, padding and output formatter); those were taken from the
// API package and are not described, so their side of every core, the
// ciphercore interface, is brought out here as ports.
//
// Interface of each core (same meaning for all three):
//   key/key_ready/key_updated   key from the pre-processor; key_ready starts
//                               an operation together with npub_ready
//   npub/npub_ready/npub_read   public message number (nonce)
//   bdi/bdi_size/bdi_eot/bdi_ready/bdi_decrypt/bdi_read
//                               one input block, bytes LSB-first, bdi_size
//                               valid bytes, bdi_eot on the last block of
//                               the AD or of the message; AD blocks come
//                               first, then message blocks; an empty AD or
//                               message is one block of size 0
//   mr_bdi_seglen               MORUS only: byte length of the current
//                               AD or message segment, kept for the tag
//   bdo/bdo_size/bdo_write/bdo_ready
//                               one output block; a message block is taken
//                               only while bdo_ready is high
//   tag/tag_write/tag_ready     computed tag after an encryption
//   exp_tag/msg_auth_done/msg_auth_valid
//                               expected tag for a decryption and the
//                               comparison result
// Timing (inputs ready, no back-pressure): Trivia-ck 2 cycles per block and
// 110 fixed cycles; Ketje 3 cycles per block plus 12-round start and
// 6-round stride; MORUS 3 cycles per block (4 per decrypted message block)
// plus 16 initialisation and 8 finalisation updates.
//
// Document versus own choice: the choice of cores, their speed-optimised
// variants and the separation into ciphercore and pre/post-processor follow
// the thesis; the exact port list and handshake are this design's own,
// modelled on the roles the thesis gives the API signals.
module caesar_top #(
  parameter int unsigned KETJE_W = 16,
  parameter int unsigned MORUS_N = 128,
  localparam int unsigned KJ_RHO  = 2 * KETJE_W,
  localparam int unsigned KJ_SZW  = $clog2(KJ_RHO / 8 + 1),
  localparam int unsigned KJ_KEYB = (KETJE_W == 8) ? 96 : 128,
  localparam int unsigned KJ_NB   = (KETJE_W == 8) ? 80 : 128,
  localparam int unsigned KJ_TAGB = ((KETJE_W == 8) ? 6 : 4) * KJ_RHO,
  localparam int unsigned MR_SZW  = $clog2(MORUS_N / 8 + 1)
) (
  input  logic clk,
  input  logic rst,
  // trivia_ck_core
  input  logic [127:0]          tv_key,
  input  logic                  tv_key_ready,
  output logic                  tv_key_updated,
  input  logic [127:0]          tv_npub,
  input  logic                  tv_npub_ready,
  output logic                  tv_npub_read,
  input  logic [63:0]           tv_bdi,
  input  logic [3:0]            tv_bdi_size,
  input  logic                  tv_bdi_eot,
  input  logic                  tv_bdi_ready,
  input  logic                  tv_bdi_decrypt,
  output logic                  tv_bdi_read,
  output logic [63:0]           tv_bdo,
  output logic [3:0]            tv_bdo_size,
  output logic                  tv_bdo_write,
  input  logic                  tv_bdo_ready,
  output logic [127:0]          tv_tag,
  output logic                  tv_tag_write,
  input  logic                  tv_tag_ready,
  input  logic [127:0]          tv_exp_tag,
  output logic                  tv_msg_auth_done,
  output logic                  tv_msg_auth_valid,
  // ketje_core
  input  logic [KJ_KEYB-1:0]    kj_key,
  input  logic                  kj_key_ready,
  output logic                  kj_key_updated,
  input  logic [KJ_NB-1:0]      kj_npub,
  input  logic                  kj_npub_ready,
  output logic                  kj_npub_read,
  input  logic [KJ_RHO-1:0]     kj_bdi,
  input  logic [KJ_SZW-1:0]     kj_bdi_size,
  input  logic                  kj_bdi_eot,
  input  logic                  kj_bdi_ready,
  input  logic                  kj_bdi_decrypt,
  output logic                  kj_bdi_read,
  output logic [KJ_RHO-1:0]     kj_bdo,
  output logic [KJ_SZW-1:0]     kj_bdo_size,
  output logic                  kj_bdo_write,
  input  logic                  kj_bdo_ready,
  output logic [KJ_TAGB-1:0]    kj_tag,
  output logic                  kj_tag_write,
  input  logic                  kj_tag_ready,
  input  logic [KJ_TAGB-1:0]    kj_exp_tag,
  output logic                  kj_msg_auth_done,
  output logic                  kj_msg_auth_valid,
  // morus_core
  input  logic [127:0]          mr_key,
  input  logic                  mr_key_ready,
  output logic                  mr_key_updated,
  input  logic [127:0]          mr_npub,
  input  logic                  mr_npub_ready,
  output logic                  mr_npub_read,
  input  logic [MORUS_N-1:0]    mr_bdi,
  input  logic [MR_SZW-1:0]     mr_bdi_size,
  input  logic [63:0]           mr_bdi_seglen,
  input  logic                  mr_bdi_eot,
  input  logic                  mr_bdi_ready,
  input  logic                  mr_bdi_decrypt,
  output logic                  mr_bdi_read,
  output logic [MORUS_N-1:0]    mr_bdo,
  output logic [MR_SZW-1:0]     mr_bdo_size,
  output logic                  mr_bdo_write,
  input  logic                  mr_bdo_ready,
  output logic [127:0]          mr_tag,
  output logic                  mr_tag_write,
  input  logic                  mr_tag_ready,
  input  logic [127:0]          mr_exp_tag,
  output logic                  mr_msg_auth_done,
  output logic                  mr_msg_auth_valid
);

  trivia_ck_core u_tv (
    .clk            (clk),
    .rst            (rst),
    .key            (tv_key),
    .key_ready      (tv_key_ready),
    .key_updated    (tv_key_updated),
    .npub           (tv_npub),
    .npub_ready     (tv_npub_ready),
    .npub_read      (tv_npub_read),
    .bdi            (tv_bdi),
    .bdi_size       (tv_bdi_size),
    .bdi_eot        (tv_bdi_eot),
    .bdi_ready      (tv_bdi_ready),
    .bdi_decrypt    (tv_bdi_decrypt),
    .bdi_read       (tv_bdi_read),
    .bdo            (tv_bdo),
    .bdo_size       (tv_bdo_size),
    .bdo_write      (tv_bdo_write),
    .bdo_ready      (tv_bdo_ready),
    .tag            (tv_tag),
    .tag_write      (tv_tag_write),
    .tag_ready      (tv_tag_ready),
    .exp_tag        (tv_exp_tag),
    .msg_auth_done  (tv_msg_auth_done),
    .msg_auth_valid (tv_msg_auth_valid)
  );

  ketje_core #(.W(KETJE_W)) u_kj (
    .clk            (clk),
    .rst            (rst),
    .key            (kj_key),
    .key_ready      (kj_key_ready),
    .key_updated    (kj_key_updated),
    .npub           (kj_npub),
    .npub_ready     (kj_npub_ready),
    .npub_read      (kj_npub_read),
    .bdi            (kj_bdi),
    .bdi_size       (kj_bdi_size),
    .bdi_eot        (kj_bdi_eot),
    .bdi_ready      (kj_bdi_ready),
    .bdi_decrypt    (kj_bdi_decrypt),
    .bdi_read       (kj_bdi_read),
    .bdo            (kj_bdo),
    .bdo_size       (kj_bdo_size),
    .bdo_write      (kj_bdo_write),
    .bdo_ready      (kj_bdo_ready),
    .tag            (kj_tag),
    .tag_write      (kj_tag_write),
    .tag_ready      (kj_tag_ready),
    .exp_tag        (kj_exp_tag),
    .msg_auth_done  (kj_msg_auth_done),
    .msg_auth_valid (kj_msg_auth_valid)
  );

  morus_core #(.N(MORUS_N)) u_mr (
    .clk            (clk),
    .rst            (rst),
    .key            (mr_key),
    .key_ready      (mr_key_ready),
    .key_updated    (mr_key_updated),
    .npub           (mr_npub),
    .npub_ready     (mr_npub_ready),
    .npub_read      (mr_npub_read),
    .bdi            (mr_bdi),
    .bdi_size       (mr_bdi_size),
    .bdi_seglen     (mr_bdi_seglen),
    .bdi_eot        (mr_bdi_eot),
    .bdi_ready      (mr_bdi_ready),
    .bdi_decrypt    (mr_bdi_decrypt),
    .bdi_read       (mr_bdi_read),
    .bdo            (mr_bdo),
    .bdo_size       (mr_bdo_size),
    .bdo_write      (mr_bdo_write),
    .bdo_ready      (mr_bdo_ready),
    .tag            (mr_tag),
    .tag_write      (mr_tag_write),
    .tag_ready      (mr_tag_ready),
    .exp_tag        (mr_exp_tag),
    .msg_auth_done  (mr_msg_auth_done),
    .msg_auth_valid (mr_msg_auth_valid)
  );

endmodule
