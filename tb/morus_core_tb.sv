// morus_core_tb: checks morus_core as MORUS-640 (N = 128) and MORUS-1280
// (N = 256) at the same time. Each instance is driven by morus_drv, which
// compares ciphertext, plaintext, tags and the tag check with a model of
// the MORUS mode, checks 3 cycles per block (4 per decrypted message block)
// and the fixed latency when nothing stalls, and makes the core wait on
// input, output and tag in every odd test.
// Timing: 10 ns clock, watchdog after 40000 cycles.
// Interface: no ports. The expected values come from the MORUS description
// (initialisation, keystream, tag); the handshake, byte order and the
// skipping of empty blocks being checked are this design's own.
module morus_core_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int c640, f640, c1280, f1280;
  int m640 [10], m1280 [10];
  logic d640, d1280;

  // MORUS-640
  logic [127:0] s_key, s_npub, s_tag, s_exp_tag;
  logic [127:0] s_bdi, s_bdo;
  logic [4:0]   s_bdi_size, s_bdo_size;
  logic [63:0]  s_bdi_seglen;
  logic s_key_ready, s_key_updated, s_npub_ready, s_npub_read, s_bdi_eot, s_bdi_ready,
        s_bdi_decrypt, s_bdi_read, s_bdo_write, s_bdo_ready, s_tag_write, s_tag_ready,
        s_msg_auth_done, s_msg_auth_valid;
  // MORUS-1280
  logic [127:0] j_key, j_tag, j_exp_tag, j_npub;
  logic [255:0] j_bdi, j_bdo;
  logic [5:0]   j_bdi_size, j_bdo_size;
  logic [63:0]  j_bdi_seglen;
  logic j_key_ready, j_key_updated, j_npub_ready, j_npub_read, j_bdi_eot, j_bdi_ready,
        j_bdi_decrypt, j_bdi_read, j_bdo_write, j_bdo_ready, j_tag_write, j_tag_ready,
        j_msg_auth_done, j_msg_auth_valid;

  morus_core #(.N(128)) dut_sr (
    .clk, .rst, .key(s_key), .key_ready(s_key_ready), .key_updated(s_key_updated),
    .npub(s_npub), .npub_ready(s_npub_ready), .npub_read(s_npub_read),
    .bdi(s_bdi), .bdi_size(s_bdi_size), .bdi_seglen(s_bdi_seglen), .bdi_eot(s_bdi_eot), .bdi_ready(s_bdi_ready),
    .bdi_decrypt(s_bdi_decrypt), .bdi_read(s_bdi_read), .bdo(s_bdo), .bdo_size(s_bdo_size),
    .bdo_write(s_bdo_write), .bdo_ready(s_bdo_ready), .tag(s_tag), .tag_write(s_tag_write),
    .tag_ready(s_tag_ready), .exp_tag(s_exp_tag), .msg_auth_done(s_msg_auth_done),
    .msg_auth_valid(s_msg_auth_valid));
  morus_drv #(.N(128)) drv_sr (
    .clk, .rst, .key(s_key), .key_ready(s_key_ready), .key_updated(s_key_updated),
    .npub(s_npub), .npub_ready(s_npub_ready), .npub_read(s_npub_read),
    .bdi(s_bdi), .bdi_size(s_bdi_size), .bdi_seglen(s_bdi_seglen), .bdi_eot(s_bdi_eot), .bdi_ready(s_bdi_ready),
    .bdi_decrypt(s_bdi_decrypt), .bdi_read(s_bdi_read), .bdo(s_bdo), .bdo_size(s_bdo_size),
    .bdo_write(s_bdo_write), .bdo_ready(s_bdo_ready), .tag(s_tag), .tag_write(s_tag_write),
    .tag_ready(s_tag_ready), .exp_tag(s_exp_tag), .msg_auth_done(s_msg_auth_done),
    .msg_auth_valid(s_msg_auth_valid), .checks(c640), .failures(f640), .mech(m640), .done(d640));

  morus_core #(.N(256)) dut_jr (
    .clk, .rst, .key(j_key), .key_ready(j_key_ready), .key_updated(j_key_updated),
    .npub(j_npub), .npub_ready(j_npub_ready), .npub_read(j_npub_read),
    .bdi(j_bdi), .bdi_size(j_bdi_size), .bdi_seglen(j_bdi_seglen), .bdi_eot(j_bdi_eot), .bdi_ready(j_bdi_ready),
    .bdi_decrypt(j_bdi_decrypt), .bdi_read(j_bdi_read), .bdo(j_bdo), .bdo_size(j_bdo_size),
    .bdo_write(j_bdo_write), .bdo_ready(j_bdo_ready), .tag(j_tag), .tag_write(j_tag_write),
    .tag_ready(j_tag_ready), .exp_tag(j_exp_tag), .msg_auth_done(j_msg_auth_done),
    .msg_auth_valid(j_msg_auth_valid));
  morus_drv #(.N(256)) drv_jr (
    .clk, .rst, .key(j_key), .key_ready(j_key_ready), .key_updated(j_key_updated),
    .npub(j_npub), .npub_ready(j_npub_ready), .npub_read(j_npub_read),
    .bdi(j_bdi), .bdi_size(j_bdi_size), .bdi_seglen(j_bdi_seglen), .bdi_eot(j_bdi_eot), .bdi_ready(j_bdi_ready),
    .bdi_decrypt(j_bdi_decrypt), .bdi_read(j_bdi_read), .bdo(j_bdo), .bdo_size(j_bdo_size),
    .bdo_write(j_bdo_write), .bdo_ready(j_bdo_ready), .tag(j_tag), .tag_write(j_tag_write),
    .tag_ready(j_tag_ready), .exp_tag(j_exp_tag), .msg_auth_done(j_msg_auth_done),
    .msg_auth_valid(j_msg_auth_valid), .checks(c1280), .failures(f1280), .mech(m1280), .done(d1280));

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (d640 && d1280);
    $display("TB_RESULT checks=%0d failures=%0d", c640 + c1280, f640 + f1280);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c640 + c1280, f640 + f1280 + 1);
    $finish;
  end
endmodule
