// ketje_core_tb: checks ketje_core as KetjeSr (W = 16) and KetjeJr (W = 8)
// at the same time. Each instance is driven by ketje_drv, which compares
// ciphertext, plaintext, tags and the tag check with a bit-level MonkeyWrap
// model, checks 3 cycles per block and the fixed latency when nothing
// stalls, and makes the core
// wait on input, output and tag in every odd test.
// Timing: 10 ns clock, watchdog after 40000 cycles.
// Interface: no ports. The expected values come from the MonkeyWrap
// description (keypack, frame bits, 12/1/6 rounds, tag pieces); the
// handshake and byte order being checked are this design's own.
module ketje_core_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int c16, f16, c8, f8;
  int m16 [10], m8 [10];
  logic d16, d8;

  // KetjeSr
  logic [127:0] s_key, s_npub, s_tag, s_exp_tag;
  logic [31:0]  s_bdi, s_bdo;
  logic [2:0]   s_bdi_size, s_bdo_size;
  logic s_key_ready, s_key_updated, s_npub_ready, s_npub_read, s_bdi_eot, s_bdi_ready,
        s_bdi_decrypt, s_bdi_read, s_bdo_write, s_bdo_ready, s_tag_write, s_tag_ready,
        s_msg_auth_done, s_msg_auth_valid;
  // KetjeJr
  logic [95:0]  j_key, j_tag, j_exp_tag;
  logic [79:0]  j_npub;
  logic [15:0]  j_bdi, j_bdo;
  logic [1:0]   j_bdi_size, j_bdo_size;
  logic j_key_ready, j_key_updated, j_npub_ready, j_npub_read, j_bdi_eot, j_bdi_ready,
        j_bdi_decrypt, j_bdi_read, j_bdo_write, j_bdo_ready, j_tag_write, j_tag_ready,
        j_msg_auth_done, j_msg_auth_valid;

  ketje_core #(.W(16)) dut_sr (
    .clk, .rst, .key(s_key), .key_ready(s_key_ready), .key_updated(s_key_updated),
    .npub(s_npub), .npub_ready(s_npub_ready), .npub_read(s_npub_read),
    .bdi(s_bdi), .bdi_size(s_bdi_size), .bdi_eot(s_bdi_eot), .bdi_ready(s_bdi_ready),
    .bdi_decrypt(s_bdi_decrypt), .bdi_read(s_bdi_read), .bdo(s_bdo), .bdo_size(s_bdo_size),
    .bdo_write(s_bdo_write), .bdo_ready(s_bdo_ready), .tag(s_tag), .tag_write(s_tag_write),
    .tag_ready(s_tag_ready), .exp_tag(s_exp_tag), .msg_auth_done(s_msg_auth_done),
    .msg_auth_valid(s_msg_auth_valid));
  ketje_drv #(.W(16)) drv_sr (
    .clk, .rst, .key(s_key), .key_ready(s_key_ready), .key_updated(s_key_updated),
    .npub(s_npub), .npub_ready(s_npub_ready), .npub_read(s_npub_read),
    .bdi(s_bdi), .bdi_size(s_bdi_size), .bdi_eot(s_bdi_eot), .bdi_ready(s_bdi_ready),
    .bdi_decrypt(s_bdi_decrypt), .bdi_read(s_bdi_read), .bdo(s_bdo), .bdo_size(s_bdo_size),
    .bdo_write(s_bdo_write), .bdo_ready(s_bdo_ready), .tag(s_tag), .tag_write(s_tag_write),
    .tag_ready(s_tag_ready), .exp_tag(s_exp_tag), .msg_auth_done(s_msg_auth_done),
    .msg_auth_valid(s_msg_auth_valid), .checks(c16), .failures(f16), .mech(m16), .done(d16));

  ketje_core #(.W(8)) dut_jr (
    .clk, .rst, .key(j_key), .key_ready(j_key_ready), .key_updated(j_key_updated),
    .npub(j_npub), .npub_ready(j_npub_ready), .npub_read(j_npub_read),
    .bdi(j_bdi), .bdi_size(j_bdi_size), .bdi_eot(j_bdi_eot), .bdi_ready(j_bdi_ready),
    .bdi_decrypt(j_bdi_decrypt), .bdi_read(j_bdi_read), .bdo(j_bdo), .bdo_size(j_bdo_size),
    .bdo_write(j_bdo_write), .bdo_ready(j_bdo_ready), .tag(j_tag), .tag_write(j_tag_write),
    .tag_ready(j_tag_ready), .exp_tag(j_exp_tag), .msg_auth_done(j_msg_auth_done),
    .msg_auth_valid(j_msg_auth_valid));
  ketje_drv #(.W(8)) drv_jr (
    .clk, .rst, .key(j_key), .key_ready(j_key_ready), .key_updated(j_key_updated),
    .npub(j_npub), .npub_ready(j_npub_ready), .npub_read(j_npub_read),
    .bdi(j_bdi), .bdi_size(j_bdi_size), .bdi_eot(j_bdi_eot), .bdi_ready(j_bdi_ready),
    .bdi_decrypt(j_bdi_decrypt), .bdi_read(j_bdi_read), .bdo(j_bdo), .bdo_size(j_bdo_size),
    .bdo_write(j_bdo_write), .bdo_ready(j_bdo_ready), .tag(j_tag), .tag_write(j_tag_write),
    .tag_ready(j_tag_ready), .exp_tag(j_exp_tag), .msg_auth_done(j_msg_auth_done),
    .msg_auth_valid(j_msg_auth_valid), .checks(c8), .failures(f8), .mech(m8), .done(d8));

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (d16 && d8);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8 + 1);
    $finish;
  end
endmodule
