// caesar_top_tb: end-to-end test of caesar_top at its default parameters
// (Trivia-ck, KetjeSr, MORUS-640). Three drivers run the three ciphercores
// at the same time, each against its own software model: per core eight
// encryptions, eight decryptions with the right tag and eight with a
// corrupted tag, over empty, partial and multi-block AD and messages.
// Every odd test makes the cores wait (input block withheld, bdo_ready
// dropped during the message, tag_ready held low on a finished tag); the
// other tests check the cycles per block (and, for Trivia-ck, the fixed
// latency).
//
// Mechanisms counted per core: encrypt, decrypt accepted, forged tag
// rejected, empty AD, empty message, partial block, multi-block message,
// input stall, output back-pressure, tag output stall. A mechanism that
// never happened on a core counts as a failure.
// Timing: 10 ns clock; a watchdog ends the run after 100000 cycles.
//
// Interface: no ports; instantiates caesar_top with no parameter override
// and trivia_drv, ketje_drv and morus_drv.
// Timing: 10 ns clock, reset for 3 cycles; a watchdog ends the run after
// 100000 cycles. Expected cycle counts follow the source design where it
// gives them and this design's handshake otherwise (see the drivers).
module caesar_top_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [127:0]        tv_key;
  logic                tv_key_ready;
  logic                tv_key_updated;
  logic [127:0]        tv_npub;
  logic                tv_npub_ready;
  logic                tv_npub_read;
  logic [63:0]         tv_bdi;
  logic [3:0]          tv_bdi_size;
  logic                tv_bdi_eot;
  logic                tv_bdi_ready;
  logic                tv_bdi_decrypt;
  logic                tv_bdi_read;
  logic [63:0]         tv_bdo;
  logic [3:0]          tv_bdo_size;
  logic                tv_bdo_write;
  logic                tv_bdo_ready;
  logic [127:0]        tv_tag;
  logic                tv_tag_write;
  logic                tv_tag_ready;
  logic [127:0]        tv_exp_tag;
  logic                tv_msg_auth_done;
  logic                tv_msg_auth_valid;
  logic [128-1:0]      kj_key;
  logic                kj_key_ready;
  logic                kj_key_updated;
  logic [128-1:0]      kj_npub;
  logic                kj_npub_ready;
  logic                kj_npub_read;
  logic [16*2-1:0]     kj_bdi;
  logic [3-1:0]        kj_bdi_size;
  logic                kj_bdi_eot;
  logic                kj_bdi_ready;
  logic                kj_bdi_decrypt;
  logic                kj_bdi_read;
  logic [16*2-1:0]     kj_bdo;
  logic [3-1:0]        kj_bdo_size;
  logic                kj_bdo_write;
  logic                kj_bdo_ready;
  logic [128-1:0]      kj_tag;
  logic                kj_tag_write;
  logic                kj_tag_ready;
  logic [128-1:0]      kj_exp_tag;
  logic                kj_msg_auth_done;
  logic                kj_msg_auth_valid;
  logic [127:0]        mr_key;
  logic                mr_key_ready;
  logic                mr_key_updated;
  logic [127:0]        mr_npub;
  logic                mr_npub_ready;
  logic                mr_npub_read;
  logic [128-1:0]      mr_bdi;
  logic [5-1:0]        mr_bdi_size;
  logic [63:0]         mr_bdi_seglen;
  logic                mr_bdi_eot;
  logic                mr_bdi_ready;
  logic                mr_bdi_decrypt;
  logic                mr_bdi_read;
  logic [128-1:0]      mr_bdo;
  logic [5-1:0]        mr_bdo_size;
  logic                mr_bdo_write;
  logic                mr_bdo_ready;
  logic [127:0]        mr_tag;
  logic                mr_tag_write;
  logic                mr_tag_ready;
  logic [127:0]        mr_exp_tag;
  logic                mr_msg_auth_done;
  logic                mr_msg_auth_valid;

  caesar_top dut (.*);

  int c_tv, f_tv, c_kj, f_kj, c_mr, f_mr;
  int m_tv [10], m_kj [10], m_mr [10];
  logic d_tv, d_kj, d_mr;

  trivia_drv drv_tv (
    .clk, .rst,
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
    .msg_auth_valid (tv_msg_auth_valid),
    .checks(c_tv), .failures(f_tv), .mech(m_tv), .done(d_tv)
  );

  ketje_drv #(.W(16)) drv_kj (
    .clk, .rst,
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
    .msg_auth_valid (kj_msg_auth_valid),
    .checks(c_kj), .failures(f_kj), .mech(m_kj), .done(d_kj)
  );

  morus_drv #(.N(128)) drv_mr (
    .clk, .rst,
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
    .msg_auth_valid (mr_msg_auth_valid),
    .checks(c_mr), .failures(f_mr), .mech(m_mr), .done(d_mr)
  );

  localparam string MECH [10] = '{"encrypt", "decrypt accepted", "forged tag rejected",
    "empty AD", "empty message", "partial block", "multi-block message",
    "input stall", "output back-pressure", "tag output stall"};

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (d_tv && d_kj && d_mr);
    checks = c_tv + c_kj + c_mr;
    failures = f_tv + f_kj + f_mr;
    for (int i = 0; i < 10; i++) begin
      $display("%-22s Trivia-ck %0d  KetjeSr %0d  MORUS-640 %0d", MECH[i], m_tv[i], m_kj[i], m_mr[i]);
      checks += 3;
      if (m_tv[i] == 0) begin failures++; $display("Trivia-ck: %s never happened", MECH[i]); end
      if (m_kj[i] == 0) begin failures++; $display("KetjeSr: %s never happened", MECH[i]); end
      if (m_mr[i] == 0) begin failures++; $display("MORUS-640: %s never happened", MECH[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_tv + c_kj + c_mr, f_tv + f_kj + f_mr + 1);
    $finish;
  end
endmodule
