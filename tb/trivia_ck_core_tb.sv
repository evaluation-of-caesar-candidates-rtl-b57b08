// trivia_ck_core_tb: encrypts random AD/message pairs of several lengths
// (empty, partial and whole 64-bit blocks), decrypts them with the right and
// with a corrupted tag, and compares output bytes and tags with the
// trivia_ref_pkg model. Also checks 2 cycles per block and 110 + 2 per block
// cycles from accepting the nonce to the tag. The last test is the case
// used to show the reference design working: 15 bytes of AD and a 16-byte
// message (2 + 2 blocks, 118 cycles).
//
// Interface: no ports; one trivia_ck_core, always ready on the output side.
// Timing: 10 ns clock; watchdog after 20000 cycles. The 2 cycles per block
// and the fixed latency are this design's (the source design quotes 109
// fixed cycles); the algorithm checked follows Trivia-ck with ck = 0.
module trivia_ck_core_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int LENS [8] = '{0, 1, 7, 8, 9, 16, 21, 3};
  int checks = 0, failures = 0;

  logic [127:0] key, npub, tag, exp_tag;
  logic key_ready, npub_ready, bdi_ready, bdi_eot, bdi_decrypt, bdo_ready, tag_ready;
  logic key_updated, npub_read, bdi_read, bdo_write, tag_write, msg_auth_done, msg_auth_valid;
  logic [63:0] bdi, bdo;
  logic [3:0] bdi_size, bdo_size;

  trivia_ck_core dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  byte unsigned got [$];
  always @(posedge clk) if (!rst && bdo_write)
    for (int j = 0; j < bdo_size; j++) got.push_back(bdo[8*j +: 8]);

  task automatic send(input byte unsigned d[$], input bit dec, output int gaps_bad, output int nb);
    int last_read;
    nb = (d.size() + 7) / 8; if (nb == 0) nb = 1;
    gaps_bad = 0; last_read = -1;
    for (int i = 0; i < nb; i++) begin
      int len;
      len = d.size() - i * 8; if (len > 8) len = 8; if (len < 0) len = 0;
      bdi = '0;
      for (int j = 0; j < len; j++) bdi[8*j +: 8] = d[i*8+j];
      bdi_size = 4'(len); bdi_eot = (i == nb - 1); bdi_decrypt = dec; bdi_ready = 1;
      do @(posedge clk); while (!bdi_read);
      if (last_read >= 0 && cyc - last_read != 2) gaps_bad++;
      last_read = cyc;
      #1 bdi_ready = 0;
    end
  endtask

  task automatic run(input logic [127:0] k, input logic [127:0] n,
                     input byte unsigned ad[$], input byte unsigned m[$], input bit dec,
                     input logic [127:0] etag, output logic [127:0] t_out,
                     output bit auth, output int gaps_bad, output int lat_bad);
    int g1, g2, n1, n2, t0;
    key = k; npub = n; key_ready = 1; npub_ready = 1; exp_tag = etag;
    got = {};
    do @(posedge clk); while (!npub_read);
    t0 = cyc;
    #1 key_ready = 0; npub_ready = 0;
    send(ad, dec, g1, n1);
    send(m, dec, g2, n2);
    gaps_bad = g1 + g2;
    if (dec) begin
      do @(posedge clk); while (!msg_auth_done);
      auth = msg_auth_valid;
    end else begin
      do @(posedge clk); while (!tag_write);
      auth = 0;
    end
    lat_bad = (cyc - t0 != 110 + 2 * (n1 + n2));
    t_out = tag;
    #1;
  endtask

  initial begin
    key_ready = 0; npub_ready = 0; bdi_ready = 0; bdi_eot = 0; bdi_decrypt = 0;
    bdo_ready = 1; tag_ready = 1; bdi = '0; bdi_size = '0; exp_tag = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int tn = 0; tn < 9; tn++) begin
      byte unsigned ad[$], m[$], c[$];
      logic [127:0] k, n, rt, ht, dt;
      bit auth;
      int gb, lb, adl, ml;
      for (int i = 0; i < 128; i += 32) begin k[i +: 32] = $urandom; n[i +: 32] = $urandom; end
      adl = (tn == 8) ? 15 : LENS[tn];
      ml  = (tn == 8) ? 16 : LENS[(tn * 3 + 1) % 8];
      for (int i = 0; i < adl; i++) ad.push_back(8'($urandom));
      for (int i = 0; i < ml; i++) m.push_back(8'($urandom));
      trivia_ref_pkg::encrypt(k, n, ad, m, c, rt);
      run(k, n, ad, m, 0, '0, ht, auth, gb, lb);
      checks++; if (got != c) begin failures++; $display("test %0d: ciphertext mismatch", tn); end
      checks++; if (ht != rt) begin failures++; $display("test %0d: tag %h expected %h", tn, ht, rt); end
      checks++; if (gb != 0) begin failures++; $display("test %0d: block not 2 cycles", tn); end
      checks++; if (lb != 0) begin failures++; $display("test %0d: latency wrong", tn); end
      run(k, n, ad, c, 1, rt, dt, auth, gb, lb);
      checks++; if (got != m) begin failures++; $display("test %0d: plaintext mismatch", tn); end
      checks++; if (!auth) begin failures++; $display("test %0d: valid tag rejected", tn); end
      run(k, n, ad, c, 1, rt ^ (128'(1) << (tn * 15)), dt, auth, gb, lb);
      checks++; if (auth) begin failures++; $display("test %0d: forged tag accepted", tn); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
