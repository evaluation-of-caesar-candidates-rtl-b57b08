// trivia_drv: drives the Trivia-ck ciphercore through encryptions,
// decryptions with the right and with a corrupted tag, and compares output
// blocks and tags with the trivia_ref_pkg model. When nothing stalls each
// block must take 2 cycles and the tag must come 110 + 2 per block cycles
// after the nonce is accepted.
//
// How it works: test tn uses AD and message lengths from LENS, so the set
// covers empty AD, empty message, partial last blocks and several blocks.
// With STALLS set, every odd test also makes the core wait: the next input
// block is withheld for a few cycles, bdo_ready drops at random during the
// message, and tag_ready is held low long enough that the core sits on a
// finished tag. Cycle counts are checked only in tests without stalls.
//
// Interface: the ciphercore ports seen from outside (outputs of this module
// are inputs of the core), plus checks/failures, mech (how often each
// mechanism happened: 0 encrypt, 1 decrypt accepted, 2 forged tag rejected,
// 3 empty AD, 4 empty message, 5 partial block, 6 multi-block message,
// 7 input stall, 8 output back-pressure, 9 tag output stall) and done.
// Timing: starts after reset falls; all inputs change 1 time unit after a
// rising clock edge. MLEN, when set, replaces the message lengths (for
// long-message throughput runs).
module trivia_drv #(

  parameter bit          STALLS = 1,
  parameter int unsigned NTESTS = 8,
  parameter int unsigned MLEN   = 0     // if non-zero: every message has MLEN bytes
) (
  input  logic              clk,
  input  logic              rst,
  output logic [KEYB-1:0]   key,
  output logic              key_ready,
  input  logic              key_updated,
  output logic [NB-1:0]     npub,
  output logic              npub_ready,
  input  logic              npub_read,
  output logic [BW-1:0]     bdi,
  output logic [SZW-1:0]    bdi_size,
  output logic              bdi_eot,
  output logic              bdi_ready,
  output logic              bdi_decrypt,
  input  logic              bdi_read,
  input  logic [BW-1:0]     bdo,
  input  logic [SZW-1:0]    bdo_size,
  input  logic              bdo_write,
  output logic              bdo_ready,
  input  logic [TAGB-1:0]   tag,
  input  logic              tag_write,
  output logic              tag_ready,
  output logic [TAGB-1:0]   exp_tag,
  input  logic              msg_auth_done,
  input  logic              msg_auth_valid,
  output int                checks,
  output int                failures,
  output int                mech [10],
  output logic              done
);
  localparam int unsigned BW   = 64;
  localparam int unsigned KEYB = 128;
  localparam int unsigned NB   = 128;
  localparam int unsigned TAGB = 128;
  localparam int unsigned SZW  = 4;
  localparam int unsigned BPB  = 8;
  localparam int LENS [8] = '{0, 1, 7, 8, 9, 16, 21, 3};

  // ------------------------------------------------------------ model
  task automatic model(input logic [KEYB-1:0] k, input logic [NB-1:0] n,
                       input byte unsigned ad[$], input byte unsigned m[$],
                       output byte unsigned c[$], output logic [TAGB-1:0] t);
    trivia_ref_pkg::encrypt(k, n, ad, m, c, t);
  endtask

  // ------------------------------------------------------------ driver
  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  byte unsigned got [$];
  always @(posedge clk) if (!rst && bdo_write)
    for (int j = 0; j < int'(bdo_size); j++) got.push_back(bdo[8*j +: 8]);

  // random output back-pressure while a stalled message is being sent
  bit in_msg, stall_mode;
  always @(posedge clk) begin
    #1 bdo_ready = !(stall_mode && in_msg && $urandom_range(0, 2) == 0);
  end
  always @(posedge clk) if (!rst) begin
    if (in_msg && bdi_ready && !bdo_ready) mech[8]++;
    if (tag_write && !tag_ready) begin failures++; $display("Trivia-ck%0s: tag written while not ready", ""); end
  end

  task automatic send(input byte unsigned d[$], input bit dec, input bit is_msg,
                      output int gaps_bad, output int nb);
    int last_read;
    nb = (d.size() + BPB - 1) / BPB; if (nb == 0) nb = 1;
    gaps_bad = 0; last_read = -1;
    in_msg = is_msg;
    for (int i = 0; i < nb; i++) begin
      int len;
      len = d.size() - i * BPB; if (len > BPB) len = BPB; if (len < 0) len = 0;
      if (stall_mode && i > 0) begin
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1 mech[7]++;
      end
      bdi = '0;
      for (int j = 0; j < len; j++) bdi[8*j +: 8] = d[i*BPB+j];
      bdi_size = SZW'(len); bdi_eot = (i == nb - 1); bdi_decrypt = dec; bdi_ready = 1;
      do @(posedge clk); while (!bdi_read);
      if (last_read >= 0 && cyc - last_read != 2) gaps_bad++;
      last_read = cyc;
      #1 bdi_ready = 0;
    end
    in_msg = 0;
  endtask

  task automatic run(input logic [KEYB-1:0] k, input logic [NB-1:0] n,
                     input byte unsigned ad[$], input byte unsigned m[$], input bit dec,
                     input logic [TAGB-1:0] etag, output logic [TAGB-1:0] t_out,
                     output bit auth, output int gaps_bad, output int lat_bad);
    int g1, g2, n1, n2, t0, nblocks;
    key = k; npub = n; key_ready = 1; npub_ready = 1; exp_tag = etag;
    got = {};
    do @(posedge clk); while (!npub_read);
    t0 = cyc;
    #1 key_ready = 0; npub_ready = 0;
    send(ad, dec, 0, g1, n1);
    send(m, dec, 1, g2, n2);
    nblocks = n1 + n2;
    gaps_bad = g1 + g2;
    if (dec) begin
      do @(posedge clk); while (!msg_auth_done);
      auth = msg_auth_valid;
    end else begin
      if (stall_mode) begin
        // longer than any core needs after its last block: the tag waits
        tag_ready = 0;
        repeat (150) @(posedge clk);
        #1 tag_ready = 1;
        mech[9]++;
      end
      do @(posedge clk); while (!tag_write);
      auth = 0;
    end
    lat_bad = (cyc - t0 != 110 + 2 * nblocks);
    t_out = tag;
    #1;
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; cyc = 0;
    foreach (mech[i]) mech[i] = 0;
    in_msg = 0; stall_mode = 0;
    key = '0; npub = '0; key_ready = 0; npub_ready = 0; bdi_ready = 0; bdi_eot = 0;
    bdi_decrypt = 0; tag_ready = 1; bdi = '0; bdi_size = '0; exp_tag = '0;
    @(negedge rst);
    for (int tn = 0; tn < NTESTS; tn++) begin
      byte unsigned ad[$], m[$], c[$];
      logic [KEYB-1:0] k;
      logic [NB-1:0] n;
      logic [TAGB-1:0] rt, ht, dt;
      bit auth;
      int gb, lb, adl, ml;
      stall_mode = STALLS && (tn % 2 == 1);
      for (int i = 0; i < KEYB; i += 16) k[i +: 16] = 16'($urandom);
      for (int i = 0; i < NB; i += 16) n[i +: 16] = 16'($urandom);
      adl = LENS[tn % 8]; ml = (MLEN != 0) ? MLEN : LENS[(tn * 3 + 1) % 8];
      for (int i = 0; i < adl; i++) ad.push_back(8'($urandom));
      for (int i = 0; i < ml; i++) m.push_back(8'($urandom));
      if (adl == 0) mech[3]++;
      if (ml == 0) mech[4]++;
      if (ml % BPB != 0 || adl % BPB != 0) mech[5]++;
      if (ml > BPB) mech[6]++;
      model(k, n, ad, m, c, rt);
      run(k, n, ad, m, 0, '0, ht, auth, gb, lb);
      checks++; if (got != c) begin failures++; $display("Trivia-ck%0s test %0d: ciphertext mismatch", "", tn); end
      checks++; if (ht != rt) begin failures++; $display("Trivia-ck%0s test %0d: tag %h expected %h", "", tn, ht, rt); end
      else mech[0]++;
      if (!stall_mode) begin
        checks++; if (gb != 0) begin failures++; $display("Trivia-ck%0s test %0d: block cycle count", "", tn); end
        checks++; if (lb != 0) begin failures++; $display("Trivia-ck%0s test %0d: latency", "", tn); end
      end
      run(k, n, ad, c, 1, rt, dt, auth, gb, lb);
      checks++; if (got != m) begin failures++; $display("Trivia-ck%0s test %0d: plaintext mismatch", "", tn); end
      checks++; if (!auth) begin failures++; $display("Trivia-ck%0s test %0d: valid tag rejected", "", tn); end
      else mech[1]++;
      if (!stall_mode) begin
        checks++; if (gb != 0) begin failures++; $display("Trivia-ck%0s test %0d: decrypt block cycle count", "", tn); end
        checks++; if (lb != 0) begin failures++; $display("Trivia-ck%0s test %0d: decrypt latency", "", tn); end
      end
      run(k, n, ad, c, 1, rt ^ (TAGB'(1) << (tn * 11)), dt, auth, gb, lb);
      checks++; if (auth) begin failures++; $display("Trivia-ck%0s test %0d: forged tag accepted", "", tn); end
      else mech[2]++;
    end
    done = 1;
  end
endmodule
