// ketje_drv: drives one Ketje ciphercore (lane width W) through encryptions,
// decryptions with the right and with a corrupted tag, and compares output
// blocks and tags with a bit-level model of MonkeyWrap (rounds from
// ketje_ref_pkg). Per block the core must take 3 cycles when nothing stalls.
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
module ketje_drv #(
  parameter int unsigned W      = 16,
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
  localparam int unsigned B    = 25 * W;
  localparam int unsigned RHO  = 2 * W;
  localparam int unsigned R    = RHO + 4;
  localparam int unsigned BW   = RHO;
  localparam int unsigned KEYB = (W == 8) ? 96 : 128;
  localparam int unsigned NB   = (W == 8) ? 80 : 128;
  localparam int unsigned TW   = (W == 8) ? 6 : 4;
  localparam int unsigned TAGB = TW * RHO;
  localparam int unsigned NR   = (W == 8) ? 18 : 20;
  localparam int unsigned SZW  = $clog2(RHO / 8 + 1);
  localparam int unsigned BPB  = RHO / 8;
  localparam int LENS [8] = '{0, 1, 3, 4, 5, 8, 11, 17};

  // ------------------------------------------------------------ model
  function automatic logic [B-1:0] ref_f(logic [B-1:0] s, int n);
    for (int i = 0; i < n; i++) s = ketje_ref_pkg::ketje_ref#(W)::round(s, NR - n + i);
    return s;
  endfunction

  // duplex input: string of 8*nbytes data bits then the bits of `tail`
  function automatic logic [B-1:0] ref_absorb(logic [B-1:0] s, byte unsigned d[$],
                                              int base, int nbytes, bit tail [$]);
    int p;
    p = 0;
    for (int k = 0; k < nbytes; k++)
      for (int i = 0; i < 8; i++) begin s[p] ^= d[base+k][i]; p++; end
    foreach (tail[i]) begin s[p] ^= tail[i]; p++; end
    s[p] ^= 1'b1;          // pad10*1
    s[R-1] ^= 1'b1;
    return s;
  endfunction

  task automatic model(input logic [KEYB-1:0] k, input logic [NB-1:0] n,
                          input byte unsigned ad[$], input byte unsigned m[$],
                          output byte unsigned c[$], output logic [TAGB-1:0] t);
    logic [B-1:0] s;
    int nad, nm, p;
    s = '0;
    // keypack: length byte, key, 0x01; then nonce; pad10*1 over b bits
    p = 0;
    for (int i = 0; i < 8; i++) begin s[p] = 1'(((KEYB + 16) / 8) >> i); p++; end
    for (int i = 0; i < KEYB; i++) begin s[p] = k[i]; p++; end
    s[p] = 1'b1; p += 8;
    for (int i = 0; i < NB; i++) begin s[p] = n[i]; p++; end
    s[p] = 1'b1; s[B-1] ^= 1'b1;
    s = ref_f(s, 12);
    nad = (ad.size() + BPB - 1) / BPB; if (nad == 0) nad = 1;
    for (int i = 0; i < nad; i++) begin
      int len;
      len = ad.size() - i * BPB; if (len > BPB) len = BPB; if (len < 0) len = 0;
      s = ref_absorb(s, ad, i * BPB, len, (i == nad - 1) ? '{0, 1} : '{0, 0});
      s = ref_f(s, 1);
    end
    nm = (m.size() + BPB - 1) / BPB; if (nm == 0) nm = 1;
    c = {};
    for (int i = 0; i < nm; i++) begin
      int len;
      len = m.size() - i * BPB; if (len > BPB) len = BPB; if (len < 0) len = 0;
      for (int j = 0; j < len; j++) c.push_back(m[i*BPB+j] ^ s[8*j +: 8]);
      s = ref_absorb(s, m, i * BPB, len, (i == nm - 1) ? '{1, 0} : '{1, 1});
      s = ref_f(s, (i == nm - 1) ? 6 : 1);
    end
    for (int i = 0; i < TW; i++) begin
      t[i*RHO +: RHO] = s[RHO-1:0];
      if (i != TW - 1) begin
        s = ref_absorb(s, m, 0, 0, '{0});
        s = ref_f(s, 1);
      end
    end
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
    if (tag_write && !tag_ready) begin failures++; $display("Ketje W=%0d: tag written while not ready", W); end
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
      if (last_read >= 0 && cyc - last_read != 3) gaps_bad++;
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
    lat_bad = (cyc - t0 != ((W == 8) ? 30 : 26) + 3 * nblocks);
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
      checks++; if (got != c) begin failures++; $display("Ketje W=%0d test %0d: ciphertext mismatch", W, tn); end
      checks++; if (ht != rt) begin failures++; $display("Ketje W=%0d test %0d: tag %h expected %h", W, tn, ht, rt); end
      else mech[0]++;
      if (!stall_mode) begin
        checks++; if (gb != 0) begin failures++; $display("Ketje W=%0d test %0d: block cycle count", W, tn); end
        checks++; if (lb != 0) begin failures++; $display("Ketje W=%0d test %0d: latency", W, tn); end
      end
      run(k, n, ad, c, 1, rt, dt, auth, gb, lb);
      checks++; if (got != m) begin failures++; $display("Ketje W=%0d test %0d: plaintext mismatch", W, tn); end
      checks++; if (!auth) begin failures++; $display("Ketje W=%0d test %0d: valid tag rejected", W, tn); end
      else mech[1]++;
      if (!stall_mode) begin
        checks++; if (gb != 0) begin failures++; $display("Ketje W=%0d test %0d: decrypt block cycle count", W, tn); end
        checks++; if (lb != 0) begin failures++; $display("Ketje W=%0d test %0d: decrypt latency", W, tn); end
      end
      run(k, n, ad, c, 1, rt ^ (TAGB'(1) << (tn * 11)), dt, auth, gb, lb);
      checks++; if (auth) begin failures++; $display("Ketje W=%0d test %0d: forged tag accepted", W, tn); end
      else mech[2]++;
    end
    done = 1;
  end
endmodule
