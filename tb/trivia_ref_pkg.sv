// trivia_ref_pkg: software model of the Trivia-ck blocks for the testbenches.
// Trivia-SC is stepped one iteration at a time with the single-round
// equations (Update and KeyExt), and field products are computed by
// schoolbook polynomial multiplication and reduction, so the model shares no
// structure with the 64-bit parallel, Horner-style RTL.
//
// Interface: sc_t with sc_load/sc_step/sc_update64/sc_keyext/sc_stext/
// sc_insert; gf32/gf64/pow32/pow64; hash_t with h_clear/h_absorb/h_emit;
// pad10; and encrypt(key, iv, ad, m, c, tag), the whole ck = 0 mode with the
// mask choice and byte order of this design.
// Timing: none (software model).
package trivia_ref_pkg;

  typedef struct {
    bit a [1:132];
    bit b [1:105];
    bit c [1:147];
  } sc_t;

  function automatic void sc_load(ref sc_t s, input logic [127:0] key, input logic [127:0] iv);
    for (int i = 1; i <= 132; i++) s.a[i] = (i <= 128) ? key[i-1] : 1'b1;
    for (int i = 1; i <= 105; i++) s.b[i] = 1'b1;
    for (int i = 1; i <= 147; i++) s.c[i] = (i <= 128) ? iv[i-1] : 1'b1;
  endfunction

  function automatic bit sc_z(ref sc_t s);
    return s.a[66] ^ s.a[132] ^ s.b[69] ^ s.b[105] ^ s.c[66] ^ s.c[147] ^ (s.a[102] & s.b[66]);
  endfunction

  function automatic void sc_step(ref sc_t s);
    bit t1, t2, t3;
    t1 = s.a[66] ^ s.a[132] ^ (s.a[130] & s.a[131]) ^ s.b[96];
    t2 = s.b[69] ^ s.b[105] ^ (s.b[103] & s.b[104]) ^ s.c[120];
    t3 = s.c[66] ^ s.c[147] ^ (s.c[145] & s.c[146]) ^ s.a[75];
    for (int i = 132; i > 1; i--) s.a[i] = s.a[i-1];
    for (int i = 105; i > 1; i--) s.b[i] = s.b[i-1];
    for (int i = 147; i > 1; i--) s.c[i] = s.c[i-1];
    s.a[1] = t3; s.b[1] = t1; s.c[1] = t2;
  endfunction

  function automatic void sc_update64(ref sc_t s);
    for (int i = 0; i < 64; i++) sc_step(s);
  endfunction

  // key-stream bits of the next 64 iterations, first one in bit 63
  function automatic logic [63:0] sc_keyext(sc_t s);
    logic [63:0] r;
    sc_t t;
    t = s;
    for (int i = 0; i < 64; i++) begin r[63-i] = sc_z(t); sc_step(t); end
    return r;
  endfunction

  function automatic logic [63:0] sc_stext(sc_t s);
    logic [63:0] r;
    for (int i = 1; i <= 64; i++) r[i-1] = s.a[i];
    return r;
  endfunction

  function automatic void sc_insert(ref sc_t s, input logic [159:0] t);
    for (int i = 1; i <= 160; i++)
      if (i <= 132) s.a[i] ^= t[i-1]; else s.b[i-132] ^= t[i-1];
  endfunction

  // schoolbook products in GF(2^32) / GF(2^64)
  function automatic logic [31:0] gf32(logic [31:0] x, logic [31:0] y);
    logic [62:0] p;
    p = '0;
    for (int i = 0; i < 32; i++) if (y[i]) p ^= 63'(x) << i;
    for (int i = 62; i >= 32; i--) if (p[i]) p ^= 63'(33'h1_0040_0007) << (i - 32);
    return p[31:0];
  endfunction

  function automatic logic [63:0] gf64(logic [63:0] x, logic [63:0] y);
    logic [126:0] p;
    p = '0;
    for (int i = 0; i < 64; i++) if (y[i]) p ^= 127'(x) << i;
    for (int i = 126; i >= 64; i--) if (p[i]) p ^= 127'(65'h1_0000_0000_0000_001B) << (i - 64);
    return p[63:0];
  endfunction

  function automatic logic [31:0] pow32(int n);   // alpha^n in GF(2^32)
    logic [31:0] r;
    r = 32'h1;
    for (int i = 0; i < n; i++) r = gf32(r, 32'h2);
    return r;
  endfunction

  function automatic logic [63:0] pow64(int n);   // alpha^n in GF(2^64)
    logic [63:0] r;
    r = 64'h1;
    for (int i = 0; i < n; i++) r = gf64(r, 64'h2);
    return r;
  endfunction

  // VPV-Hash state: checksum words and tag words
  typedef struct {
    logic [63:0] ck [4];
    logic [31:0] tg [5];
  } hash_t;

  function automatic void h_clear(ref hash_t h);
    foreach (h.ck[j]) h.ck[j] = '0;
    foreach (h.tg[j]) h.tg[j] = '0;
  endfunction

  function automatic void h_mult(ref hash_t h, input logic [63:0] v, input logic [63:0] k, input int tw);
    logic [63:0] op;
    logic [31:0] p;
    op = v ^ k;
    p = gf32(op[63:32], op[31:0]);
    for (int j = 0; j < tw; j++) h.tg[j] = gf32(h.tg[j], pow32(j)) ^ p;
  endfunction

  function automatic void h_absorb(ref hash_t h, input logic [63:0] x, input logic [63:0] k,
                                   input int cw, input int tw);
    for (int j = 0; j < cw; j++) h.ck[j] = gf64(h.ck[j], pow64(j)) ^ x;
    h_mult(h, x, k, tw);
  endfunction

  function automatic void h_emit(ref hash_t h, input int w, input logic [63:0] k, input int tw);
    h_mult(h, h.ck[w], k, tw);
  endfunction

  function automatic logic [63:0] pad10(logic [63:0] v, int n);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < 8 * n; i++) r[i] = v[i];
    if (n < 8) r[8*n] = 1'b1;
    return r;
  endfunction

  // whole Trivia-ck encryption as built by trivia_ck_core
  function automatic void encrypt(input logic [127:0] key, input logic [127:0] iv,
                                  input byte unsigned ad[$], input byte unsigned m[$],
                                  output byte unsigned c[$], output logic [127:0] tag);
    sc_t s;
    hash_t h5, h4;
    logic [63:0] ks [3];
    logic [63:0] blk, kx;
    logic [159:0] it;
    int nb;
    h_clear(h5); h_clear(h4);
    sc_load(s, key, iv);
    for (int i = 0; i < 18; i++) sc_update64(s);
    nb = (ad.size() + 7) / 8; if (nb == 0) nb = 1;
    for (int i = 0; i < nb; i++) begin
      int len;
      len = ad.size() - 8 * i; if (len > 8) len = 8; if (len < 0) len = 0;
      blk = '0;
      for (int j = 0; j < len; j++) blk[8*j +: 8] = ad[8*i+j];
      h_absorb(h5, pad10(blk, len), sc_stext(s), 4, 5);
      sc_update64(s);
    end
    for (int w = 0; w < 4; w++) begin
      if (w < 3) ks[w] = sc_keyext(s);
      h_emit(h5, w, sc_stext(s), 5);
      sc_update64(s);
    end
    for (int j = 0; j < 5; j++) it[32*j +: 32] = h5.tg[j];
    it ^= {ks[2][31:0], ks[1], ks[0]};
    sc_insert(s, it);
    for (int i = 0; i < 18; i++) sc_update64(s);
    nb = (m.size() + 7) / 8; if (nb == 0) nb = 1;
    c = {};
    for (int i = 0; i < nb; i++) begin
      int len;
      len = m.size() - 8 * i; if (len > 8) len = 8; if (len < 0) len = 0;
      blk = '0;
      for (int j = 0; j < len; j++) blk[8*j +: 8] = m[8*i+j];
      kx = sc_keyext(s);
      for (int j = 0; j < len; j++) c.push_back(blk[8*j +: 8] ^ kx[8*j +: 8]);
      h_absorb(h4, pad10(blk, len), sc_stext(s), 3, 4);
      sc_update64(s);
    end
    for (int w = 0; w < 3; w++) begin
      if (w == 0 || w == 2) ks[w] = sc_keyext(s);
      h_emit(h4, w, sc_stext(s), 4);
      sc_update64(s);
    end
    for (int j = 0; j < 4; j++) tag[32*j +: 32] = h4.tg[j];
    tag ^= {ks[2], ks[0]};
  endfunction

endpackage
