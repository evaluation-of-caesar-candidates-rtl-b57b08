// ketje_keccak_round_tb: applies random states and every round constant of
// the start sequence to the combinational round, for W = 16 and W = 8, and
// compares with the bit-level model in ketje_ref_pkg.
//
// Interface: no ports; two instances of ketje_keccak_round (W = 16, W = 8).
// Timing: the round is combinational; no clock. Each new input is checked
// 1 time unit after it is applied; a watchdog ends the run after 100000
// time units. The round steps follow
// the KECCAK-p definition; lane order in the vector is this design's own.
module ketje_keccak_round_tb;
  int checks = 0, failures = 0;
  logic [399:0] s16_i, s16_o;
  logic [15:0]  rc16;
  logic [199:0] s8_i, s8_o;
  logic [7:0]   rc8;
  logic [399:0] exp16;
  logic [199:0] exp8;

  ketje_keccak_round #(.W(16)) u16 (.state_i(s16_i), .rc(rc16), .state_o(s16_o));
  ketje_keccak_round #(.W(8))  u8  (.state_i(s8_i),  .rc(rc8),  .state_o(s8_o));

  // round constant of Keccak-f round ir, from the LFSR
  function automatic logic [15:0] rc_of(int ir, int w);
    logic [15:0] r;
    r = '0;
    for (int j = 0; j <= $clog2(w); j++) r[(1 << j) - 1] = ketje_ref_pkg::ketje_ref#(16)::rc_bit(j + 7 * ir);
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 240; t++) begin
      int ir16, ir8;
      ir16 = 8 + t % 12;        // last 12 rounds of KECCAK-f[400]
      ir8  = 6 + t % 12;        // last 12 rounds of KECCAK-f[200]
      for (int i = 0; i < 400; i += 32) s16_i[i +: 32] = (t == 0) ? 32'h0 : $urandom;
      for (int i = 0; i < 200; i += 8)  s8_i[i +: 8]   = (t == 0) ? 8'h0 : 8'($urandom);
      rc16 = rc_of(ir16, 16);
      rc8  = 8'(rc_of(ir8, 8));
      #1;
      exp16 = ketje_ref_pkg::ketje_ref#(16)::round(s16_i, ir16);
      exp8  = ketje_ref_pkg::ketje_ref#(8)::round(s8_i, ir8);
      checks += 2;
      if (s16_o !== exp16) begin failures++; $display("W=16 round mismatch at %0d", t); end
      if (s8_o  !== exp8)  begin failures++; $display("W=8 round mismatch at %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
