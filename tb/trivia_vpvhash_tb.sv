// trivia_vpvhash_tb: absorbs random blocks into VPVHash5 and VPVHash4, then
// emits their checksum words, waits until the multipliers are empty and
// compares checksum and tag with the trivia_ref_pkg model. The last product
// must leave the 31-stage multiplier 31 cycles after the last emit.
//
// Interface: no ports; VPVHash5 (4 checksum / 5 tag words) and VPVHash4
// (3 / 4). Timing: 10 ns clock; watchdog after 3000 cycles. The structure
// follows the source design; the order in which checksum words are emitted
// is this design's own.
module trivia_vpvhash_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr, absorb, emit;
  logic [1:0]   word5, word4;
  logic [63:0]  x, k;
  logic [255:0] ck5;
  logic [191:0] ck4;
  logic [159:0] tg5;
  logic [127:0] tg4;
  logic busy5, busy4;

  trivia_vpvhash #(.CW(4), .TW(5)) u5 (.clk, .rst, .clr, .absorb, .emit, .word(word5), .x, .k,
                                      .checksum(ck5), .tag(tg5), .busy(busy5));
  trivia_vpvhash #(.CW(3), .TW(4)) u4 (.clk, .rst, .clr, .absorb, .emit, .word(word4), .x, .k,
                                      .checksum(ck4), .tag(tg4), .busy(busy4));

  initial begin
    trivia_ref_pkg::hash_t h5, h4;
    int waited;
    clr = 0; absorb = 0; emit = 0; word5 = 0; word4 = 0; x = '0; k = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int r = 0; r < 3; r++) begin
      int nblk;
      clr = 1; @(posedge clk); #1 clr = 0;
      trivia_ref_pkg::h_clear(h5); trivia_ref_pkg::h_clear(h4);
      nblk = 1 + r * 3;
      for (int t = 0; t < nblk; t++) begin
        absorb = 1; x = {$urandom, $urandom}; k = {$urandom, $urandom};
        trivia_ref_pkg::h_absorb(h5, x, k, 4, 5);
        trivia_ref_pkg::h_absorb(h4, x, k, 3, 4);
        @(posedge clk); #1 absorb = 0;
      end
      // four emit cycles: VPVHash5 emits words 0..3, VPVHash4 (three
      // checksum words) emits 0, 1, 2 and then word 2 once more
      for (int w = 0; w < 4; w++) begin
        emit = 1; word5 = 2'(w); word4 = 2'((w < 3) ? w : 2); k = {$urandom, $urandom};
        trivia_ref_pkg::h_emit(h5, w, k, 5);
        trivia_ref_pkg::h_emit(h4, (w < 3) ? w : 2, k, 4);
        @(posedge clk); #1 emit = 0;
      end
      waited = 0;
      while (busy5 || busy4) begin @(posedge clk); #1 waited++; end
      checks += 5;
      if (waited != 31) begin failures++; $display("pipeline emptied after %0d cycles", waited); end
      if (ck5 !== {h5.ck[3], h5.ck[2], h5.ck[1], h5.ck[0]}) begin failures++; $display("checksum5 mismatch"); end
      if (ck4 !== {h4.ck[2], h4.ck[1], h4.ck[0]}) begin failures++; $display("checksum4 mismatch"); end
      if (tg5 !== {h5.tg[4], h5.tg[3], h5.tg[2], h5.tg[1], h5.tg[0]}) begin failures++; $display("tag5 mismatch"); end
      if (tg4 !== {h4.tg[3], h4.tg[2], h4.tg[1], h4.tg[0]}) begin failures++; $display("tag4 mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
