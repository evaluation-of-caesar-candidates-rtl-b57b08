// trivia_sc_tb: loads random keys and IVs, then applies a random mix of
// Update64, Insert and idle cycles, and compares KeyExt64 and StExt64 after
// every cycle with the one-iteration-at-a-time model of trivia_ref_pkg.
//
// Interface: no ports; one trivia_sc with a 160-bit insert value.
// Timing: 10 ns clock, one operation per cycle, checked after each edge;
// watchdog after 5000 cycles. The equations follow Trivia-SC; the bit
// numbering of key, IV and outputs is this design's own.
module trivia_sc_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, insert, update;
  logic [127:0] key, iv;
  logic [159:0] itag;
  logic [63:0] keyext, stext;

  trivia_sc #(.ITAG(160)) dut (.*);

  initial begin
    trivia_ref_pkg::sc_t s;
    load = 0; insert = 0; update = 0; key = '0; iv = '0; itag = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 128; i += 32) begin key[i +: 32] = $urandom; iv[i +: 32] = $urandom; end
      load = 1;
      @(posedge clk); #1 load = 0;
      trivia_ref_pkg::sc_load(s, key, iv);
      for (int t = 0; t < 40; t++) begin
        int op;
        op = $urandom_range(0, 5);
        update = (op >= 2); insert = (op == 1);
        for (int i = 0; i < 160; i += 32) itag[i +: 32] = $urandom;
        @(posedge clk); #1;
        if (insert) trivia_ref_pkg::sc_insert(s, itag);
        else if (update) trivia_ref_pkg::sc_update64(s);
        update = 0; insert = 0;
        #1;
        checks += 2;
        if (keyext !== trivia_ref_pkg::sc_keyext(s)) begin failures++; $display("keyext mismatch r%0d t%0d", r, t); end
        if (stext  !== trivia_ref_pkg::sc_stext(s))  begin failures++; $display("stext mismatch r%0d t%0d", r, t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
