// trivia_vhorner_tb: feeds random sequences into VHorner64/4 and VHorner32/5
// and compares every word with the Vandermonde product
// y_j = sum_i alpha^(j*(k-i)) x_i, evaluated directly with field powers.
//
// Interface: no ports; instances for 64-bit words x 4 and 32-bit words x 5.
// Timing: 10 ns clock, one input per enabled cycle; watchdog after 2000
// cycles. The Vandermonde rows follow the source design; which word gets
// which power of alpha is this design's own.
module trivia_vhorner_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr, en;
  logic [63:0]  x64;
  logic [31:0]  x32;
  logic [255:0] y64;
  logic [159:0] y32;

  trivia_vhorner #(.WW(64), .D(4)) u64 (.clk, .rst, .clr, .en, .x(x64), .y(y64));
  trivia_vhorner #(.WW(32), .D(5)) u32 (.clk, .rst, .clr, .en, .x(x32), .y(y32));

  initial begin
    logic [63:0] h64 [$];
    logic [31:0] h32 [$];
    clr = 0; en = 0; x64 = '0; x32 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int r = 0; r < 3; r++) begin
      clr = 1; @(posedge clk); #1 clr = 0;
      h64 = {}; h32 = {};
      for (int t = 0; t < 12; t++) begin
        en = ($urandom_range(0, 4) != 0);
        x64 = {$urandom, $urandom}; x32 = $urandom;
        if (en) begin h64.push_back(x64); h32.push_back(x32); end
        @(posedge clk); #1 en = 0;
        for (int j = 0; j < 4; j++) begin
          logic [63:0] e;
          int k;
          e = '0; k = h64.size();
          for (int i = 0; i < k; i++) e ^= trivia_ref_pkg::gf64(h64[i], trivia_ref_pkg::pow64(j * (k - 1 - i)));
          checks++;
          if (y64[64*j +: 64] !== e) begin failures++; $display("64-bit word %0d mismatch", j); end
        end
        for (int j = 0; j < 5; j++) begin
          logic [31:0] e;
          int k;
          e = '0; k = h32.size();
          for (int i = 0; i < k; i++) e ^= trivia_ref_pkg::gf32(h32[i], trivia_ref_pkg::pow32(j * (k - 1 - i)));
          checks++;
          if (y32[32*j +: 32] !== e) begin failures++; $display("32-bit word %0d mismatch", j); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
