// trivia_fieldmult_tb: feeds a new random operand pair every cycle (with
// gaps) and checks that each product leaves the pipeline exactly 31 cycles
// later and equals the schoolbook GF(2^32) product of trivia_ref_pkg.
//
// Interface: no ports; one trivia_fieldmult.
// Timing: 10 ns clock, up to one operand pair per cycle; watchdog after
// 2000 cycles. The 32-stage pipelined multiplier follows the source design;
// the exact 31-cycle latency is this design's register placement.
module trivia_fieldmult_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid_i, valid_o;
  logic [31:0] a, b, p;
  trivia_fieldmult dut (.*);

  logic [31:0] exp_q [$];
  int          t_q [$];
  int cyc = 0, sent = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // output side; cyc is sampled before its own update, so an operand
  // captured at edge E and its product seen at edge E+31 differ by 31
  always @(posedge clk) if (!rst && valid_o) begin
    checks += 2;
    if (exp_q.size() == 0) begin failures += 2; $display("unexpected product"); end
    else begin
      logic [31:0] e;
      int t;
      e = exp_q.pop_front(); t = t_q.pop_front();
      if (p !== e) begin failures++; $display("product %h expected %h", p, e); end
      if (cyc - t != 31) begin failures++; $display("latency %0d", cyc - t); end
    end
  end

  initial begin
    valid_i = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 300; t++) begin
      valid_i = ($urandom_range(0, 3) != 0);
      a = (t == 0) ? 32'h8000_0000 : $urandom;
      b = (t == 0) ? 32'h0000_0002 : $urandom;
      if (valid_i) begin
        exp_q.push_back(trivia_ref_pkg::gf32(a, b));
        t_q.push_back(cyc);
        sent++;
      end
      @(posedge clk); #1;
    end
    valid_i = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d products missing", exp_q.size()); end
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
