// morus_state_update_tb: random states and inputs through the combinational
// StateUpdate for N = 128 and N = 256, compared with morus_ref_pkg.
//
// Interface: no ports; instances for N = 128 and N = 256.
// Timing: combinational, no clock. Each new input is checked 1 time unit
// after it is applied; a watchdog ends the run after 100000 time units. The expected values follow the five-round
// description; word and byte order are this design's own.
module morus_state_update_tb;
  int checks = 0, failures = 0;
  logic [4:0][127:0] a_i, a_o;
  logic [127:0]      am;
  logic [4:0][255:0] b_i, b_o;
  logic [255:0]      bm;

  morus_state_update #(.N(128)) u640  (.s_i(a_i), .m(am), .s_o(a_o));
  morus_state_update #(.N(256)) u1280 (.s_i(b_i), .m(bm), .s_o(b_o));

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic [127:0] ra [5];
      logic [255:0] rb [5];
      for (int k = 0; k < 5; k++) begin
        for (int i = 0; i < 128; i += 32) a_i[k][i +: 32] = $urandom;
        for (int i = 0; i < 256; i += 32) b_i[k][i +: 32] = $urandom;
      end
      for (int i = 0; i < 128; i += 32) am[i +: 32] = (t % 4 == 0) ? 32'h0 : $urandom;
      for (int i = 0; i < 256; i += 32) bm[i +: 32] = (t % 4 == 0) ? 32'h0 : $urandom;
      #1;
      for (int k = 0; k < 5; k++) begin ra[k] = a_i[k]; rb[k] = b_i[k]; end
      morus_ref_pkg::morus_ref#(128)::update(ra, am);
      morus_ref_pkg::morus_ref#(256)::update(rb, bm);
      for (int k = 0; k < 5; k++) begin
        checks += 2;
        if (a_o[k] !== ra[k]) begin failures++; $display("640: block %0d mismatch at %0d", k, t); end
        if (b_o[k] !== rb[k]) begin failures++; $display("1280: block %0d mismatch at %0d", k, t); end
      end
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
