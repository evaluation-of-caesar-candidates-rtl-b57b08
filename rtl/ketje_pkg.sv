// ketje_pkg: constants shared by the Ketje ciphercore and its KECCAK-p round.
//
// The round constants are the low W bits of the KECCAK-f round constants for
// the last 12 rounds of KECCAK-f[200] (KetjeJr, lanes of 8 bits) and of
// KECCAK-f[400] (KetjeSr, lanes of 16 bits), listed for the twelve rounds of
// the start call. The stride call (6 rounds) uses entries 6..11 and the step
// call (1 round) uses entry 11. The rho offsets are generated from the KECCAK
// rule: starting from (x,y)=(1,0), lane t is rotated by (t+1)(t+2)/2 and the
// next lane is (y, 2x+3y mod 5); they are reduced modulo the lane width.
// Lint note: N_STRIDE and N_STEP are used only by ketje_core; a lint run of
// another module that reads this package reports them as unused.
package ketje_pkg;

  localparam int unsigned N_START  = 12;  // rounds of the start call
  localparam int unsigned N_STRIDE = 6;   // rounds of the stride call
  localparam int unsigned N_STEP   = 1;   // rounds of the step call

  // Round constants for the 12 start rounds, first round first.
  localparam logic [7:0]  RC_JR [N_START] = '{
    8'h81, 8'h09, 8'h8A, 8'h88, 8'h09, 8'h0A,
    8'h8B, 8'h8B, 8'h89, 8'h03, 8'h02, 8'h80};
  localparam logic [15:0] RC_SR [N_START] = '{
    16'h008A, 16'h0088, 16'h8009, 16'h000A, 16'h808B, 16'h008B,
    16'h8089, 16'h8003, 16'h8002, 16'h0080, 16'h800A, 16'h000A};

  // Round constant of round `idx` (0..11 in the start sequence) for lane width w.
  function automatic logic [15:0] round_const(int unsigned w, logic [3:0] idx);
    if (w == 8) return {8'h00, RC_JR[idx]};
    return RC_SR[idx];
  endfunction

  // Rotation offset of lane (x, y) before reduction modulo the lane width.
  function automatic int unsigned rho_offset(int unsigned x, int unsigned y);
    int unsigned cx, cy, nx;
    cx = 1; cy = 0;
    if (x == 0 && y == 0) return 0;
    for (int unsigned t = 0; t < 24; t++) begin
      if (cx == x && cy == y) return ((t + 1) * (t + 2)) / 2;
      nx = cy;
      cy = (2 * cx + 3 * cy) % 5;
      cx = nx;
    end
    return 0;
  endfunction

endpackage
