// trivia_sc: the Trivia-SC state of Trivia-ck, advanced 64 iterations per
// clock (the 64-bit parallel version of the source design).
//
// The state is three nonlinear feedback registers A (132 bits), B (105) and
// C (147). Register bit a[i] holds A_i (1-based, as in the cipher's
// description), likewise b and c. Operations, one per cycle, by priority:
//   load    A = K_1..K_128,1,1,1,1; B = all ones; C = IV_1..IV_128,1,..,1
//           with K_i = key[i-1] and IV_i = iv[i-1],
//   insert  (S_1..S_T) ^= T over S = A||B (T = ITAG bits, T_i = itag[i-1]),
//   update  Update64: 64 iterations of
//             t1 = A66 ^ A132 ^ A130&A131 ^ B96   (into B)
//             t2 = B69 ^ B105 ^ B103&B104 ^ C120  (into C)
//             t3 = C66 ^ C147 ^ C145&C146 ^ A75   (into A)
//           computed as 64-bit slices; the bit of the first iteration ends
//           at position 64 and that of the last at position 1.
// Outputs from the current state (combinational):
//   keyext  KeyExt64, the 64 key-stream bits of the next 64 iterations,
//           z = A66^A132^B69^B105^C66^C147^(A102&B66); bit 63 comes first,
//   stext   StExt64 = A_1..A_64 (stext[i-1] = A_i).
// All equations follow the cipher's Update64/KeyExt64/StExt64 description;
// the LSB-first bit numbering is this design's convention.
module trivia_sc #(
  parameter int unsigned ITAG = 160
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            load,
  input  logic [127:0]    key,
  input  logic [127:0]    iv,
  input  logic            insert,
  input  logic [ITAG-1:0] itag,
  input  logic            update,
  output logic [63:0]     keyext,
  output logic [63:0]     stext
);

  logic [132:1] a;
  logic [105:1] b;
  logic [147:1] c;
  logic [63:0]  t1, t2, t3;

  // 64 iterations at once: slice element k corresponds to index offset k
  always_comb begin
    t1 = a[66:3] ^ a[132:69] ^ (a[130:67] & a[131:68]) ^ b[96:33];
    t2 = b[69:6] ^ b[105:42] ^ (b[103:40] & b[104:41]) ^ c[120:57];
    t3 = c[66:3] ^ c[147:84] ^ (c[145:82] & c[146:83]) ^ a[75:12];
    keyext = a[66:3] ^ a[132:69] ^ b[69:6] ^ b[105:42] ^ c[66:3] ^ c[147:84]
           ^ (a[102:39] & b[66:3]);
    stext  = a[64:1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0;
      b <= '0;
      c <= '0;
    end else if (load) begin
      a <= {4'hF, key};
      b <= '1;
      c <= {19'h7FFFF, iv};
    end else if (insert) begin
      {b, a} <= {b, a} ^ 237'(itag);
    end else if (update) begin
      a <= {a[68:1], t3};
      b <= {b[41:1], t1};
      c <= {c[83:1], t2};
    end
  end

endmodule
