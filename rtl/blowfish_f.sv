// blowfish_f: the Blowfish F function's arithmetic.
//
// The 32-bit F input x is cut into four bytes a (bits 31:24), b, c, d (bits 7:0); each
// byte indexes one of the four S-boxes. This block combines the four looked-up words:
//   F = ((S0[a] + S1[b]) ^ S2[c]) + S3[d]      (additions modulo 2^32)
// The S-boxes themselves are separate memories (blowfish_sbox), so the lookups are
// done outside and their read data arrive on s0_i..s3_i.
// Timing: combinational, two adders and an XOR deep.
// The order of the operations is Blowfish's; keeping the S-box reads outside is this
// design's choice.
module blowfish_f
  import blowfish_pkg::*;
(
  input  word_t s0_i,
  input  word_t s1_i,
  input  word_t s2_i,
  input  word_t s3_i,
  output word_t f_o
);
  assign f_o = ((s0_i + s1_i) ^ s2_i) + s3_i;
endmodule
