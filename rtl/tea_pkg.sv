// TEA shared constants and types.
//
// DELTA is the key-schedule constant (sqrt(5) - 1) * 2^31 = 0x9E3779B9, derived from
// the golden ratio. The running "sum" is DELTA times the number of rounds done.
package tea_pkg;
  localparam logic [31:0] DELTA = 32'h9E37_79B9;

  typedef logic [31:0]  word_t;
  typedef logic [63:0]  block_t;
  typedef logic [127:0] key_t;   // {k0, k1, k2, k3}, k0 in the top 32 bits
endpackage
