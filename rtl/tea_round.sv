// tea_round: one full TEA round (both Feistel halves), purely combinational.
//
// Encryption updates y from z and then z from the new y:
//   y' = y + (((z << 4) + k0) ^ (z + sum) ^ ((z >> 5) + k1))
//   z' = z + (((y' << 4) + k2) ^ (y' + sum) ^ ((y' >> 5) + k3))
// Decryption runs the same two mixing functions in the opposite order and subtracts:
//   z' = z - (((y << 4) + k2) ^ (y + sum) ^ ((y >> 5) + k3))
//   y' = y - (((z' << 4) + k0) ^ (z' + sum) ^ ((z' >> 5) + k1))
// The two "+/-" stages are the encoder/decoder adders of the round. `sum` is the
// round's multiple of DELTA and is supplied by the caller (tea_core keeps it in a
// register); the inner term is always z + sum, as in the original TEA definition.
// Interface: y_i, z_i, key_i = {k0,k1,k2,k3}, sum_i, decrypt_i -> y_o, z_o.
// Timing: no registers; four 32-bit adders deep per half.
module tea_round
  import tea_pkg::*;
(
  input  word_t y_i,
  input  word_t z_i,
  input  key_t  key_i,
  input  word_t sum_i,
  input  logic  decrypt_i,
  output word_t y_o,
  output word_t z_o
);
  word_t k0, k1, k2, k3;
  assign {k0, k1, k2, k3} = key_i;

  // Mixing function shared by both halves.
  function automatic word_t mix(word_t v, word_t ka, word_t kb, word_t s);
    return ((v << 4) + ka) ^ (v + s) ^ ((v >> 5) + kb);
  endfunction

  always_comb begin
    if (!decrypt_i) begin
      y_o = y_i + mix(z_i, k0, k1, sum_i);
      z_o = z_i + mix(y_o, k2, k3, sum_i);
    end else begin
      z_o = z_i - mix(y_i, k2, k3, sum_i);
      y_o = y_i - mix(z_o, k0, k1, sum_i);
    end
  end
endmodule
