// blowfish_parray: the Blowfish P-array, 18 round subkeys of 32 bits in registers.
//
// All 18 words are visible at once on p_o, so the round engine can pick the subkey of
// the current round (in forward order for encryption, reverse order for decryption)
// and the two final whitening words without a read port per use. One synchronous
// write port serves the key schedule. Reset clears the array; the key schedule
// loads every word before use.
// Size (18 words of 32 bits) is Blowfish's; holding them in registers rather than a
// RAM is this design's choice.
module blowfish_parray
  import blowfish_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   we_i,
  input  p_idx_t waddr_i,
  input  word_t  wdata_i,
  output word_t  p_o [P_ENTRIES]
);
  word_t p_q [P_ENTRIES];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < P_ENTRIES; i++) p_q[i] <= '0;
    end else if (we_i && waddr_i < p_idx_t'(P_ENTRIES)) begin
      p_q[waddr_i] <= wdata_i;
    end
  end

  assign p_o = p_q;
endmodule
