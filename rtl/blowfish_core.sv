// blowfish_core: iterative Blowfish round engine, one Feistel round per clock.
//
// The block is split into a left half L (bits 63:32) and right half R (bits 31:0).
// Each of the 16 rounds computes, with subkey Pk:
//   x  = L ^ Pk
//   L' = R ^ F(x)          R' = x
// After the last round the final swap is undone and the two remaining subkeys are
// XORed in: out = {R ^ P17, L ^ P16} (names 0-based). Decryption is the same datapath
// with the P-array used in reverse order (P17 first, P1 and P0 for whitening).
// F is evaluated by looking up the four bytes of x in the four S-boxes, which sit
// outside this module (sbox_addr_o / sbox_data_i), and combining them in blowfish_f.
//
// Interface: start_i is accepted when busy_o is low, with decrypt_i and block_i.
// done_o pulses for one cycle with the result on block_o (held until the next one).
// The P-array and S-boxes must not change while busy_o is high.
// Timing: start in cycle 0, rounds in cycles 1..16, done_o high in cycle 17.
// The round equations follow the cipher's definition; one round per clock and the
// start/done handshake are this design's choices.
module blowfish_core
  import blowfish_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   start_i,
  input  logic   decrypt_i,
  input  block_t block_i,
  output logic   busy_o,
  output logic   done_o,
  output block_t block_o,
  // subkeys
  input  word_t  p_i [P_ENTRIES],
  // S-box lookups for the F function
  output s_idx_t sbox_addr_o [NUM_SBOX],
  input  word_t  sbox_data_i [NUM_SBOX]
);
  word_t  l_q, r_q;
  logic   dec_q;
  logic [3:0] rnd_q;

  word_t pk, x, f, l_n, r_n, wl, wr;

  always_comb begin
    pk = dec_q ? p_i[5'(P_ENTRIES - 1) - 5'(rnd_q)] : p_i[5'(rnd_q)];
    x  = l_q ^ pk;
  end

  assign sbox_addr_o[0] = x[31:24];
  assign sbox_addr_o[1] = x[23:16];
  assign sbox_addr_o[2] = x[15:8];
  assign sbox_addr_o[3] = x[7:0];

  blowfish_f u_f (
    .s0_i(sbox_data_i[0]),
    .s1_i(sbox_data_i[1]),
    .s2_i(sbox_data_i[2]),
    .s3_i(sbox_data_i[3]),
    .f_o (f)
  );

  always_comb begin
    l_n = r_q ^ f;
    r_n = x;
    // final whitening subkeys
    wl  = dec_q ? p_i[0] : p_i[17];
    wr  = dec_q ? p_i[1] : p_i[16];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      l_q     <= '0;
      r_q     <= '0;
      dec_q   <= 1'b0;
      rnd_q   <= '0;
      busy_o  <= 1'b0;
      done_o  <= 1'b0;
      block_o <= '0;
    end else begin
      done_o <= 1'b0;
      if (!busy_o) begin
        if (start_i) begin
          l_q    <= block_i[63:32];
          r_q    <= block_i[31:0];
          dec_q  <= decrypt_i;
          rnd_q  <= '0;
          busy_o <= 1'b1;
        end
      end else begin
        l_q   <= l_n;
        r_q   <= r_n;
        rnd_q <= rnd_q + 1'b1;
        if (rnd_q == 4'(ROUNDS - 1)) begin
          // undo the last swap, then whiten: y = R ^ P17, z = L ^ P16
          block_o <= {r_n ^ wl, l_n ^ wr};
          done_o  <= 1'b1;
          busy_o  <= 1'b0;
        end
      end
    end
  end
endmodule
