// tea_blowfish_top: the two 64-bit block ciphers, Blowfish and TEA, side by side.
//
// The two cores are independent designs that share only the clock and reset; each
// keeps its own ports, prefixed bf_ and tea_. See blowfish.sv and tea_core.sv for the
// protocols and timing:
//   Blowfish: load a key (11463 clocks of key schedule), then one block per 17 clocks
//             through a valid/ready input and a one-clock output strobe.
//   TEA:      16 rounds, two per clock; start with key and block when tea_busy_o is
//             low, result with tea_done_o 9 clocks later.
// Putting both ciphers under one top is only a convenience for building and testing;
// neither uses the other.
module tea_blowfish_top
  import blowfish_pkg::*;
  import tea_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  // Blowfish
  input  logic         bf_key_load_i,
  input  logic [447:0] bf_key_i,
  input  logic [5:0]   bf_key_len_i,
  output logic         bf_key_load_ready_o,
  output logic         bf_key_ready_o,
  input  logic         bf_in_valid_i,
  output logic         bf_in_ready_o,
  input  logic         bf_in_decrypt_i,
  input  logic [63:0]  bf_in_block_i,
  output logic         bf_out_valid_o,
  output logic [63:0]  bf_out_block_o,
  // TEA
  input  logic         tea_start_i,
  input  logic         tea_decrypt_i,
  input  logic [127:0] tea_key_i,
  input  logic [63:0]  tea_block_i,
  output logic         tea_busy_o,
  output logic         tea_done_o,
  output logic [63:0]  tea_block_o
);
  blowfish u_blowfish (
    .clk_i           (clk_i),
    .rst_ni          (rst_ni),
    .key_load_i      (bf_key_load_i),
    .key_i           (bf_key_i),
    .key_len_i       (bf_key_len_i),
    .key_load_ready_o(bf_key_load_ready_o),
    .key_ready_o     (bf_key_ready_o),
    .in_valid_i      (bf_in_valid_i),
    .in_ready_o      (bf_in_ready_o),
    .in_decrypt_i    (bf_in_decrypt_i),
    .in_block_i      (bf_in_block_i),
    .out_valid_o     (bf_out_valid_o),
    .out_block_o     (bf_out_block_o)
  );

  tea_core u_tea (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .start_i  (tea_start_i),
    .decrypt_i(tea_decrypt_i),
    .key_i    (tea_key_i),
    .block_i  (tea_block_i),
    .busy_o   (tea_busy_o),
    .done_o   (tea_done_o),
    .block_o  (tea_block_o)
  );
endmodule
