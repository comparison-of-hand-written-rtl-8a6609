// blowfish: complete Blowfish cipher, key schedule plus block encryption/decryption.
//
// Holds the P-array (18 words, registers), four 256-word S-boxes, the ROM of pi
// digits that seeds them, the key schedule controller and one round engine that does
// one Feistel round per clock. The round engine is shared: during the key schedule
// the controller uses it to encrypt the 521 blocks that replace the table; afterwards
// it serves the user's blocks.
//
// Interface:
//   key_load_i  with key_i (byte 0 in bits 447:440) and key_len_i (bytes, 4..56) is
//               accepted when key_load_ready_o is high. key_ready_o falls, and rises
//               again 11463 clocks later when the tables are ready.
//   in_valid_i / in_ready_o  valid/ready handshake for one 64-bit block, with
//               in_decrypt_i selecting decryption; in_ready_o is high when a key is
//               ready and the round engine is idle. in_valid_i must stay high, with
//               its data stable, until accepted.
//   out_valid_o pulses for one clock with the result on out_block_o (held after).
// Timing: a block accepted in cycle 0 produces out_valid_o in cycle 17; the next block
// can be accepted in that same cycle, so one block per 17 clocks.
// The tables, rounds and key schedule are Blowfish's; sharing one round engine between
// the key schedule and the data, the handshakes and the clock counts are this design's
// choices.
module blowfish
  import blowfish_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  // key
  input  logic         key_load_i,
  input  logic [447:0] key_i,
  input  logic [5:0]   key_len_i,
  output logic         key_load_ready_o,
  output logic         key_ready_o,
  // data in
  input  logic         in_valid_i,
  output logic         in_ready_o,
  input  logic         in_decrypt_i,
  input  block_t       in_block_i,
  // data out
  output logic         out_valid_o,
  output block_t       out_block_o
);
  // key schedule <-> tables
  logic        ks_busy, ks_ready;
  table_addr_t rom_addr;
  word_t       rom_data;
  logic        tbl_we;
  table_addr_t tbl_waddr;
  word_t       tbl_wdata;
  tbl_target_t tgt;
  logic        ks_core_start;
  block_t      ks_core_block;

  // round engine
  logic        core_start, core_dec, core_busy, core_done;
  block_t      core_in, core_out;
  word_t       p [P_ENTRIES];
  s_idx_t      s_addr [NUM_SBOX];
  word_t       s_data [NUM_SBOX];

  assign key_load_ready_o = !ks_busy && !core_busy;
  assign key_ready_o      = ks_ready;
  assign in_ready_o       = ks_ready && !ks_busy && !core_busy;

  blowfish_pi_rom u_rom (
    .addr_i(rom_addr),
    .data_o(rom_data)
  );

  blowfish_keysched u_ks (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .key_load_i   (key_load_i && key_load_ready_o),
    .key_i        (key_i),
    .key_len_i    (key_len_i),
    .busy_o       (ks_busy),
    .key_ready_o  (ks_ready),
    .rom_addr_o   (rom_addr),
    .rom_data_i   (rom_data),
    .tbl_we_o     (tbl_we),
    .tbl_waddr_o  (tbl_waddr),
    .tbl_wdata_o  (tbl_wdata),
    .core_start_o (ks_core_start),
    .core_block_o (ks_core_block),
    .core_done_i  (core_done),
    .core_result_i(core_out)
  );

  assign tgt = tbl_map(tbl_waddr);

  blowfish_parray u_p (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .we_i   (tbl_we && tgt.is_p),
    .waddr_i(tgt.p_idx),
    .wdata_i(tbl_wdata),
    .p_o    (p)
  );

  for (genvar s = 0; s < NUM_SBOX; s++) begin : g_sbox
    blowfish_sbox u_sbox (
      .clk_i  (clk_i),
      .raddr_i(s_addr[s]),
      .rdata_o(s_data[s]),
      .we_i   (tbl_we && !tgt.is_p && tgt.s_sel == s_sel_t'(s)),
      .waddr_i(tgt.s_idx),
      .wdata_i(tbl_wdata)
    );
  end

  // The key schedule owns the round engine while it runs.
  always_comb begin
    if (ks_busy) begin
      core_start = ks_core_start;
      core_dec   = 1'b0;
      core_in    = ks_core_block;
    end else begin
      core_start = in_valid_i && in_ready_o;
      core_dec   = in_decrypt_i;
      core_in    = in_block_i;
    end
  end

  blowfish_core u_core (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .start_i    (core_start),
    .decrypt_i  (core_dec),
    .block_i    (core_in),
    .busy_o     (core_busy),
    .done_o     (core_done),
    .block_o    (core_out),
    .p_i        (p),
    .sbox_addr_o(s_addr),
    .sbox_data_i(s_data)
  );

  assign out_valid_o = core_done && !ks_busy;
  assign out_block_o = core_out;

  // A block offered but not yet taken must be held.
  a_in_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
    in_valid_i && !in_ready_o |=> in_valid_i && $stable(in_block_i) && $stable(in_decrypt_i));
endmodule
