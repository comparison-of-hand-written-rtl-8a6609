// tea_core: iterative TEA block cipher, encryption and decryption, several rounds per
// clock.
//
// A 64-bit block is split into halves y (bits 63:32) and z (bits 31:0). ROUNDS full
// rounds (default 16) are applied, ROUNDS_PER_CYCLE (default 2) of them chained
// combinationally per clock, so one block takes one load cycle plus
// ROUNDS/ROUNDS_PER_CYCLE compute cycles: 9 cycles at the defaults. A round counter
// advances every clock and is cleared when the block is finished. The running sum is
// kept in a register: it starts at 0 and each encryption round first adds DELTA; for
// decryption it starts at DELTA*ROUNDS and is reduced by DELTA after each round.
//
// Interface: start_i is accepted when busy_o is low, together with decrypt_i, key_i
// and block_i, which are captured. done_o pulses for one cycle when block_o holds the
// result; block_o keeps it until the next result.
// Timing: start in cycle 0, done_o high in cycle 1 + ROUNDS/ROUNDS_PER_CYCLE.
// The round count and the two-rounds-per-clock arrangement follow the published
// 9-cycle latency; the handshake and reset behaviour are this design's own.
module tea_core
  import tea_pkg::*;
#(
  parameter int unsigned ROUNDS           = 16,
  parameter int unsigned ROUNDS_PER_CYCLE = 2
) (
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   start_i,
  input  logic   decrypt_i,
  input  key_t   key_i,
  input  block_t block_i,
  output logic   busy_o,
  output logic   done_o,
  output block_t block_o
);
  localparam int unsigned STEPS = ROUNDS / ROUNDS_PER_CYCLE;
  localparam int unsigned CW    = (STEPS > 1) ? $clog2(STEPS) : 1;
  localparam word_t SUM_DEC_INIT = word_t'(DELTA * ROUNDS);

  word_t          y_q, z_q, sum_q;
  key_t           key_q;
  logic           dec_q;
  logic [CW-1:0]  cnt_q;

  // Chain of ROUNDS_PER_CYCLE rounds evaluated in one clock.
  word_t y_c [ROUNDS_PER_CYCLE+1];
  word_t z_c [ROUNDS_PER_CYCLE+1];
  word_t s_c [ROUNDS_PER_CYCLE];

  assign y_c[0] = y_q;
  assign z_c[0] = z_q;

  for (genvar r = 0; r < ROUNDS_PER_CYCLE; r++) begin : g_round
    // Encryption: sum for round r of this step is sum_q + (r+1)*DELTA.
    // Decryption: sum_q - r*DELTA.
    assign s_c[r] = dec_q ? sum_q - word_t'(DELTA * r) : sum_q + word_t'(DELTA * (r + 1));
    tea_round u_round (
      .y_i      (y_c[r]),
      .z_i      (z_c[r]),
      .key_i    (key_q),
      .sum_i    (s_c[r]),
      .decrypt_i(dec_q),
      .y_o      (y_c[r+1]),
      .z_o      (z_c[r+1])
    );
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_o  <= 1'b0;
      done_o  <= 1'b0;
      block_o <= '0;
      y_q     <= '0;
      z_q     <= '0;
      sum_q   <= '0;
      key_q   <= '0;
      dec_q   <= 1'b0;
      cnt_q   <= '0;
    end else begin
      done_o <= 1'b0;
      if (!busy_o) begin
        if (start_i) begin
          // Input division: 64-bit block into halves y and z.
          y_q    <= block_i[63:32];
          z_q    <= block_i[31:0];
          key_q  <= key_i;
          dec_q  <= decrypt_i;
          sum_q  <= decrypt_i ? SUM_DEC_INIT : '0;
          cnt_q  <= '0;
          busy_o <= 1'b1;
        end
      end else begin
        y_q   <= y_c[ROUNDS_PER_CYCLE];
        z_q   <= z_c[ROUNDS_PER_CYCLE];
        sum_q <= dec_q ? sum_q - word_t'(DELTA * ROUNDS_PER_CYCLE)
                       : sum_q + word_t'(DELTA * ROUNDS_PER_CYCLE);
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CW'(STEPS - 1)) begin
          // Output compilation: halves back into one block.
          block_o <= {y_c[ROUNDS_PER_CYCLE], z_c[ROUNDS_PER_CYCLE]};
          done_o  <= 1'b1;
          busy_o  <= 1'b0;
          cnt_q   <= '0;
        end
      end
    end
  end

  initial begin
    assert (ROUNDS_PER_CYCLE > 0 && ROUNDS % ROUNDS_PER_CYCLE == 0)
      else $error("tea_core: ROUNDS must be a multiple of ROUNDS_PER_CYCLE");
  end
endmodule
