// blowfish_keysched: Blowfish key schedule controller.
//
// The P-array and the four S-boxes form one 1042-word table (P0..P17, then S-box 0..3),
// written through a single linear write port. After key_load_i the controller
//  1. INIT: copies the pi digits from the ROM into the table, one word per clock
//     (1042 clocks); each of the 18 P words is XORed with the next four key bytes,
//     the key being reused cyclically when it is shorter than 72 bytes;
//  2. EXPAND: starting from an all-zero block, encrypts the block with the current
//     table (through the shared round engine), writes the two result halves into the
//     next two table words (left half first) and feeds the result back as the next
//     block, until all 1042 words have been replaced (521 encryptions).
// key_ready_o then rises and stays high until the next key_load_i.
//
// Interface: key_i holds up to 56 key bytes, byte 0 in bits 447:440; key_len_i is the
// key length in bytes (4..56, clamped into that range). key_load_i is accepted when
// busy_o is low. rom_addr_o/rom_data_i read the pi ROM combinationally. tbl_we_o,
// tbl_waddr_o, tbl_wdata_o write the table. core_* drive a blowfish_core (always
// encryption) while busy_o is high.
// Timing: 1042 + 521 * 20 = 11462 clocks from key_load_i to key_ready_o; per encryption
// one start clock, 16 round clocks, one done clock and two write clocks.
// The sequence of steps is the cipher's own; the one-word-per-clock table port and
// the timing are this design's choices.
module blowfish_keysched
  import blowfish_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               key_load_i,
  input  logic [447:0]       key_i,
  input  logic [5:0]         key_len_i,
  output logic               busy_o,
  output logic               key_ready_o,
  // pi ROM
  output table_addr_t        rom_addr_o,
  input  word_t              rom_data_i,
  // table write port
  output logic               tbl_we_o,
  output table_addr_t        tbl_waddr_o,
  output word_t              tbl_wdata_o,
  // round engine
  output logic               core_start_o,
  output block_t             core_block_o,
  input  logic               core_done_i,
  input  block_t             core_result_i
);
  typedef enum logic [2:0] {S_IDLE, S_INIT, S_ENC_START, S_ENC_WAIT, S_WR_HI, S_WR_LO} state_e;

  state_e       state_q;
  logic [447:0] key_q;
  logic [5:0]   len_q;
  logic [5:0]   ptr_q;      // next key byte
  table_addr_t  addr_q;     // INIT: word being copied; EXPAND: first word of the pair
  block_t       blk_q;

  // key byte i (0 = first byte)
  function automatic logic [7:0] key_byte(logic [447:0] k, logic [5:0] i);
    return k[447 - 8 * int'(i) -: 8];
  endfunction

  // index ptr+n, wrapped into 0..len-1 (ptr < len and n < 4 <= len, so one wrap at most)
  function automatic logic [5:0] wrap_add(logic [5:0] ptr, logic [5:0] n, logic [5:0] len);
    logic [6:0] s;
    s = {1'b0, ptr} + {1'b0, n};
    return (s >= {1'b0, len}) ? 6'(s - {1'b0, len}) : s[5:0];
  endfunction

  word_t key_word;
  always_comb begin
    key_word = {key_byte(key_q, ptr_q),
                key_byte(key_q, wrap_add(ptr_q, 6'd1, len_q)),
                key_byte(key_q, wrap_add(ptr_q, 6'd2, len_q)),
                key_byte(key_q, wrap_add(ptr_q, 6'd3, len_q))};
  end

  logic [5:0] len_in;
  always_comb begin
    if (key_len_i < 6'(MIN_KEY_BYTES))      len_in = 6'(MIN_KEY_BYTES);
    else if (key_len_i > 6'(MAX_KEY_BYTES)) len_in = 6'(MAX_KEY_BYTES);
    else                                    len_in = key_len_i;
  end

  assign busy_o       = (state_q != S_IDLE);
  assign rom_addr_o   = addr_q;
  assign core_start_o = (state_q == S_ENC_START);
  assign core_block_o = blk_q;

  always_comb begin
    tbl_we_o    = 1'b0;
    tbl_waddr_o = addr_q;
    tbl_wdata_o = rom_data_i;
    unique case (state_q)
      S_INIT: begin
        tbl_we_o    = 1'b1;
        tbl_wdata_o = (addr_q < table_addr_t'(P_ENTRIES)) ? rom_data_i ^ key_word : rom_data_i;
      end
      S_WR_HI: begin
        tbl_we_o    = 1'b1;
        tbl_wdata_o = blk_q[63:32];
      end
      S_WR_LO: begin
        tbl_we_o    = 1'b1;
        tbl_waddr_o = addr_q + 1'b1;
        tbl_wdata_o = blk_q[31:0];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      key_q       <= '0;
      len_q       <= 6'(MIN_KEY_BYTES);
      ptr_q       <= '0;
      addr_q      <= '0;
      blk_q       <= '0;
      key_ready_o <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (key_load_i) begin
            key_q       <= key_i;
            len_q       <= len_in;
            ptr_q       <= '0;
            addr_q      <= '0;
            key_ready_o <= 1'b0;
            state_q     <= S_INIT;
          end
        end
        S_INIT: begin
          if (addr_q < table_addr_t'(P_ENTRIES)) ptr_q <= wrap_add(ptr_q, 6'd4, len_q);
          if (addr_q == table_addr_t'(TABLE_WORDS - 1)) begin
            addr_q  <= '0;
            blk_q   <= '0;
            state_q <= S_ENC_START;
          end else begin
            addr_q <= addr_q + 1'b1;
          end
        end
        S_ENC_START: state_q <= S_ENC_WAIT;
        S_ENC_WAIT: begin
          if (core_done_i) begin
            blk_q   <= core_result_i;
            state_q <= S_WR_HI;
          end
        end
        S_WR_HI: state_q <= S_WR_LO;
        S_WR_LO: begin
          if (addr_q == table_addr_t'(TABLE_WORDS - 2)) begin
            key_ready_o <= 1'b1;
            state_q     <= S_IDLE;
          end else begin
            addr_q  <= addr_q + table_addr_t'(2);
            state_q <= S_ENC_START;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
