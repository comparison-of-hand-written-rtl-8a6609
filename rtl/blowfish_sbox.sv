// blowfish_sbox: one Blowfish S-box, a 256 x 32-bit memory.
//
// Asynchronous read (the round engine looks up a byte and uses the word in the same
// clock) and one synchronous write port used only by the key schedule, which first
// loads the pi digits and then overwrites every entry with cipher output.
// Interface: raddr_i -> rdata_o combinationally; we_i/waddr_i/wdata_i written on
// the rising clock edge. Contents are not reset: the key schedule fills every entry
// before the cipher may use it.
// Size (256 words of 32 bits) is Blowfish's; asynchronous read and a single write port
// are this design's choices.
module blowfish_sbox
  import blowfish_pkg::*;
(
  input  logic   clk_i,
  input  s_idx_t raddr_i,
  output word_t  rdata_o,
  input  logic   we_i,
  input  s_idx_t waddr_i,
  input  word_t  wdata_i
);
  word_t mem [SBOX_ENTRIES];

  always_ff @(posedge clk_i) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  assign rdata_o = mem[raddr_i];
endmodule
