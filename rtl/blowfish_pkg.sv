// Blowfish shared constants and types.
//
// Blowfish keeps 18 round subkeys (the P-array) and four 256-entry S-boxes of 32-bit
// words. Together they form one 1042-word table whose initial contents are the
// fractional hexadecimal digits of pi, P first and then S-box 0..3. The key schedule
// addresses that table linearly (table_addr_t) and blowfish_pkg::tbl_map() splits a
// linear address into a P index or an S-box number and entry.
package blowfish_pkg;
  localparam int unsigned ROUNDS       = 16;    // Feistel rounds
  localparam int unsigned P_ENTRIES    = 18;    // P-array words
  localparam int unsigned SBOX_ENTRIES = 256;   // words per S-box
  localparam int unsigned NUM_SBOX     = 4;
  localparam int unsigned TABLE_WORDS  = P_ENTRIES + NUM_SBOX * SBOX_ENTRIES;  // 1042
  localparam int unsigned MAX_KEY_BYTES = 56;   // 448-bit key
  localparam int unsigned MIN_KEY_BYTES = 4;    // 32-bit key

  typedef logic [31:0] word_t;
  typedef logic [63:0] block_t;
  typedef logic [10:0] table_addr_t;            // 0 .. TABLE_WORDS-1
  typedef logic [4:0]  p_idx_t;                 // 0 .. 17
  typedef logic [7:0]  s_idx_t;                 // 0 .. 255
  typedef logic [1:0]  s_sel_t;                 // S-box number

  // Target of a linear table write.
  typedef struct packed {
    logic   is_p;
    p_idx_t p_idx;
    s_sel_t s_sel;
    s_idx_t s_idx;
  } tbl_target_t;

  function automatic tbl_target_t tbl_map(table_addr_t a);
    tbl_target_t t;
    logic [9:0]  s_off;   // offset into the S-boxes, valid when a >= 18
    s_off   = 10'(a - table_addr_t'(P_ENTRIES));
    t.is_p  = (a < table_addr_t'(P_ENTRIES));
    t.p_idx = a[4:0];
    t.s_sel = s_off[9:8];
    t.s_idx = s_off[7:0];
    return t;
  endfunction
endpackage
