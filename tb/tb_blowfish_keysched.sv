// Self-checking test of blowfish_keysched. The round engine is replaced by a stand-in
// in the testbench that answers each start after a random delay with an easily
// predicted function of its input block, and the pi ROM by a table of random words.
// The testbench keeps its own copy of the 1042-word table, computed from the key
// schedule's definition, and checks every write: the INIT pass (P words XORed with the
// cyclically repeated key bytes, S words copied), and the EXPAND pass (results written
// in pairs, each result fed back as the next input). Two key lengths are used, 5 and
// 56 bytes, and the number of encryptions (521) is checked.
module tb_blowfish_keysched;
  import blowfish_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         key_load = 0;
  logic [447:0] key = '0;
  logic [5:0]   key_len = 6'd8;
  logic         busy, ready;
  table_addr_t  rom_addr;
  word_t        rom_data;
  logic         we;
  table_addr_t  wa;
  word_t        wd;
  logic         cstart;
  block_t       cblock;
  logic         cdone = 0;
  block_t       cres = '0;

  word_t rom [TABLE_WORDS];
  assign rom_data = rom[rom_addr];

  blowfish_keysched dut (.clk_i(clk), .rst_ni(rst_n), .key_load_i(key_load), .key_i(key),
    .key_len_i(key_len), .busy_o(busy), .key_ready_o(ready), .rom_addr_o(rom_addr),
    .rom_data_i(rom_data), .tbl_we_o(we), .tbl_waddr_o(wa), .tbl_wdata_o(wd),
    .core_start_o(cstart), .core_block_o(cblock), .core_done_i(cdone), .core_result_i(cres));

  // stand-in round engine
  function automatic block_t fake_enc(block_t b);
    return {b[31:0] + 32'h1234_5678, b[63:32] ^ 32'hA5A5_0F0F};
  endfunction
  int encs;
  initial begin
    forever begin
      @(posedge clk);
      if (cstart) begin
        block_t b;
        int d;
        b = cblock; encs++;
        d = 1 + ($urandom % 20);
        repeat (d) @(posedge clk);
        #1 cdone = 1; cres = fake_enc(b);
        @(posedge clk); #1 cdone = 0;
      end
    end
  end

  // expected write sequence
  word_t exp_data [2 * TABLE_WORDS];
  int    exp_addr [2 * TABLE_WORDS];
  int    nw;
  always @(posedge clk) if (rst_n && we) begin
    checks++;
    if (nw >= 2 * TABLE_WORDS || int'(wa) != exp_addr[nw] || wd !== exp_data[nw]) begin
      failures++;
      if (failures < 10) $display("FAIL write %0d: addr %0d data %h", nw, wa, wd);
    end
    nw++;
  end

  task automatic schedule(int len);
    block_t b;
    int j;
    word_t w;
    key = '0;
    for (int i = 0; i < len; i++) key[447 - 8 * i -: 8] = 8'($urandom);
    for (int i = 0; i < TABLE_WORDS; i++) rom[i] = $urandom;
    j = 0;
    for (int i = 0; i < TABLE_WORDS; i++) begin
      w = rom[i];
      if (i < 18) begin
        for (int n = 0; n < 4; n++) begin
          w ^= word_t'(key[447 - 8 * j -: 8]) << (24 - 8 * n);
          j = (j + 1) % len;
        end
      end
      exp_addr[i] = i; exp_data[i] = w;
    end
    b = '0;
    for (int i = 0; i < TABLE_WORDS; i += 2) begin
      b = fake_enc(b);
      exp_addr[TABLE_WORDS + i] = i;     exp_data[TABLE_WORDS + i] = b[63:32];
      exp_addr[TABLE_WORDS + i + 1] = i + 1; exp_data[TABLE_WORDS + i + 1] = b[31:0];
    end
    nw = 0; encs = 0;
    @(negedge clk); key_load = 1; key_len = 6'(len);
    @(negedge clk); key_load = 0;
    checks++;
    if (!busy || ready) begin failures++; $display("FAIL busy/ready after load"); end
    while (!ready) @(negedge clk);
    checks++;
    if (busy || nw != 2 * TABLE_WORDS || encs != TABLE_WORDS / 2) begin
      failures++; $display("FAIL writes %0d encryptions %0d", nw, encs);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    schedule(5);
    schedule(56);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
