// Self-checking test of the complete Blowfish cipher with published test vectors
// (8-byte keys of all zeros and all ones, key 0x3000000000000000) and vectors for a
// 16-byte and a 56-byte key from an independent software model. Each ciphertext is
// decrypted back. Also checked: the key schedule takes 11463 clocks, a block takes
// 17 clocks, in_ready stays low while a block is in flight (a held request), and a
// new key replaces the old one.
module tb_blowfish;
  import blowfish_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  logic         key_load = 0;
  logic [447:0] key = '0;
  logic [5:0]   key_len = 6'd8;
  logic         key_load_ready, key_ready;
  logic         in_valid = 0, in_ready, in_dec = 0, out_valid;
  block_t       in_block = '0, out_block;

  blowfish dut (.clk_i(clk), .rst_ni(rst_n), .key_load_i(key_load), .key_i(key),
    .key_len_i(key_len), .key_load_ready_o(key_load_ready), .key_ready_o(key_ready),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_decrypt_i(in_dec),
    .in_block_i(in_block), .out_valid_o(out_valid), .out_block_o(out_block));

  int held;  // cycles a valid request waited on in_ready
  always @(posedge clk) if (in_valid && !in_ready) held++;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_key(logic [447:0] k, int len);
    int t0;
    while (!key_load_ready) @(negedge clk);
    @(negedge clk); key_load = 1; key = k; key_len = 6'(len); t0 = cycle;
    @(negedge clk); key_load = 0;
    while (!key_ready) @(negedge clk);
    checks++;
    if (cycle - t0 != 11463) begin
      failures++; $display("FAIL key schedule took %0d clocks", cycle - t0);
    end
  endtask

  task automatic crypt(block_t b, bit d, output block_t r, output int lat);
    int t0;
    @(negedge clk); in_valid = 1; in_dec = d; in_block = b;
    while (!in_ready) @(negedge clk);
    t0 = cycle;
    @(negedge clk); in_valid = 0;
    while (!out_valid) @(negedge clk);
    lat = cycle - t0;
    r = out_block;
  endtask

  task automatic vec(logic [447:0] k, int len, block_t pt, block_t ct);
    block_t r;
    int lat;
    load_key(k, len);
    crypt(pt, 0, r, lat);
    chk("encrypt", r, ct);
    checks++;
    if (lat != 17) begin failures++; $display("FAIL block latency %0d", lat); end
    crypt(ct, 1, r, lat);
    chk("decrypt", r, pt);
  endtask

  initial begin
    logic [447:0] k56;
    block_t r1, r2;
    int lat;
    held = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (in_ready || key_ready) begin failures++; $display("FAIL ready before any key"); end
    vec({64'h0, 384'h0}, 8, 64'h0, 64'h4EF997456198DD78);
    vec({64'hFFFF_FFFF_FFFF_FFFF, 384'h0}, 8, 64'hFFFF_FFFF_FFFF_FFFF, 64'h51866FD5B85ECB8A);
    vec({64'h3000_0000_0000_0000, 384'h0}, 8, 64'h1000_0000_0000_0001, 64'h7D856F9A613063F2);
    vec({128'h0123456789ABCDEFF0E1D2C3B4A59687, 320'h0}, 16, 64'hFEDCBA9876543210, 64'hd0042196b11308ea);
    for (int i = 0; i < 56; i++) k56[447 - 8 * i -: 8] = 8'(i + 1);
    vec(k56, 56, 64'h0011223344556677, 64'h38d9322179246a37);
    // back-to-back blocks: the second request waits while the first is in flight
    held = 0;
    fork
      crypt(64'h0011223344556677, 0, r1, lat);
      begin
        @(negedge clk); @(negedge clk);
        checks++;
        if (in_ready) begin failures++; $display("FAIL in_ready while busy"); end
      end
    join
    chk("repeat encrypt", r1, 64'h38d9322179246a37);
    crypt(r1, 1, r2, lat);
    chk("repeat decrypt", r2, 64'h0011223344556677);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
