// Self-checking test of tea_core at 16 rounds, 2 rounds per clock (the defaults) and
// at 32 rounds, 4 per clock. Results are compared with a loop-per-round reference
// model of TEA, with published-style fixed vectors, and decryption must return the
// plaintext. The latency (start to done) is checked: 1 + ROUNDS/ROUNDS_PER_CYCLE, and
// blocks offered back to back must complete one every 9 clocks.
module tb_tea_core;
  import tea_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  logic   start16 = 0, dec16 = 0, start32 = 0, dec32 = 0;
  key_t   key16, key32;
  block_t in16, in32, out16, out32;
  logic   busy16, done16, busy32, done32;

  tea_core dut16 (.clk_i(clk), .rst_ni(rst_n), .start_i(start16), .decrypt_i(dec16),
                  .key_i(key16), .block_i(in16), .busy_o(busy16), .done_o(done16), .block_o(out16));
  tea_core #(.ROUNDS(32), .ROUNDS_PER_CYCLE(4)) dut32 (
                  .clk_i(clk), .rst_ni(rst_n), .start_i(start32), .decrypt_i(dec32),
                  .key_i(key32), .block_i(in32), .busy_o(busy32), .done_o(done32), .block_o(out32));

  function automatic block_t ref_tea(block_t b, key_t k, int rounds, bit d);
    word_t y = b[63:32], z = b[31:0], s;
    word_t k0 = k[127:96], k1 = k[95:64], k2 = k[63:32], k3 = k[31:0];
    if (!d) begin
      s = 0;
      for (int i = 0; i < rounds; i++) begin
        s += 32'h9E3779B9;
        y += ((z << 4) + k0) ^ (z + s) ^ ((z >> 5) + k1);
        z += ((y << 4) + k2) ^ (y + s) ^ ((y >> 5) + k3);
      end
    end else begin
      s = 32'h9E3779B9 * rounds;
      for (int i = 0; i < rounds; i++) begin
        z -= ((y << 4) + k2) ^ (y + s) ^ ((y >> 5) + k3);
        y -= ((z << 4) + k0) ^ (z + s) ^ ((z >> 5) + k1);
        s -= 32'h9E3779B9;
      end
    end
    return {y, z};
  endfunction

  task automatic run16(block_t b, key_t k, bit d, output block_t r, output int lat);
    int t0;
    @(negedge clk); start16 = 1; dec16 = d; key16 = k; in16 = b;
    t0 = cycle;
    @(negedge clk); start16 = 0;
    while (!done16) @(negedge clk);
    lat = cycle - t0;
    r = out16;
  endtask

  task automatic run32(block_t b, key_t k, bit d, output block_t r, output int lat);
    int t0;
    @(negedge clk); start32 = 1; dec32 = d; key32 = k; in32 = b;
    t0 = cycle;
    @(negedge clk); start32 = 0;
    while (!done32) @(negedge clk);
    lat = cycle - t0;
    r = out32;
  endtask

  task automatic chk(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic chk_lat(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s latency: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    block_t r, c, b;
    key_t k;
    int lat;
    key16 = '0; key32 = '0; in16 = '0; in32 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fixed vectors
    run16(64'h01234567_89abcdef, 128'h00112233_44556677_8899aabb_ccddeeff, 0, r, lat);
    chk("tea16 fixed", r, 64'h7cf6c003_2c4af316);
    chk_lat("tea16 (published 9)", lat, 9);
    run16(r, 128'h00112233_44556677_8899aabb_ccddeeff, 1, r, lat);
    chk("tea16 fixed decrypt", r, 64'h01234567_89abcdef);
    chk_lat("tea16 decrypt", lat, 9);
    run32(64'h0, 128'h0, 0, r, lat);
    chk("tea32 zero", r, 64'h41ea3a0a_94baa940);
    chk_lat("tea32/4", lat, 9);
    // random vectors
    for (int i = 0; i < 40; i++) begin
      b = {$urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      run16(b, k, 0, c, lat);
      chk("tea16 enc", c, ref_tea(b, k, 16, 0));
      run16(c, k, 1, r, lat);
      chk("tea16 dec", r, b);
      chk("tea16 dec ref", r, ref_tea(c, k, 16, 1));
      run32(b, k, 0, c, lat);
      chk("tea32 enc", c, ref_tea(b, k, 32, 0));
      run32(c, k, 1, r, lat);
      chk("tea32 dec", r, b);
    end
    // back to back: a new block is offered whenever busy is low, so one block
    // completes every 9 clocks
    begin
      block_t bs [8];
      int t_last, n_done;
      k = {$urandom, $urandom, $urandom, $urandom};
      foreach (bs[i]) bs[i] = {$urandom, $urandom};
      n_done = 0; t_last = 0;
      fork
        foreach (bs[i]) begin
          @(negedge clk);
          while (busy16) @(negedge clk);
          start16 = 1; dec16 = 0; key16 = k; in16 = bs[i];
          @(negedge clk); start16 = 0;
        end
        while (n_done < 8) begin
          @(negedge clk);
          if (done16) begin
            chk("tea16 stream", out16, ref_tea(bs[n_done], k, 16, 0));
            if (n_done > 0) chk_lat("tea16 stream interval", cycle - t_last, 9);
            t_last = cycle; n_done++;
          end
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
