// Self-checking test of blowfish_core with random P-array and S-box contents held in
// the testbench. Each block is compared with a loop-per-round reference model of the
// Blowfish data path; decryption must return the plaintext; start-to-done latency
// must be 17 clocks (16 rounds at one per clock plus the load).
module tb_blowfish_core;
  import blowfish_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  logic   start = 0, dec = 0, busy, done;
  block_t bin = '0, bout;
  word_t  p [P_ENTRIES];
  word_t  sb [NUM_SBOX][SBOX_ENTRIES];
  s_idx_t sa [NUM_SBOX];
  word_t  sd [NUM_SBOX];

  for (genvar i = 0; i < NUM_SBOX; i++) begin : g_s
    assign sd[i] = sb[i][sa[i]];
  end

  blowfish_core dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .decrypt_i(dec),
                     .block_i(bin), .busy_o(busy), .done_o(done), .block_o(bout),
                     .p_i(p), .sbox_addr_o(sa), .sbox_data_i(sd));

  function automatic word_t ref_f(word_t x);
    return ((sb[0][x[31:24]] + sb[1][x[23:16]]) ^ sb[2][x[15:8]]) + sb[3][x[7:0]];
  endfunction

  function automatic block_t ref_bf(block_t b, bit d);
    word_t xl = b[63:32], xr = b[31:0], t;
    word_t pk [P_ENTRIES];
    for (int i = 0; i < P_ENTRIES; i++) pk[i] = d ? p[P_ENTRIES - 1 - i] : p[i];
    for (int i = 0; i < 16; i++) begin
      xl = xl ^ pk[i];
      xr = ref_f(xl) ^ xr;
      t = xl; xl = xr; xr = t;
    end
    t = xl; xl = xr; xr = t;
    xr = xr ^ pk[16];
    xl = xl ^ pk[17];
    return {xl, xr};
  endfunction

  task automatic run(block_t b, bit d, output block_t r, output int lat);
    int t0;
    @(negedge clk); start = 1; dec = d; bin = b; t0 = cycle;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    lat = cycle - t0;
    r = bout;
  endtask

  task automatic chk(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    block_t b, c, r;
    int lat;
    for (int i = 0; i < P_ENTRIES; i++) p[i] = $urandom;
    for (int s = 0; s < NUM_SBOX; s++)
      for (int i = 0; i < SBOX_ENTRIES; i++) sb[s][i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      b = {$urandom, $urandom};
      run(b, 0, c, lat);
      chk("encrypt", c, ref_bf(b, 0));
      checks++;
      if (lat != 17) begin failures++; $display("FAIL latency %0d", lat); end
      run(c, 1, r, lat);
      chk("decrypt", r, b);
      chk("decrypt ref", r, ref_bf(c, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
