// End-to-end test of tea_blowfish_top at its default sizes (16 rounds each): a
// Blowfish key schedule with a 16-byte key, then a stream of blocks offered on every
// clock so that the valid/ready handshake has to hold requests back, encryption and
// decryption, a second key schedule (rekey) and more blocks; all the while TEA
// encrypts and decrypts blocks on its own ports. Every result is compared with a
// reference: published or software-model Blowfish vectors and a loop-per-round TEA
// model. Each mechanism is counted and a mechanism that never happened is a failure.
module tb_tea_blowfish_top;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         bf_key_load = 0;
  logic [447:0] bf_key = '0;
  logic [5:0]   bf_key_len = 6'd16;
  logic         bf_klr, bf_kr, bf_in_valid = 0, bf_in_ready, bf_in_dec = 0, bf_out_valid;
  logic [63:0]  bf_in_block = '0, bf_out_block;
  logic         tea_start = 0, tea_dec = 0, tea_busy, tea_done;
  logic [127:0] tea_key = '0;
  logic [63:0]  tea_in = '0, tea_out;

  tea_blowfish_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .bf_key_load_i(bf_key_load), .bf_key_i(bf_key), .bf_key_len_i(bf_key_len),
    .bf_key_load_ready_o(bf_klr), .bf_key_ready_o(bf_kr),
    .bf_in_valid_i(bf_in_valid), .bf_in_ready_o(bf_in_ready), .bf_in_decrypt_i(bf_in_dec),
    .bf_in_block_i(bf_in_block), .bf_out_valid_o(bf_out_valid), .bf_out_block_o(bf_out_block),
    .tea_start_i(tea_start), .tea_decrypt_i(tea_dec), .tea_key_i(tea_key),
    .tea_block_i(tea_in), .tea_busy_o(tea_busy), .tea_done_o(tea_done), .tea_block_o(tea_out));

  // mechanism counters
  int n_keysched = 0, n_bf_enc = 0, n_bf_dec = 0, n_bf_held = 0, n_tea_enc = 0, n_tea_dec = 0;
  always @(posedge clk) if (bf_in_valid && !bf_in_ready && bf_kr) n_bf_held++;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- Blowfish ----------------
  task automatic bf_load(logic [447:0] k, int len);
    while (!bf_klr) @(negedge clk);
    bf_key_load = 1; bf_key = k; bf_key_len = 6'(len);
    @(negedge clk); bf_key_load = 0;
    while (!bf_kr) @(negedge clk);
    n_keysched++;
  endtask

  // Offers blocks back to back and collects the results in order. Requests are driven
  // and in_ready is sampled at the falling edge, so a request seen ready there is taken
  // at the next rising edge. Consecutive results must come out 17 clocks apart.
  int cycle = 0;
  always @(posedge clk) cycle++;
  int n_bf_rate = 0;
  task automatic bf_stream(logic [63:0] blocks [], bit dec, logic [63:0] exp []);
    int got_n = 0, last = 0;
    fork
      begin
        foreach (blocks[i]) begin
          @(negedge clk);
          bf_in_valid = 1; bf_in_dec = dec; bf_in_block = blocks[i];
          while (!bf_in_ready) @(negedge clk);
          if (dec) n_bf_dec++; else n_bf_enc++;
        end
        @(negedge clk);
        bf_in_valid = 0;
      end
      begin
        while (got_n < blocks.size()) begin
          @(negedge clk);
          if (bf_out_valid) begin
            chk(dec ? "bf decrypt" : "bf encrypt", bf_out_block, exp[got_n]);
            if (got_n > 0) begin
              checks++;
              if (cycle - last != 17) begin
                failures++; $display("FAIL Blowfish block interval %0d clocks", cycle - last);
              end
              n_bf_rate++;
            end
            last = cycle;
            got_n++;
          end
        end
      end
    join
  endtask

  // ---------------- TEA ----------------
  function automatic logic [63:0] ref_tea(logic [63:0] b, logic [127:0] k, bit d);
    logic [31:0] y = b[63:32], z = b[31:0], s;
    logic [31:0] k0 = k[127:96], k1 = k[95:64], k2 = k[63:32], k3 = k[31:0];
    s = d ? 32'h9E3779B9 * 16 : 0;
    for (int i = 0; i < 16; i++) begin
      if (!d) begin
        s += 32'h9E3779B9;
        y += ((z << 4) + k0) ^ (z + s) ^ ((z >> 5) + k1);
        z += ((y << 4) + k2) ^ (y + s) ^ ((y >> 5) + k3);
      end else begin
        z -= ((y << 4) + k2) ^ (y + s) ^ ((y >> 5) + k3);
        y -= ((z << 4) + k0) ^ (z + s) ^ ((z >> 5) + k1);
        s -= 32'h9E3779B9;
      end
    end
    return {y, z};
  endfunction

  bit bf_finished = 0;
  initial begin : tea_thread
    logic [63:0] b, c;
    logic [127:0] k;
    @(posedge rst_n);
    while (!bf_finished || n_tea_enc < 20) begin
      b = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); tea_start = 1; tea_dec = 0; tea_key = k; tea_in = b;
      @(negedge clk); tea_start = 0;
      while (!tea_done) @(negedge clk);
      c = tea_out; n_tea_enc++;
      chk("tea encrypt", c, ref_tea(b, k, 0));
      @(negedge clk); tea_start = 1; tea_dec = 1; tea_in = c;
      @(negedge clk); tea_start = 0;
      while (!tea_done) @(negedge clk);
      n_tea_dec++;
      chk("tea decrypt", tea_out, b);
    end
  end

  initial begin
    logic [447:0] k56;
    static logic [63:0] pt [] = '{64'hFEDCBA9876543210, 64'h0123456789ABCDEF, 64'hDEADBEEFCAFEF00D};
    static logic [63:0] ct [] = '{64'hd0042196b11308ea, 64'hc704ca5eeaace933, 64'h0a8fd6f8be5bbcf3};
    static logic [63:0] pt2 [] = '{64'h0011223344556677, 64'hFFFFFFFF00000000};
    static logic [63:0] ct2 [] = '{64'h38d9322179246a37, 64'h12f58d6ebdffb185};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    bf_load({128'h0123456789ABCDEFF0E1D2C3B4A59687, 320'h0}, 16);
    bf_stream(pt, 0, ct);
    bf_stream(ct, 1, pt);
    // rekey with a 56-byte key
    for (int i = 0; i < 56; i++) k56[447 - 8 * i -: 8] = 8'(i + 1);
    @(negedge clk);
    bf_load(k56, 56);
    bf_stream(pt2, 0, ct2);
    bf_stream(ct2, 1, pt2);
    bf_finished = 1;
    wait (n_tea_enc >= 20);
    @(negedge clk);
    $display("mechanisms: keyschedules=%0d bf_enc=%0d bf_dec=%0d bf_held_cycles=%0d bf_back_to_back=%0d tea_enc=%0d tea_dec=%0d",
             n_keysched, n_bf_enc, n_bf_dec, n_bf_held, n_bf_rate, n_tea_enc, n_tea_dec);
    checks++; if (n_bf_rate == 0) begin failures++; $display("FAIL no back-to-back blocks"); end
    checks++; if (n_keysched < 2) begin failures++; $display("FAIL no rekey"); end
    checks++; if (n_bf_enc == 0) begin failures++; $display("FAIL no Blowfish encryption"); end
    checks++; if (n_bf_dec == 0) begin failures++; $display("FAIL no Blowfish decryption"); end
    checks++; if (n_bf_held == 0) begin failures++; $display("FAIL no held request"); end
    checks++; if (n_tea_enc == 0) begin failures++; $display("FAIL no TEA encryption"); end
    checks++; if (n_tea_dec == 0) begin failures++; $display("FAIL no TEA decryption"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
