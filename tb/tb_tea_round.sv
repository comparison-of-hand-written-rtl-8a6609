// Self-checking test of tea_round: random rounds in both directions against a
// reference written from the TEA definition, plus the inverse property
// (a decryption round with the same sum undoes an encryption round).
module tb_tea_round;
  import tea_pkg::*;
  int checks = 0, failures = 0;
  word_t y, z, s, ye, ze, yd, zd;
  key_t  k;
  logic  dec;
  word_t yo, zo;

  tea_round dut (.y_i(y), .z_i(z), .key_i(k), .sum_i(s), .decrypt_i(dec), .y_o(yo), .z_o(zo));

  function automatic word_t m(word_t v, word_t a, word_t b, word_t su);
    word_t t1, t2, t3;
    t1 = (v * 32'd16) + a;       // v << 4
    t2 = v + su;
    t3 = (v / 32'd32) + b;       // v >> 5
    return t1 ^ t2 ^ t3;
  endfunction

  initial begin
    for (int i = 0; i < 200; i++) begin
      y = $urandom; z = $urandom; s = $urandom;
      k = {$urandom, $urandom, $urandom, $urandom};
      ye = y + m(z, k[127:96], k[95:64], s);
      ze = z + m(ye, k[63:32], k[31:0], s);
      dec = 1'b0; #1;
      checks++;
      if (yo !== ye || zo !== ze) begin
        failures++; $display("enc mismatch %h %h vs %h %h", yo, zo, ye, ze);
      end
      // decrypt the encrypted pair: must give back y, z
      y = ye; z = ze; dec = 1'b1; #1;
      zd = ze - m(ye, k[63:32], k[31:0], s);
      yd = ye - m(zd, k[127:96], k[95:64], s);
      checks++;
      if (yo !== yd || zo !== zd) begin
        failures++; $display("dec mismatch %h %h vs %h %h", yo, zo, yd, zd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
