// Self-checking test of blowfish_f: hand-worked vectors that exercise the carry of each
// addition and the XOR, then random words against ((s0 + s1) ^ s2) + s3 computed
// step by step in 64-bit arithmetic and truncated.
module tb_blowfish_f;
  import blowfish_pkg::*;
  int checks = 0, failures = 0;
  word_t s0, s1, s2, s3, f;
  logic [63:0] t;

  blowfish_f dut (.s0_i(s0), .s1_i(s1), .s2_i(s2), .s3_i(s3), .f_o(f));

  task automatic chk(word_t exp);
    #1;
    checks++;
    if (f !== exp) begin
      failures++; $display("FAIL %h %h %h %h -> %h expected %h", s0, s1, s2, s3, f, exp);
    end
  endtask

  initial begin
    // 0xFFFFFFFF + 1 wraps to 0; 0 ^ 0x12345678; + 0x11111111 = 0x23456789
    s0 = 32'hFFFF_FFFF; s1 = 32'h1; s2 = 32'h1234_5678; s3 = 32'h1111_1111; chk(32'h2345_6789);
    // 1 + 2 = 3; 3 ^ 5 = 6; 6 + 0xFFFFFFFA = 0
    s0 = 32'h1; s1 = 32'h2; s2 = 32'h5; s3 = 32'hFFFF_FFFA; chk(32'h0);
    // only S3 nonzero
    s0 = 0; s1 = 0; s2 = 0; s3 = 32'hDEAD_BEEF; chk(32'hDEAD_BEEF);
    // 0x80000000 + 0x80000000 = 0; ^ 0xFFFFFFFF; + 1 = 0
    s0 = 32'h8000_0000; s1 = 32'h8000_0000; s2 = 32'hFFFF_FFFF; s3 = 32'h1; chk(32'h0);
    for (int i = 0; i < 500; i++) begin
      s0 = $urandom; s1 = $urandom; s2 = $urandom; s3 = $urandom;
      t = {32'h0, s0} + {32'h0, s1};
      t = {32'h0, t[31:0] ^ s2};
      t = t + {32'h0, s3};
      chk(t[31:0]);
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
