// Self-checking test of blowfish_pi_rom: checks the words at the boundaries of the
// P-array and the four S-boxes against the published Blowfish initial values, and an
// XOR and a sum over all 1042 words against values computed from pi independently.
module tb_blowfish_pi_rom;
  import blowfish_pkg::*;
  int checks = 0, failures = 0;
  table_addr_t a;
  word_t d, x, s;

  blowfish_pi_rom dut (.addr_i(a), .data_o(d));

  task automatic chk(int addr, word_t exp);
    a = table_addr_t'(addr); #1;
    checks++;
    if (d !== exp) begin
      failures++; $display("FAIL rom[%0d] = %h expected %h", addr, d, exp);
    end
  endtask

  initial begin
    chk(0, 32'h243F6A88);      // P1
    chk(1, 32'h85A308D3);      // P2
    chk(17, 32'h8979FB1B);     // P18
    chk(18, 32'hD1310BA6);     // S-box 1, entry 0
    chk(273, 32'h6E85076A);    // S-box 1, entry 255
    chk(1041, 32'h3AC372E6);   // S-box 4, entry 255
    chk(1042, 32'h0);          // beyond the table
    x = 0; s = 0;
    for (int i = 0; i < TABLE_WORDS; i++) begin
      a = table_addr_t'(i); #1;
      x ^= d; s += d;
    end
    checks++;
    if (x !== 32'h6ffa520a || s !== 32'h6bbf03ac) begin
      failures++; $display("FAIL xor %h sum %h", x, s);
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
