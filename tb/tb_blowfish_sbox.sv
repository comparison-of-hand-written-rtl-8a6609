// Self-checking test of blowfish_sbox: fills all 256 entries, reads them back through
// the asynchronous port, then does random writes and reads against a model array,
// including a read of the address being written (old data until the clock edge).
module tb_blowfish_sbox;
  import blowfish_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  s_idx_t ra, wa;
  word_t  rd, wd;
  logic   we = 0;
  word_t  model [256];

  blowfish_sbox dut (.clk_i(clk), .raddr_i(ra), .rdata_o(rd), .we_i(we), .waddr_i(wa), .wdata_i(wd));

  task automatic chk_read(s_idx_t a);
    ra = a; #1;
    checks++;
    if (rd !== model[a]) begin
      failures++; $display("FAIL read %0d: %h expected %h", a, rd, model[a]);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; wa = s_idx_t'(i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) chk_read(s_idx_t'(i));
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = s_idx_t'($urandom); wd = $urandom;
      chk_read(wa);             // before the edge: old contents
      @(posedge clk); #1;
      if (we) model[wa] = wd;
      chk_read(s_idx_t'($urandom));
      chk_read(wa);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
