// Self-checking test of blowfish_parray: all words are zero after reset, each write
// lands in exactly one word, writes to indices 18..31 are ignored.
module tb_blowfish_parray;
  import blowfish_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic   we = 0;
  p_idx_t wa = '0;
  word_t  wd = '0;
  word_t  p [P_ENTRIES];
  word_t  model [P_ENTRIES];

  blowfish_parray dut (.clk_i(clk), .rst_ni(rst_n), .we_i(we), .waddr_i(wa), .wdata_i(wd), .p_o(p));

  task automatic chk_all();
    for (int i = 0; i < P_ENTRIES; i++) begin
      checks++;
      if (p[i] !== model[i]) begin
        failures++; $display("FAIL P[%0d] = %h expected %h", i, p[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < P_ENTRIES; i++) model[i] = '0;
    #3; chk_all();
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = p_idx_t'($urandom); wd = $urandom;
      @(posedge clk); #1;
      if (we && wa < 18) model[wa] = wd;
      chk_all();
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
