// Self-checking testbench of dco_register: random load, hold and fail
// (clear) operations against a reference copy kept in the testbench.
module tb_dco_register;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic  clk = 1'b0, rst_n = 1'b1, fail = 1'b0, load = 1'b0;
  word_t word_d = '0, word_q, model;
  int checks = 0, failures = 0;

  dco_register dut (.clk, .rst_n, .fail, .load, .word_d, .word_q);

  always #10000 clk = ~clk;

  // reset starts with a real falling edge so asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #5000;
    checks++; if (word_q !== '0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      fail   = ($urandom_range(0, 7) == 0);
      load   = $urandom_range(0, 1) == 1;
      word_d = word_t'($urandom);
      @(posedge clk);
      if (fail) model = '0;
      else if (load) model = word_d;
      #1;
      checks++;
      if (word_q !== model) begin failures++; $display("FAIL: step %0d got %h exp %h", i, word_q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
