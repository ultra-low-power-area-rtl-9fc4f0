// Self-checking testbench of div2: the output must toggle on every rising
// input edge, start high after reset, and so have twice the input period.
module tb_div2;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk_in = 1'b0, rst_n = 1'b1, clk_out;
  int checks = 0, failures = 0;
  logic expect_q;

  div2 dut (.clk_in, .rst_n, .clk_out);

  always #5000 clk_in = ~clk_in;

  // reset starts with a real falling edge so asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #1000;
    checks++; if (clk_out !== 1'b1) begin failures++; $display("FAIL: reset value"); end
    rst_n = 1'b1;
    expect_q = 1'b1;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk_in);
      #1;
      expect_q = ~expect_q;
      checks++;
      if (clk_out !== expect_q) begin failures++; $display("FAIL: edge %0d out=%b", i, clk_out); end
    end
    // asynchronous reset
    #100 rst_n = 1'b0;
    #1;
    checks++; if (clk_out !== 1'b1) begin failures++; $display("FAIL: async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
