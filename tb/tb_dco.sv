// Self-checking testbench of the DCO model: for random words (fine and coarse
// bits) and the test cell it measures the period against
// 952.381 ps + 2 ps x word (+ 4 ps with the test cell), checks that the output
// is low while disabled, that the first rising edge comes 20 ps after enable,
// and that a short disable pulse restarts the phase.
module tb_dco;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic  en = 1'b0, test = 1'b0, clk_out;
  word_t word = '0;
  int checks = 0, failures = 0;

  dco dut (.en, .word, .test, .clk_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real t0, t1, t2, exp_p;
    #1000;
    check(clk_out == 1'b0, "low while disabled");
    for (int i = 0; i < 40; i++) begin
      word  = (i == 0) ? '0 : (i == 1) ? '1 : word_t'($urandom);
      test  = (i % 3 == 2);
      exp_p = 952.381 + 2.0 * real'(word) + (test ? 4.0 : 0.0);
      en = 1'b1;
      t0 = $realtime;
      @(posedge clk_out) t1 = $realtime;
      check(t1 - t0 > 19.99 && t1 - t0 < 20.01, $sformatf("start delay %f", t1 - t0));
      @(posedge clk_out) t2 = $realtime;
      check(t2 - t1 > exp_p - 0.01 && t2 - t1 < exp_p + 0.01,
            $sformatf("word %0d test %0b period %f expected %f", word, test, t2 - t1, exp_p));
      // short disable pulse in the middle of a high phase restarts the ring
      #(exp_p / 4.0);
      en = 1'b0;
      #1;
      check(clk_out == 1'b0, "forced low by disable");
      #50;
      en = 1'b1;
      t0 = $realtime;
      @(posedge clk_out) t1 = $realtime;
      check(t1 - t0 > 19.99 && t1 - t0 < 20.01, "restart aligned to enable");
      en = 1'b0;
      #3000;
      check(clk_out == 1'b0, "stays low while disabled");
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
