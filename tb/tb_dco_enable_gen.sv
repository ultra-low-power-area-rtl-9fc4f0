// Self-checking testbench of dco_enable_gen. The testbench plays the delay
// buffer (PW = 100 ps). The system clock starts high, as div2 resets high.
// It checks that the enable stays low until the first falling system-clock
// edge, goes high there, and that at every rising system-clock edge it goes
// low for exactly PW and is high otherwise.
module tb_dco_enable_gen;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real PW = 100.0;
  logic sys_clk = 1'b1, sys_clk_dly, rst_n = 1'b1, run, dco_en;
  int checks = 0, failures = 0;

  dco_enable_gen dut (.sys_clk, .sys_clk_dly, .rst_n, .run, .dco_en);

  assign #(PW) sys_clk_dly = sys_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reset starts with a real falling edge so asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #3000;
    rst_n = 1'b1;
    #2000;
    check(dco_en == 1'b0, "disabled before first system clock");
    check(run == 1'b0, "run clear before first system clock");
    sys_clk = 1'b0;
    #1;
    check(run == 1'b1 && dco_en == 1'b1, "started by first falling edge");
    #4999;
    for (int i = 0; i < 8; i++) begin
      sys_clk = 1'b1;
      #(PW / 2.0);
      check(dco_en == 1'b0, $sformatf("edge %0d: low inside pulse", i));
      check(run == 1'b1, "run set");
      #(PW);
      check(dco_en == 1'b1, $sformatf("edge %0d: high after pulse", i));
      #(10000.0 - 1.5 * PW);
      check(dco_en == 1'b1, "high while system clock high");
      sys_clk = 1'b0;
      #5000;
      check(dco_en == 1'b1, "high while system clock low");
      #5000;
    end
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
