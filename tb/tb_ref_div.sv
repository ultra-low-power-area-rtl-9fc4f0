// Self-checking testbench of ref_div: for N = 1..9 it measures the period of
// the divided clock between rising edges (N input periods, or the input
// itself for N = 0 and 1) and the number of input edges the output stays
// high (floor(N/2)).
module tb_ref_div;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TIN = 1000.0;
  logic       clk_in = 1'b0, rst_n = 1'b1, clk_out;
  logic [7:0] div_n = 8'd1;
  int checks = 0, failures = 0;

  ref_div #(.N_W(8)) dut (.clk_in, .rst_n, .div_n, .clk_out);

  always #(TIN / 2.0) clk_in = ~clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reset starts with a real falling edge so asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    real t1, t2, th;
    for (int n = 0; n <= 9; n++) begin
      rst_n = 1'b0;
      div_n = 8'(n);
      #(3 * TIN);
      rst_n = 1'b1;
      repeat (3) @(posedge clk_out);
      t1 = $realtime;
      @(negedge clk_out) th = $realtime;
      @(posedge clk_out) t2 = $realtime;
      if (n < 2) begin
        check(t2 - t1 > TIN - 1 && t2 - t1 < TIN + 1, $sformatf("N=%0d bypass period %f", n, t2 - t1));
      end else begin
        check(t2 - t1 > n * TIN - 1 && t2 - t1 < n * TIN + 1, $sformatf("N=%0d period %f", n, t2 - t1));
        check(th - t1 > (n / 2) * TIN - 1 && th - t1 < (n / 2) * TIN + 1,
              $sformatf("N=%0d high time %f", n, th - t1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TIN * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
