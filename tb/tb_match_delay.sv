// Self-checking testbench of the match delay model: both edges of a clock
// must come out DELAY_PS later.
module tb_match_delay;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real D = 120.0;
  logic din = 1'b0, dout;
  int checks = 0, failures = 0;

  match_delay #(.DELAY_PS(D)) dut (.din, .dout);

  initial begin
    real t0;
    #1000;
    for (int i = 0; i < 10; i++) begin
      din = ~din;
      t0 = $realtime;
      @(dout);
      checks++;
      if ($realtime - t0 < D - 0.01 || $realtime - t0 > D + 0.01 || dout !== din) begin
        failures++;
        $display("FAIL: delay %f", $realtime - t0);
      end
      #(1000 + 37 * i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
