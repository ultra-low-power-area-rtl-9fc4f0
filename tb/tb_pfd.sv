// Self-checking testbench of the PFD. Each trial plays one comparison window:
// the DCO enable is pulsed, a DCO clock of period T starts with a rising edge,
// and one reference period (10 ns) later the delayed reference rises with
// pfd_en high. For a random multiple M and period T the expected result is
// worked out from the times alone: UP if M x T is longer than the reference
// period, DOWN otherwise, and multiplier lock if the reference period lies
// between (M - 1/2) T and (M + 1/2) T. Each of the four outcomes (coarse UP,
// coarse DOWN, fine UP, fine DOWN) must occur. A last trial with pfd_en low
// must leave the outputs unchanged.
module tb_pfd;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TREF = 10000.0;
  logic              dco_clk = 1'b0, dco_en = 1'b1, ref_m = 1'b0, pfd_en = 1'b0, rst_n = 1'b1;
  logic [MULT_W-1:0] mult = 4'd7;
  logic              up, down, mult_lock;
  int checks = 0, failures = 0;
  int n_cup = 0, n_cdown = 0, n_fup = 0, n_fdown = 0;
  int unsigned run_id = 0;

  pfd dut (.dco_clk, .dco_en, .ref_m, .pfd_en, .rst_n, .mult, .up, .down, .mult_lock);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clock_run(input real t, input int unsigned id);
    while (id == run_id) begin
      dco_clk = 1'b1;
      #(t / 2.0);
      dco_clk = 1'b0;
      if (id != run_id) break;
      #(t / 2.0);
    end
  endtask

  task automatic window(input int m, input real t, input bit en_pfd);
    mult   = MULT_W'(m);
    run_id++;
    dco_en = 1'b0;
    #100;
    dco_en = 1'b1;
    fork
      clock_run(t, run_id);
    join_none
    #(TREF / 2.0);
    pfd_en = en_pfd;
    #(TREF / 2.0);
    ref_m = 1'b1;
    #(TREF / 4.0);
    pfd_en = 1'b0;
    ref_m  = 1'b0;
    run_id++;
    #(TREF * 0.7);
  endtask

  // reset starts with a real falling edge so asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    int  m;
    real t, n;
    bit  e_up, e_ml;
    #1000;
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      m = $urandom_range(1, MAX_MULT);
      t = TREF / real'(m) * (0.7 + 0.6 * real'($urandom_range(0, 10000)) / 10000.0);
      n = TREF / t;  // DCO periods in one reference period
      if ((n - m) * (n - m) < 1e-6 || (n - m - 0.5) * (n - m - 0.5) < 1e-6 ||
          (n - m + 0.5) * (n - m + 0.5) < 1e-6) continue;
      e_up = real'(m) * t > TREF;
      e_ml = (n > real'(m) - 0.5) && (n < real'(m) + 0.5);
      window(m, t, 1'b1);
      check(up == e_up && down == !e_up && mult_lock == e_ml,
            $sformatf("M=%0d T=%f: up=%b down=%b ml=%b expected up=%b ml=%b",
                      m, t, up, down, mult_lock, e_up, e_ml));
      if (!e_ml && e_up)  n_cup++;
      if (!e_ml && !e_up) n_cdown++;
      if (e_ml && e_up)   n_fup++;
      if (e_ml && !e_up)  n_fdown++;
    end
    // M = 7: the 6.5 / 7.5 thresholds
    window(7, TREF / 6.4, 1'b1);
    check(up && !mult_lock, "6.4 periods: coarse UP");
    window(7, TREF / 6.6, 1'b1);
    check(up && mult_lock, "6.6 periods: fine UP");
    window(7, TREF / 7.4, 1'b1);
    check(down && mult_lock, "7.4 periods: fine DOWN");
    window(7, TREF / 7.6, 1'b1);
    check(down && !mult_lock, "7.6 periods: coarse DOWN");
    // disabled PFD keeps its last result
    window(7, TREF / 6.0, 1'b0);
    check(down && !up, "pfd_en low holds result");
    check(n_cup > 0 && n_cdown > 0 && n_fup > 0 && n_fdown > 0,
          $sformatf("all outcomes seen %0d %0d %0d %0d", n_cup, n_cdown, n_fup, n_fdown));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TREF * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
