// End-to-end testbench of the frequency synthesizer at its default parameters.
//
// A 100 MHz reference is synthesized to (M/N) x 100 MHz for the 700 MHz and
// 800 MHz memory clocks (N = 1, M = 7 and 8), for M = 6, whose word needs the
// extra lock-check window, for N = 2 with M = 10 (500 MHz, a coarse bit set),
// and for M = 1, which lies outside the DCO range. For each case the
// testbench works out the expected DCO word from the oscillator's period
// formula and the reference period N x 10 ns, and checks the word, the lock
// time in divided-reference periods (22 or 24), the measured output period and
// that it is within one fine step of the target. It counts each mechanism of
// the loop (coarse UP and DOWN, multiplier lock with the fine comparison
// deciding UP and DOWN, lock straight after the last bit, lock after the check
// window, fail and restart, DCO realignment pulses, reference division) and
// counts a failure for any that never happened.
module tb_freq_synth;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TREF  = 10000.0;
  localparam real TMIN  = 952.381;
  localparam real FSTEP = 2.0;

  logic              ref_clk = 1'b0, rst_n = 1'b1;
  logic [7:0]        div_n = 8'd1;
  logic [MULT_W-1:0] mult = 4'd7;
  logic              clk_out, fin, lock, fail, up, down, mult_lock, dco_en, test_en;
  word_t             word;
  cu_state_e         state;

  int checks = 0, failures = 0;
  int fin_edges = 0;
  int n_coarse_up = 0, n_coarse_down = 0, n_fine_up = 0, n_fine_down = 0;
  int n_lock22 = 0, n_lock24 = 0, n_fail = 0, n_realign = 0, n_divided = 0;

  freq_synth dut (
    .ref_clk, .rst_n, .div_n, .mult, .clk_out, .fin, .lock, .fail, .word, .up, .down,
    .mult_lock, .dco_en, .test_en, .state
  );

  always #(TREF / 2.0) ref_clk = ~ref_clk;
  always @(posedge fin) if (rst_n) fin_edges++;

  // PFD results appear just after the window-ending edge; sample each one once
  always @(negedge fin)
    if (rst_n && (state == CU_SEARCH || state == CU_VERIFY)) begin
      if (up && !mult_lock)   n_coarse_up++;
      if (down && !mult_lock) n_coarse_down++;
      if (up && mult_lock)    n_fine_up++;
      if (down && mult_lock)  n_fine_down++;
    end
  always @(posedge fin) if (rst_n && fail && state == CU_VERIFY) n_fail++;
  always @(negedge dco_en) if (rst_n && lock) n_realign++;

  function automatic real period_of(int w);
    return TMIN + real'(w) * FSTEP;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_case(input int n, input int m);
    int  exp_w, lock_edge;
    real tfin, t1, t2;
    tfin = TREF * real'(n < 2 ? 1 : n);
    exp_w = -1;
    for (int w = 0; w < (1 << WORD_W); w++)
      if (real'(m) * period_of(w) < tfin) exp_w = w;
    rst_n = 1'b0;
    div_n = 8'(n);
    mult  = MULT_W'(m);
    #(3 * TREF);
    @(negedge ref_clk);
    fin_edges = 0;
    rst_n = 1'b1;
    lock_edge = -1;
    for (int i = 0; i < 40; i++) begin
      @(posedge fin);
      #1;
      if (lock && lock_edge < 0) lock_edge = fin_edges;
    end
    check(lock, $sformatf("N=%0d M=%0d lock", n, m));
    check(word == word_t'(exp_w), $sformatf("N=%0d M=%0d word %0d expected %0d", n, m, word, exp_w));
    check(lock_edge - 2 == (exp_w[0] ? 24 : 22),
          $sformatf("N=%0d M=%0d lock after %0d Fin cycles", n, m, lock_edge - 2));
    if (exp_w[0]) n_lock24++; else n_lock22++;
    if (n >= 2) n_divided++;
    @(posedge fin);
    #(tfin / 4.0);
    @(posedge clk_out) t1 = $realtime;
    @(posedge clk_out) t2 = $realtime;
    check((t2 - t1) > period_of(exp_w) - 0.01 && (t2 - t1) < period_of(exp_w) + 0.01,
          $sformatf("N=%0d M=%0d output period %f", n, m, t2 - t1));
    check(real'(m) * (t2 - t1) < tfin && real'(m) * (t2 - t1 + FSTEP) >= tfin,
          $sformatf("N=%0d M=%0d output within one step of %f MHz", n, m,
                    1.0e6 * real'(m) / tfin));
    $display("N=%0d M=%0d: word %0d, output %f MHz, lock after %0d cycles", n, m, word,
             1.0e6 / (t2 - t1), lock_edge - 2);
  endtask

  // reset starts with a real falling edge so asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #1000;
    run_case(1, 7);    // 700 MHz
    run_case(1, 8);    // 800 MHz
    run_case(1, 6);    // odd word: check window
    run_case(2, 10);   // 50 MHz Fin, 500 MHz out
    // out of range: 100 MHz target
    rst_n = 1'b0;
    div_n = 8'd1;
    mult  = 4'd1;
    #(3 * TREF);
    rst_n = 1'b1;
    repeat (60) @(posedge fin);
    check(!lock, "M=1 does not lock");
    check(n_coarse_up > 0,   $sformatf("coarse UP seen %0d", n_coarse_up));
    check(n_coarse_down > 0, $sformatf("coarse DOWN seen %0d", n_coarse_down));
    check(n_fine_up > 0,     $sformatf("fine UP seen %0d", n_fine_up));
    check(n_fine_down > 0,   $sformatf("fine DOWN seen %0d", n_fine_down));
    check(n_lock22 > 0,      $sformatf("lock after last bit seen %0d", n_lock22));
    check(n_lock24 > 0,      $sformatf("lock after check window seen %0d", n_lock24));
    check(n_fail > 0,        $sformatf("fail and restart seen %0d", n_fail));
    check(n_realign > 0,     $sformatf("realignment pulses while locked %0d", n_realign));
    check(n_divided > 0,     $sformatf("divided reference used %0d", n_divided));
    $display("mechanisms: coarse up %0d, coarse down %0d, fine up %0d, fine down %0d, lock22 %0d, lock24 %0d, fail %0d, realign %0d",
             n_coarse_up, n_coarse_down, n_fine_up, n_fine_down, n_lock22, n_lock24, n_fail, n_realign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TREF * 5000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
