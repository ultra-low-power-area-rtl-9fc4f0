// Self-checking testbench of the ADPLL.
//
// For several multiples M at a 100 MHz reference it resets the loop, runs it
// until lock and checks: the final DCO word against the word computed here
// from the DCO period formula (the largest word whose M periods are shorter
// than one reference period), the number of reference periods to lock (22
// when the last bit is decided with UP, i.e. the expected word is even, 24
// when the extra check window runs), the measured DCO period after lock, and
// that lock stays. M = 1 asks for 100 MHz, below the DCO range: the check must
// fail and restart the search, and lock must never rise.
module tb_adpll;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TREF  = 10000.0;
  localparam real TMIN  = 952.381;
  localparam real FSTEP = 2.0;

  logic              ref_clk = 1'b0;
  logic              rst_n = 1'b1;
  logic [MULT_W-1:0] mult    = 4'd7;
  logic              dco_clk, lock, fail, up, down, mult_lock, dco_en, sys_clk, test_en;
  word_t             word;
  cu_state_e         state;

  int checks = 0, failures = 0;
  int ref_edges = 0;
  int fails_seen = 0;

  adpll dut (
    .ref_clk, .rst_n, .mult, .dco_clk, .lock, .fail, .word, .up, .down,
    .mult_lock, .dco_en, .sys_clk, .test_en, .state
  );

  always #(TREF / 2.0) ref_clk = ~ref_clk;
  always @(posedge ref_clk) if (rst_n) ref_edges++;
  always @(posedge sys_clk) if (rst_n && fail) fails_seen++;

  function automatic real period_of(int w);
    return TMIN + real'(w) * FSTEP;
  endfunction

  function automatic int expected_word(int m);
    int best = -1;
    for (int w = 0; w < (1 << WORD_W); w++)
      if (real'(m) * period_of(w) < TREF) best = w;
    return best;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_case(input int m);
    int  exp_w, exp_cycles, lock_edge;
    real t1, t2;
    exp_w      = expected_word(m);
    exp_cycles = exp_w[0] ? 24 : 22;
    rst_n = 1'b0;
    mult  = MULT_W'(m);
    @(negedge ref_clk);
    ref_edges = 0;
    rst_n = 1'b1;
    lock_edge = -1;
    for (int i = 0; i < 40; i++) begin
      @(posedge ref_clk);
      #1;
      if (lock && lock_edge < 0) lock_edge = ref_edges;
    end
    check(lock, $sformatf("M=%0d lock", m));
    check(word == word_t'(exp_w), $sformatf("M=%0d word %0d expected %0d", m, word, exp_w));
    // search starts at edge 2, lock is seen right after edge 2 + cycles
    check(lock_edge == 2 + exp_cycles,
          $sformatf("M=%0d lock after %0d cycles, expected %0d", m, lock_edge - 2, exp_cycles));
    // measure one DCO period in the middle of a window
    @(posedge sys_clk);
    #2000;
    @(posedge dco_clk) t1 = $realtime;
    @(posedge dco_clk) t2 = $realtime;
    check((t2 - t1) > period_of(exp_w) - 0.01 && (t2 - t1) < period_of(exp_w) + 0.01,
          $sformatf("M=%0d period %f expected %f", m, t2 - t1, period_of(exp_w)));
    check(real'(m) * (t2 - t1) < TREF && real'(m) * (t2 - t1 + FSTEP) >= TREF,
          $sformatf("M=%0d period within one step of Tref/M", m));
    repeat (10) @(posedge ref_clk);
    check(lock && word == word_t'(exp_w), $sformatf("M=%0d lock held", m));
  endtask

  // reset starts with a real falling edge so asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #1000;
    run_case(7);   // 700 MHz
    run_case(8);   // 800 MHz
    run_case(6);   // odd word: extra check window
    run_case(10);
    run_case(5);   // coarse bit set
    // out of range: target 100 MHz is slower than the slowest word
    rst_n = 1'b0;
    mult  = 4'd1;
    @(negedge ref_clk);
    fails_seen = 0;
    rst_n = 1'b1;
    repeat (80) @(posedge ref_clk);
    check(!lock, "M=1 never locks");
    check(fails_seen >= 2, $sformatf("M=1 fail raised %0d times", fails_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TREF * 2000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
