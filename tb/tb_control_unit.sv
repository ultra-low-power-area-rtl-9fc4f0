// Self-checking testbench of the control unit. The testbench holds the DCO
// word (as the DCO register would) and plays the PFD with an ideal oscillator:
// a word w (plus 2 LSB when the test delay is on) is "fast" (DOWN) when it is
// at most a target word, otherwise "slow" (UP). The search must end on the
// target, with lock 22 reference periods after the first system-clock edge
// for an even target and 24 for an odd one, and it must never add to the word
// of a bit already decided. A target beyond the largest word must raise fail,
// clear the word and restart. pfd_en must be high at the reference edge that
// ends each window and low at the one that starts the next.
module tb_control_unit;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic      sys_clk = 1'b0, ref_clk = 1'b0, rst_n = 1'b1, up = 1'b0, down = 1'b0;
  word_t     word_q, word_d, ptr;
  logic      load, fail, pfd_en, test_en, lock;
  cu_state_e state;
  int        checks = 0, failures = 0;
  int        target;
  int        ref_edges = 0;
  int        fails = 0;

  // fail is taken by the DCO register at the rising system-clock edge
  always @(posedge sys_clk) if (rst_n && fail) fails++;

  control_unit dut (.sys_clk, .ref_clk, .rst_n, .up, .down, .word_q, .word_d, .load, .fail,
                    .pfd_en, .test_en, .lock, .state, .ptr);

  // reference 10 ns, system clock toggles on each rising reference edge
  always #5000 ref_clk = ~ref_clk;
  always @(posedge ref_clk) begin
    if (rst_n) sys_clk <= ~sys_clk;
    else       sys_clk <= 1'b0;
    if (rst_n) ref_edges++;
  end

  // DCO register
  always @(posedge sys_clk or negedge rst_n)
    if (!rst_n)    word_q <= '0;
    else if (fail) word_q <= '0;
    else if (load) word_q <= word_d;

  // ideal PFD: decision at the window-ending reference edge
  always @(posedge ref_clk)
    if (rst_n && sys_clk && ref_edges > 0) begin
      #100;
      checks++;
      if (!pfd_en && rst_n) begin failures++; $display("FAIL: pfd_en low at window end t=%0t e=%0d", $time, ref_edges); end
      down <= (int'(word_q) + (test_en ? 2 : 0)) <= target;
      up   <= (int'(word_q) + (test_en ? 2 : 0)) >  target;
    end else if (rst_n && !sys_clk && ref_edges > 1) begin
      #100;
      checks++;
      if (pfd_en && rst_n) begin failures++; $display("FAIL: pfd_en high at window start"); end
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int tgt, input bit expect_lock);
    int lock_edge = -1;
    fails = 0;
    target = tgt;
    rst_n = 1'b0;
    up = 1'b0; down = 1'b0;
    @(negedge ref_clk);
    ref_edges = 0;
    fails = 0;
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      @(posedge ref_clk);
      #10;
      if (lock && lock_edge < 0) lock_edge = ref_edges;
    end
    if (expect_lock) begin
      check(lock && word_q == word_t'(tgt), $sformatf("target %0d: lock=%b word=%0d", tgt, lock, word_q));
      check(lock_edge == 1 + ((tgt % 2) != 0 ? 24 : 22),
            $sformatf("target %0d: lock after %0d cycles", tgt, lock_edge - 1));
      check(fails == 0, "no fail while locking");
    end else begin
      check(!lock, "out of range: no lock");
      check(fails > 0, $sformatf("out of range: fail raised %0d times", fails));
    end
  endtask

  // reset starts with a real falling edge so asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #1000;
    run(238, 1'b1);
    run(148, 1'b1);
    run(357, 1'b1);
    run(0, 1'b1);
    run(2046, 1'b1);
    for (int i = 0; i < 20; i++) run($urandom_range(0, 2046), 1'b1);
    run(5000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
