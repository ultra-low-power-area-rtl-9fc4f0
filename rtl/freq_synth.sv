// Frequency synthesizer: output = (M / N) x reference.
//
// A 1/N divider (ref_div) brings the reference down to Fin, and the
// all-digital PLL (adpll) locks its DCO to M x Fin, so the output clock is
// (M/N) times the reference. With N = 1 and a 100 MHz reference, M = 7 and
// M = 8 give the 700 MHz and 800 MHz memory-interface clocks. M and N must be
// held steady while the loop searches; change them under reset. The output
// clock is stopped briefly (one enable pulse) every two Fin periods when the
// DCO is realigned, which is part of the loop's operation.
//
// Ports are plain signals. Lock follows 22 or 24 Fin periods after the second
// rising Fin edge after reset, where the search starts (see adpll).
module freq_synth
  import adpll_pkg::*;
#(
  parameter int N_W = 8
) (
  input  logic              ref_clk,    // reference clock
  input  logic              rst_n,      // asynchronous active-low reset
  input  logic [N_W-1:0]    div_n,      // reference division N (0, 1: none)
  input  logic [MULT_W-1:0] mult,       // multiplication M, 1..10
  output logic              clk_out,    // synthesized clock
  output logic              fin,        // divided reference seen by the ADPLL
  output logic              lock,
  output logic              fail,
  output word_t             word,
  output logic              up,
  output logic              down,
  output logic              mult_lock,
  output logic              dco_en,
  output logic              test_en,
  output cu_state_e         state
);
  timeunit 1ps;
  timeprecision 1fs;

  logic sys_clk;

  ref_div #(.N_W(N_W)) u_ref_div (
    .clk_in (ref_clk),
    .rst_n  (rst_n),
    .div_n  (div_n),
    .clk_out(fin)
  );

  adpll u_adpll (
    .ref_clk  (fin),
    .rst_n    (rst_n),
    .mult     (mult),
    .dco_clk  (clk_out),
    .lock     (lock),
    .fail     (fail),
    .word     (word),
    .up       (up),
    .down     (down),
    .mult_lock(mult_lock),
    .dco_en   (dco_en),
    .sys_clk  (sys_clk),
    .test_en  (test_en),
    .state    (state)
  );
endmodule
