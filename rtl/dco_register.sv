// DCO control register.
//
// Holds the 11-bit binary-weighted control word that sets the DCO frequency.
// The control unit computes the next word; the register loads it on a rising
// system-clock edge when load is high. A high fail (the control unit's system
// fail signal) clears the word to zero, which is the highest DCO frequency and
// the start point of a new search; fail takes priority over load. Asynchronous
// active-low reset also clears it. Load and clear semantics are this design's
// choice; the register itself is one of the blocks of the ADPLL.
module dco_register
  import adpll_pkg::*;
#(
  parameter int W = WORD_W
) (
  input  logic         clk,      // system clock (reference / 2)
  input  logic         rst_n,    // asynchronous active-low reset
  input  logic         fail,     // synchronous clear to the maximum frequency
  input  logic         load,     // load word_d
  input  logic [W-1:0] word_d,   // next word from the control unit
  output logic [W-1:0] word_q    // word driving the DCO
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    word_q <= '0;
    else if (fail) word_q <= '0;
    else if (load) word_q <= word_d;
endmodule
