// Divide-by-two of the (divided) reference clock.
//
// The ADPLL makes one comparison every two reference periods, so its
// sequential control runs from this system clock. A single flip-flop toggles
// on every rising reference edge; its rising edges therefore coincide with
// every second rising reference edge, and those are the edges at which the DCO
// is realigned. Asynchronous active-low reset forces the output high, so the
// first rising reference edge after reset gives a falling system-clock edge
// (the DCO starts there, see dco_enable_gen) and the second one the first
// rising edge, at which the search starts.
module div2
(
  input  logic clk_in,   // reference clock
  input  logic rst_n,    // asynchronous active-low reset
  output logic clk_out   // clk_in / 2, 50 % duty, high during reset
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk_in or negedge rst_n)
    if (!rst_n) clk_out <= 1'b1;
    else        clk_out <= ~clk_out;
endmodule
