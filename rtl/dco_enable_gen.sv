// DCO enable generator: first-edge alignment of the DCO to the reference.
//
// Every rising edge of the system clock (every second rising reference edge)
// the DCO is disabled for a short pulse and then restarts, so its first rising
// edge after the pulse is aligned with that reference edge. This is what makes
// the frequency comparison in the PFD also a phase comparison. The pulse is
// made the classic way: the system clock is ANDed (a NAND gate) with an
// inverted, delayed copy of itself, and the pulse width is the delay of the
// delay buffer. The delay buffer is a physical cell outside this module: its
// output comes back in on sys_clk_dly. One flip-flop, set by the first
// falling system-clock edge after reset (the first reference edge, as div2
// resets high), starts the DCO for the first time and keeps it running. The
// DCO then runs freely for one reference period until the first rising
// system-clock edge, whose pulse aligns it and clears the PFD counters. The
// DCO must restart before half a DCO period has passed, so the buffer delay has
// to be below half the shortest DCO period.
//
// Timing: dco_en is low from reset until the first falling system-clock edge,
// then high, with a low pulse of the buffer delay at every rising system-clock
// edge.
module dco_enable_gen
  import adpll_pkg::*;
(
  input  logic sys_clk,      // system clock from div2
  input  logic sys_clk_dly,  // sys_clk through the pulse-width delay buffer
  input  logic rst_n,        // asynchronous active-low reset
  output logic run,          // DCO has been started since reset
  output logic dco_en        // DCO enable, low pulse at each realignment
);
  timeunit 1ps;
  timeprecision 1fs;

  logic pulse_n;  // NAND of sys_clk and inverted delayed sys_clk

  always_ff @(negedge sys_clk or negedge rst_n)
    if (!rst_n) run <= 1'b0;
    else        run <= 1'b1;

  assign pulse_n = ~(sys_clk & ~sys_clk_dly);
  assign dco_en  = run & pulse_n;
endmodule
