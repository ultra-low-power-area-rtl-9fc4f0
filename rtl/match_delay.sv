// Behavioural model of the match delay line.
// This is a behavioural model of a delay-cell chain, not synthesizable logic.
//
// The PFD compares the DCO against the reference, but the DCO's first edge in
// each window comes through the enable pulse generator and the DCO's start-up
// path. The match delay puts the same delay into the reference path so that
// both edges start the window together. In hardware it is a chain of buffers
// sized to that path; here it is a pure transport delay of DELAY_PS, which the
// ADPLL sets to the enable-pulse width plus the DCO start delay.
module match_delay
#(
  parameter real DELAY_PS = 120.0  // equals enable pulse width + DCO start delay
) (
  input  logic din,
  output logic dout
);
  timeunit 1ps;
  timeprecision 1fs;

  initial dout = 1'b0;

  always @(din) dout <= #(DELAY_PS) din;
endmodule
