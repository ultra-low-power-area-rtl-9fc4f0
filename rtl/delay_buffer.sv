// Behavioural model of the delay buffer that sets the width of the DCO
// enable pulse. This is a behavioural model of a buffer chain, not
// synthesizable logic: its output follows its input after DELAY_PS
// (transport delay).
module delay_buffer
#(
  parameter real DELAY_PS = 100.0
) (
  input  logic din,
  output logic dout
);
  timeunit 1ps;
  timeprecision 1fs;

  initial dout = 1'b0;

  always @(din) dout <= #(DELAY_PS) din;
endmodule
