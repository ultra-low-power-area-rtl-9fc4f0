// Behavioural model of the Type-1 transmission-gate DCO with quick reset.
// This is a behavioural model of an analog ring oscillator, not
// synthesizable logic.
//
// The real oscillator is a short inverter ring. Two control bits pick one of
// four coarse paths made of one to four series transmission gates, and nine
// bits switch fine-tune MOS capacitors. A quick-reset circuit lets the ring stop
// and restart cleanly, which the ADPLL uses to align the first DCO edge with the
// reference. Here the period is
//   T(word) = T_MIN_PS + word[10:9] * COARSE_STEP_PS + word[8:0] * FINE_STEP_PS
//             + test * TEST_STEP_PS
// with the top frequency 1050 MHz (word 0), the 2 ps fine resolution and the
// 4 ps test delay taken from the described oscillator. The coarse step is set
// to 512 fine steps so that the 11-bit word is binary weighted and the period
// rises monotonically with the word. The range then runs below the 450 MHz
// quoted for the real oscillator; 450 MHz is reached at word 635. Jitter,
// supply and corner effects are not modelled.
//
// Interface and timing: while en is low the output is held low. On a rising
// en the output rises after START_DELAY_PS and then toggles every T/2 with
// the period of the current word (read again at every half period), until en
// falls. A low pulse on en that is shorter than half a period therefore
// restarts the oscillation with a rising edge a fixed delay after the pulse.
module dco
  import adpll_pkg::*;
#(
  parameter int  W              = WORD_W,
  parameter int  FW             = FINE_W,
  parameter real T_MIN_PS       = 952.381,  // 1050 MHz at word 0
  parameter real FINE_STEP_PS   = 2.0,      // fine-tune resolution
  parameter real COARSE_STEP_PS = 1024.0,   // one coarse path step = 2^9 fine steps
  parameter real TEST_STEP_PS   = 4.0,      // test delay cell for the lock check
  parameter real START_DELAY_PS = 20.0      // enable to first rising edge
) (
  input  logic         en,       // DCO enable, from the enable generator
  input  logic [W-1:0] word,     // control word from the DCO register
  input  logic         test,     // switch in the test delay cell
  output logic         clk_out   // oscillator output
);
  timeunit 1ps;
  timeprecision 1fs;

  int unsigned gen;  // incremented on every enable edge; stale runs stop

  function automatic real period_ps(logic [W-1:0] w, logic t);
    real p;
    p = T_MIN_PS + real'(w[W-1:FW]) * COARSE_STEP_PS + real'(w[FW-1:0]) * FINE_STEP_PS;
    if (t) p = p + TEST_STEP_PS;
    return p;
  endfunction

  task automatic oscillate(int unsigned g);
    #(START_DELAY_PS);
    while (g == gen) begin
      clk_out = 1'b1;
      #(period_ps(word, test) / 2.0);
      if (g != gen) break;
      clk_out = 1'b0;
      #(period_ps(word, test) / 2.0);
    end
  endtask

  initial begin
    gen     = 0;
    clk_out = 1'b0;
  end

  always @(posedge en) begin
    gen = gen + 1;
    fork
      oscillate(gen);
    join_none
  end

  always @(negedge en) begin
    gen     = gen + 1;
    clk_out = 1'b0;
  end
endmodule
