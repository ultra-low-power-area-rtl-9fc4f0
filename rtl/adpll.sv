// All-digital PLL with a subtraction-only binary search.
//
// The loop locks the DCO to M times the reference clock in one mode, without
// separate frequency and phase acquisition. Every second rising reference edge
// the DCO is stopped for a short pulse and restarted (dco_enable_gen), so its
// first rising edge is aligned with the reference. During the following
// reference period the PFD counts DCO edges and, at the next reference edge,
// says whether M DCO periods took less time than the reference period (DOWN,
// DCO too fast) or more (UP). The control unit uses that answer to decide one
// bit of the 11-bit DCO word per two reference periods, most significant bit
// first, and starts at word 0, the highest frequency. It then checks the result
// and asserts lock, or raises fail and starts again.
//
// Structure: div2 makes the system clock; dco_enable_gen together with a
// delay buffer makes the DCO enable pulse; the match delay delays the
// reference that ends the PFD window by the enable pulse width plus the DCO
// start delay; pfd, control_unit, dco_register and the dco model close the
// loop. The block set and the connections follow the described ADPLL. The
// delay values are this design's choice. The pulse must stay below half the
// shortest DCO period, and the match delay below half a reference period.
//
// Timing: with reset released before the first rising reference edge, the
// DCO starts free-running at that edge and the search starts at the second
// one, the first rising system-clock edge. Lock follows 22 reference periods
// later when the last bit is decided with UP, or 24 when the extra check
// window is needed.
module adpll
  import adpll_pkg::*;
#(
  parameter real PULSE_PS     = 100.0,  // DCO disable pulse width
  parameter real DCO_START_PS = 20.0,   // DCO enable to first edge
  parameter real T_MIN_PS     = 952.381,
  parameter real FINE_STEP_PS = 2.0,
  parameter real TEST_STEP_PS = 4.0
) (
  input  logic              ref_clk,    // reference (already divided by N)
  input  logic              rst_n,      // asynchronous active-low reset
  input  logic [MULT_W-1:0] mult,       // multiple M, 1..10
  output logic              dco_clk,    // output clock, M x ref_clk when locked
  output logic              lock,       // locked
  output logic              fail,       // lock check failed, search restarts
  output word_t             word,       // DCO control word
  output logic              up,         // PFD: DCO too slow
  output logic              down,       // PFD: DCO too fast
  output logic              mult_lock,  // PFD: within half a period of M x ref
  output logic              dco_en,     // DCO enable with realignment pulses
  output logic              sys_clk,    // system clock, ref / 2
  output logic              test_en,    // lock-check test delay switched in
  output cu_state_e         state       // control unit state
);
  timeunit 1ps;
  timeprecision 1fs;

  logic  sys_clk_dly;
  logic  ref_m;
  logic  pfd_en;
  logic  load;
  logic  run;
  word_t word_d;
  word_t ptr;

  div2 u_div2 (
    .clk_in (ref_clk),
    .rst_n  (rst_n),
    .clk_out(sys_clk)
  );

  delay_buffer #(.DELAY_PS(PULSE_PS)) u_pulse_dly (
    .din (sys_clk),
    .dout(sys_clk_dly)
  );

  dco_enable_gen u_en_gen (
    .sys_clk    (sys_clk),
    .sys_clk_dly(sys_clk_dly),
    .rst_n      (rst_n),
    .run        (run),
    .dco_en     (dco_en)
  );

  match_delay #(.DELAY_PS(PULSE_PS + DCO_START_PS)) u_match (
    .din (ref_clk),
    .dout(ref_m)
  );

  pfd u_pfd (
    .dco_clk  (dco_clk),
    .dco_en   (dco_en),
    .ref_m    (ref_m),
    .pfd_en   (pfd_en),
    .rst_n    (rst_n),
    .mult     (mult),
    .up       (up),
    .down     (down),
    .mult_lock(mult_lock)
  );

  control_unit u_cu (
    .sys_clk(sys_clk),
    .ref_clk(ref_clk),
    .rst_n  (rst_n),
    .up     (up),
    .down   (down),
    .word_q (word),
    .word_d (word_d),
    .load   (load),
    .fail   (fail),
    .pfd_en (pfd_en),
    .test_en(test_en),
    .lock   (lock),
    .state  (state),
    .ptr    (ptr)
  );

  dco_register u_reg (
    .clk   (sys_clk),
    .rst_n (rst_n),
    .fail  (fail),
    .load  (load),
    .word_d(word_d),
    .word_q(word)
  );

  dco #(
    .T_MIN_PS      (T_MIN_PS),
    .FINE_STEP_PS  (FINE_STEP_PS),
    .TEST_STEP_PS  (TEST_STEP_PS),
    .START_DELAY_PS(DCO_START_PS)
  ) u_dco (
    .en     (dco_en),
    .word   (word),
    .test   (test_en),
    .clk_out(dco_clk)
  );
endmodule
