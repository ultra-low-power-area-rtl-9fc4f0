// Shared constants and types of the all-digital PLL.
//
// The DCO control word is 11 bits wide: the two most significant bits select
// one of four coarse transmission-gate paths and the nine lower bits drive the
// fine-tune capacitor cells. A larger word means more delay, so word 0 is the
// highest DCO frequency. The phase-frequency detector can multiply the
// reference by 1 to 10. The control unit walks through the states below; the
// verify state and its test delay cell belong to the lock check.
package adpll_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int WORD_W   = 11;  // DCO control bits (2 coarse + 9 fine)
  localparam int COARSE_W = 2;
  localparam int FINE_W   = 9;
  localparam int MAX_MULT = 10;  // largest reference multiple the PFD detects
  localparam int MULT_W   = 4;   // width of the multiplier select

  typedef logic [WORD_W-1:0] word_t;

  typedef enum logic [1:0] {
    CU_START  = 2'd0,  // DCO word cleared, first search bit about to be set
    CU_SEARCH = 2'd1,  // one bit of the word decided per system clock
    CU_VERIFY = 2'd2,  // final word tested with the extra test delay
    CU_LOCKED = 2'd3   // word frozen, lock asserted
  } cu_state_e;
endpackage
