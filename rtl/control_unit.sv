// Control unit: low-power binary search of the DCO word, PFD enable, lock and fail.
//
// The search needs no adder. It starts from word 0, the highest DCO
// frequency, which is known to be above the target. A one-hot pointer (a chain
// of flip-flops) raises the word bits one at a time from the most significant
// down. After each comparison window the bit under test stays 1 if the PFD
// says DOWN (the DCO is still too fast, keep the added delay) and returns to
// 0 if it says UP (too slow). Each step changes one bit, and the word only
// ever moves towards lower frequency from the last word known to be fast.
// One bit is decided per system clock, i.e. per two reference periods, so the
// 11 bits take 22 reference periods.
//
// Lock check: when the last bit is decided with UP, the final word is known to
// be fast and the word one LSB above it known to be slow, so lock is asserted
// at once (22 reference periods after the search started). When the last bit
// is decided with DOWN, the final word is fast but the next one up was never
// tested, so one more window runs with the DCO's extra test delay cell
// switched in (test_en). UP then asserts lock (24 reference periods); DOWN
// means the target lies outside the DCO's range, and the control unit raises
// fail for one system clock, which clears the DCO register and restarts the
// search. The bit-by-bit search, the final test with an added delay, lock and
// fail follow the described algorithm; splitting the check into the two cases
// above and the state encoding are this design's own.
//
// PFD enable: a flip-flop on the falling reference edge copies the system
// clock, so pfd_en is high from the middle of the first reference period of
// each system clock to the middle of the second. It covers the reference
// edge that ends a comparison window and excludes the one that starts the
// next, as long as the match delay is under half a reference period.
//
// Timing: word_d, load and fail are combinational and are taken by the DCO
// register at the same rising system-clock edge that advances this FSM.
module control_unit
  import adpll_pkg::*;
#(
  parameter int W = WORD_W
) (
  input  logic         sys_clk,   // system clock (reference / 2)
  input  logic         ref_clk,   // reference clock, for the PFD enable flop
  input  logic         rst_n,     // asynchronous active-low reset
  input  logic         up,        // from the PFD: DCO too slow
  input  logic         down,      // from the PFD: DCO too fast
  input  logic [W-1:0] word_q,    // current DCO word from the DCO register
  output logic [W-1:0] word_d,    // next DCO word
  output logic         load,      // DCO register load enable
  output logic         fail,      // system fail: clear the word and restart
  output logic         pfd_en,    // PFD enable around the window-ending edge
  output logic         test_en,   // switch in the DCO test delay cell
  output logic         lock,      // ADPLL locked
  output cu_state_e    state,     // search state, for observation
  output logic [W-1:0] ptr        // one-hot pointer to the bit under test
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [W-1:0] MSB = {1'b1, {(W-1){1'b0}}};

  logic [W-1:0] kept;  // word after deciding the bit under test

  always_comb begin
    kept   = down ? word_q : (word_q & ~ptr);
    word_d = word_q;
    load   = 1'b0;
    fail   = 1'b0;
    unique case (state)
      CU_START: begin
        word_d = MSB;
        load   = 1'b1;
      end
      CU_SEARCH: begin
        word_d = kept | (ptr >> 1);
        load   = 1'b1;
      end
      CU_VERIFY: fail = ~up;
      CU_LOCKED: ;
      default: ;
    endcase
  end

  always_ff @(posedge sys_clk or negedge rst_n)
    if (!rst_n) begin
      state   <= CU_START;
      ptr     <= MSB;
      test_en <= 1'b0;
      lock    <= 1'b0;
    end else begin
      unique case (state)
        CU_START: begin
          state <= CU_SEARCH;
          ptr   <= MSB;
        end
        CU_SEARCH: begin
          if (ptr[0]) begin
            if (up) begin
              state <= CU_LOCKED;
              lock  <= 1'b1;
            end else begin
              state   <= CU_VERIFY;
              test_en <= 1'b1;
            end
          end else begin
            ptr <= ptr >> 1;
          end
        end
        CU_VERIFY: begin
          test_en <= 1'b0;
          if (up) begin
            state <= CU_LOCKED;
            lock  <= 1'b1;
          end else begin
            state <= CU_START;
            ptr   <= MSB;
          end
        end
        CU_LOCKED: ;
        default: state <= CU_START;
      endcase
    end

  always_ff @(negedge ref_clk or negedge rst_n)
    if (!rst_n) pfd_en <= 1'b0;
    else        pfd_en <= sys_clk;

  // The pointer is one-hot while searching.
  a_ptr_onehot: assert property (@(posedge sys_clk) disable iff (!rst_n)
                                 (state == CU_SEARCH) |-> $onehot(ptr));
endmodule
