// Multiplier phase-frequency detector.
//
// The DCO is restarted at the start of each comparison window (see
// dco_enable_gen), so its rising edges fall at t0, t0+T, t0+2T, ... and its
// falling edges at t0+T/2, t0+3T/2, ... where T is the DCO period. The window
// ends one reference period later, at the rising edge of the match-delayed
// reference. The PFD tells whether the DCO frequency is below, near or above M
// times the reference, and when near, which of the two edges came first.
//
// How it works: two chains of flip-flops, clocked by the rising and by the
// falling DCO edges, each shift in a constant 1, so after k edges the first k
// stages are 1 (a thermometer count). The chains are cleared while the DCO is
// disabled (the enable is also low during reset). A multiplexer picks the
// taps for the selected multiple M (1..10).
// At the end of the window two decision flip-flops look at the falling-edge
// chain:
//   fewer than M falling edges   -> fewer than M-1/2 DCO periods -> UP
//   more than M falling edges    -> more than M+1/2 DCO periods  -> DOWN
//   otherwise the multiple is locked and the fine comparison decides: if the
//   M-th rising edge after t0 arrived before the reference edge the DCO is
//   fast (DOWN), otherwise it is slow (UP).
// UP asks for a faster DCO, DOWN for a slower one; exactly one of them is high
// after each window. The thermometer chains, the multiplexer, the two
// decision flip-flops and the 6.5/7.5 thresholds for M = 7 follow the
// described detector. The fine comparison is described as a NAND latch
// arbitrating between the two edges; here it is a flip-flop sampling the
// M-th stage of the rising-edge chain at the reference edge, which gives the
// same decision without an asynchronous latch. The decision flip-flops are
// clocked by the rising edge of the delayed reference, which ends the window.
//
// Interface: up, down and mult_lock are registered on the rising
// edge of ref_m while pfd_en is high and then hold until the next window.
module pfd
  import adpll_pkg::*;
#(
  parameter int MAXM = MAX_MULT,  // largest multiple that can be selected
  parameter int MW   = MULT_W
) (
  input  logic          dco_clk,    // DCO output
  input  logic          dco_en,     // low while the DCO is disabled: clears the chains
  input  logic          ref_m,      // match-delayed reference clock
  input  logic          pfd_en,     // high around the window-ending reference edge
  input  logic          rst_n,      // asynchronous active-low reset
  input  logic [MW-1:0] mult,       // selected multiple M, 1..MAXM
  output logic          up,         // DCO too slow
  output logic          down,       // DCO too fast
  output logic          mult_lock   // DCO within half a period of M x reference: fine comparison decided
);
  timeunit 1ps;
  timeprecision 1fs;

  // rise_th[k] = 1 after k+1 rising edges (the first one is the start edge)
  // fall_th[k] = 1 after k+1 falling edges
  logic [MAXM:0] rise_th;
  logic [MAXM:0] fall_th;

  always_ff @(posedge dco_clk or negedge dco_en)
    if (!dco_en) rise_th <= '0;
    else         rise_th <= {rise_th[MAXM-1:0], 1'b1};

  always_ff @(negedge dco_clk or negedge dco_en)
    if (!dco_en) fall_th <= '0;
    else         fall_th <= {fall_th[MAXM-1:0], 1'b1};

  // Multiplexer: taps for the selected multiple, M clamped to 1..MAXM
  int unsigned m_sel;
  logic        fall_ge_m;    // at least M falling edges  (> M-1/2 periods)
  logic        fall_gt_m;    // at least M+1 falling edges (> M+1/2 periods)
  logic        rise_m_seen;  // M-th rising edge after the start edge seen

  always_comb begin
    m_sel = int'(mult);
    if (m_sel < 1)    m_sel = 1;
    if (m_sel > MAXM) m_sel = MAXM;
    fall_ge_m   = fall_th[m_sel-1];
    fall_gt_m   = fall_th[m_sel];
    rise_m_seen = rise_th[m_sel];
  end

  always_ff @(posedge ref_m or negedge rst_n)
    if (!rst_n) begin
      up        <= 1'b0;
      down      <= 1'b0;
      mult_lock <= 1'b0;
    end else if (pfd_en) begin
      mult_lock <= fall_ge_m & ~fall_gt_m;
      if (!fall_ge_m) begin          // coarse: too few DCO periods
        up   <= 1'b1;
        down <= 1'b0;
      end else if (fall_gt_m) begin  // coarse: too many DCO periods
        up   <= 1'b0;
        down <= 1'b1;
      end else begin                 // fine: order of the two edges
        up   <= ~rise_m_seen;
        down <=  rise_m_seen;
      end
    end

  // After a window exactly one of up/down is set.
  a_updown_excl: assert property (@(posedge ref_m) disable iff (!rst_n) !(up && down));
endmodule
