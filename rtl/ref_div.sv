// Programmable 1/N reference divider of the frequency synthesizer.
//
// The synthesizer output is (M/N) times the reference: the reference is first
// divided by N here and the ADPLL then multiplies by M. For N = 0 or 1 the
// reference passes straight through (a multiplexer, no flip-flop). For N >= 2 a
// counter runs from 0 to N-1 on rising input edges and the output is high for
// the first floor(N/2) counts, so an even N gives 50 % duty and an odd N a
// slightly shorter high phase. Only the rising output edges matter to the
// ADPLL. The divider itself and the width of N are this design's choice: the
// block is only named in the synthesizer diagram.
module ref_div
  import adpll_pkg::*;
#(
  parameter int N_W = 8  // width of the division ratio
) (
  input  logic           clk_in,
  input  logic           rst_n,
  input  logic [N_W-1:0] div_n,   // division ratio N; 0 and 1 both mean bypass
  output logic           clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N_W-1:0] cnt;
  logic           div_q;
  logic           bypass;

  assign bypass = (div_n < N_W'(2));

  always_ff @(posedge clk_in or negedge rst_n)
    if (!rst_n) begin
      cnt   <= '0;
      div_q <= 1'b0;
    end else if (bypass) begin
      cnt   <= '0;
      div_q <= 1'b0;
    end else begin
      cnt   <= (cnt >= div_n - N_W'(1)) ? '0 : cnt + N_W'(1);
      // high while the next count is below N/2
      div_q <= ((cnt >= div_n - N_W'(1)) ? N_W'(0) : cnt + N_W'(1)) < (div_n >> 1);
    end

  assign clk_out = bypass ? clk_in : div_q;
endmodule
