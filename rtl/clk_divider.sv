`timescale 1ns / 1fs
// Frequency divider by DIV, built as a synchronous counter.
//
// The feedback divider of the DPLL divides the output by 1024 (ten
// flip-flop stages in the document).  Here a counter runs from 0 to DIV-1 on
// every rising edge of clk_in; clk_out is registered and is high for counts
// DIV/2 .. DIV-1, so it is a 50 % square wave (for even DIV) whose rising
// edge follows the clk_in edge that takes the count to DIV/2.  The counter is
// also given out in Gray code (registered), for a frequency detector in
// another clock domain to sample; Gray wrap-around is only exact for DIV a
// power of two.  The ratio follows the document; the counter form, the duty
// cycle and the Gray output are this design's choice (the document's ripple
// divider of true single-phase clocked flip-flops is a circuit choice that
// does not change the function).
module clk_divider #(
  parameter int unsigned DIV = 1024,
  parameter int unsigned W   = (DIV > 1) ? $clog2(DIV) : 1
) (
  input  logic         clk_in,
  input  logic         rst_n,
  output logic         clk_out,
  output logic [W-1:0] count,
  output logic [W-1:0] count_gray
);
  logic [W-1:0] nxt;
  always_comb nxt = (count == W'(DIV - 1)) ? '0 : count + W'(1);

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      count      <= '0;
      count_gray <= '0;
      clk_out    <= 1'b0;
    end else begin
      count      <= nxt;
      count_gray <= nxt ^ (nxt >> 1);
      clk_out    <= (nxt >= W'(DIV / 2));
    end
  end
endmodule
