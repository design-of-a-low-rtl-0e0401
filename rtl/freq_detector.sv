`timescale 1ns / 1fs
// Frequency detector of the frequency-locked loop.
//
// The FLL divider counts VCO cycles and offers its count in Gray code.  On
// every reference rising edge this block samples that count through two
// synchronizing flip-flops, converts it to binary and subtracts the previous
// sample.  With a divider of DIV = 2**W, a VCO exactly on frequency advances
// the count by DIV per reference period, which is 0 modulo 2**W, so the
// signed W-bit difference is directly the frequency error in VCO cycles per
// reference period (positive: VCO too fast).  One count is 1/DIV of the
// target, about 1000 ppm at DIV = 1024 and 3900 ppm at DIV = 256; the
// counter keeps the remainder, so the error averages out over periods.  The
// document names the frequency detector and its purpose (bring the VCO within
// 1000 ppm of the target) but not its insides; the counter-sampling method
// is this design's choice.
//
// Timing: err is updated every reference edge and describes the period that
// ended two reference edges earlier (synchronizer latency); valid (and a
// non-zero err) starts on the fourth reference edge after reset.
module freq_detector #(
  parameter int unsigned W = 8
) (
  input  logic                ref_clk,
  input  logic                rst_n,
  input  logic [W-1:0]        count_gray,   // from the VCO clock domain
  output logic signed [W-1:0] err,
  output logic                valid
);
  logic [W-1:0] s1, s2, bin, prev;
  logic [1:0]   seen;

  always_comb begin
    bin[W-1] = s2[W-1];
    for (int i = W - 2; i >= 0; i--) bin[i] = bin[i+1] ^ s2[i];
  end

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      s1    <= '0;
      s2    <= '0;
      prev  <= '0;
      err   <= '0;
      seen  <= '0;
      valid <= 1'b0;
    end else begin
      s1   <= count_gray;
      s2   <= s1;
      prev <= bin;
      if (seen != 2'd3) seen <= seen + 2'd1;
      valid <= (seen == 2'd3);
      err   <= (seen == 2'd3) ? signed'(bin - prev) : '0;
    end
  end
endmodule
