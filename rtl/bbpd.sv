`timescale 1ns / 1fs
// Bang-bang phase detector: the 1-bit time-to-digital converter of the DPLL.
//
// A single D flip-flop clocked by the reference samples the divided feedback
// clock.  If the feedback clock is still low at the reference rising edge, the
// reference leads (feedback late): early_ref = 1 and err = +1, asking for a
// higher frequency.  If the feedback is already high, the feedback leads:
// early_ref = 0 and err = -1.  The flip-flop structure follows the document;
// the +1/-1 sign convention and the reset are this design's choice.
//
// Timing: err and early_ref change one reference edge after the sample, and
// hold for one reference period.  rst_n is asynchronous, active low; after
// reset err reads 0 until the first sample.
module bbpd (
  input  logic              ref_clk,
  input  logic              rst_n,
  input  logic              fb_clk,
  output logic              early_ref,  // 1: reference leads the feedback
  output logic              valid,      // a decision has been taken since reset
  output logic signed [1:0] err         // +1 reference leads, -1 feedback leads
);
  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      early_ref <= 1'b0;
      valid     <= 1'b0;
    end else begin
      early_ref <= ~fb_clk;
      valid     <= 1'b1;
    end
  end

  assign err = !valid ? 2'sd0 : (early_ref ? 2'sd1 : -2'sd1);
endmodule
