`timescale 1ns / 1fs
// Digital part of the frequency-locked loop that tunes VCO1.
//
// VCO1 is divided by FLL_DIV; the frequency detector turns the divider count
// into a frequency error in VCO cycles per reference period.  The error,
// scaled by K_F = 2**K_F_SH / 2**FRAC_W DAC LSB per cycle, is subtracted from
// an accumulator that holds the DAC code with FRAC_W fraction bits.  The
// integer part drives the DAC directly; the fraction goes, re-centred around
// zero, to a delta-sigma modulator clocked by VCO1/8 whose -1/0/+1 output is
// added to the DAC code, so the DAC's average output carries the fraction.
// The chain FD - K_F - accumulator - DSM - DAC follows the document; the
// widths, the gain, the reset code and the re-centring are this design's
// choice (the document gives none of them).
//
// Timing: the accumulator updates once per reference period; the new word
// reaches the modulator within four VCO1/8 cycles after the next falling
// reference edge.  dac_code changes every VCO1/8 cycle by the modulator
// dither.
module fll_ctrl #(
  parameter int unsigned FLL_DIV  = 256,
  parameter int unsigned DAC_W    = 10,
  parameter int unsigned FRAC_W   = 13,
  parameter int unsigned K_F_SH   = 11,
  parameter int unsigned INIT     = 512,      // DAC code after reset
  parameter int unsigned SCK_DIV  = 8,
  parameter int unsigned FW       = $clog2(FLL_DIV)
) (
  input  logic               ref_clk,
  input  logic               rst_n,
  input  logic               vco_clk,         // one phase of VCO1
  output logic [DAC_W-1:0]   dac_code,
  output logic signed [FW-1:0] fd_err,
  output logic [DAC_W+FRAC_W-1:0] acc
);
  localparam int unsigned AW = DAC_W + FRAC_W;
  localparam logic signed [AW+1:0] AMAX = (AW+2)'(2**AW - 1);

  logic               fb_clk;
  logic [FW-1:0]      cnt, cnt_gray;
  logic               fd_valid;
  logic signed [AW+1:0] nxt;
  logic               sck;
  logic [AW-1:0]      acc_s;
  logic signed [FRAC_W:0] frac_c;
  logic signed [1:0]  lvl;
  logic signed [DAC_W+1:0] code_w;
  logic [$clog2(SCK_DIV)-1:0] sck_cnt, sck_gray;

  clk_divider #(.DIV(FLL_DIV)) u_div (
    .clk_in(vco_clk), .rst_n, .clk_out(fb_clk), .count(cnt), .count_gray(cnt_gray));

  freq_detector #(.W(FW)) u_fd (
    .ref_clk, .rst_n, .count_gray(cnt_gray), .err(fd_err), .valid(fd_valid));

  always_comb nxt = $signed({2'b00, acc}) - ((AW+2)'(fd_err) <<< K_F_SH);

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n)              acc <= AW'(INIT) << FRAC_W;
    else if (fd_valid) begin
      if (nxt < 0)           acc <= '0;
      else if (nxt > AMAX)   acc <= AMAX[AW-1:0];
      else                   acc <= nxt[AW-1:0];
    end
  end

  clk_divider #(.DIV(SCK_DIV)) u_sck (
    .clk_in(vco_clk), .rst_n, .clk_out(sck), .count(sck_cnt), .count_gray(sck_gray));

  cdc_word #(.W(AW)) u_cdc (
    .src_clk(ref_clk), .src_rst_n(rst_n), .load(1'b1), .src_data(acc),
    .dst_clk(sck), .dst_rst_n(rst_n), .dst_data(acc_s));

  // Fraction in [0, 1) re-centred to [-1/2, 1/2) of one DAC step.
  always_comb frac_c = $signed({1'b0, acc_s[FRAC_W-1:0]}) - (FRAC_W+1)'(2**(FRAC_W-1));

  dsm #(.IN_W(FRAC_W + 1), .INT_W(FRAC_W + 5)) u_dsm (
    .clk(sck), .rst_n, .x(frac_c), .level(lvl), .step());

  always_comb begin
    code_w = $signed({2'b00, acc_s[AW-1:FRAC_W]}) + (DAC_W+2)'(lvl);
    if (code_w < 0)                             dac_code = '0;
    else if (code_w > (DAC_W+2)'(2**DAC_W - 1)) dac_code = '1;
    else                                        dac_code = code_w[DAC_W-1:0];
  end
endmodule
