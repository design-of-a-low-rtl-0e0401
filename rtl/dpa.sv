`timescale 1ns / 1fs
// Digital phase accumulator (DPA): the integral path of the DPLL acting on
// the phases of VCO1 in place of a digitally controlled oscillator.
//
// The loop-filter word (reference clock domain) is carried into the SCK
// domain and fed, negated, to the second-order delta-sigma modulator.  Its
// -1/0/+1 output rotates the one-hot pointer of the phase rotator, and the
// phase multiplexer selects the VCO1 phase the pointer names.  The pointer
// position is the accumulated phase, so the word sets a frequency offset:
// every -1 step moves the output to the next, earlier phase (T/N sooner) and
// every +1 step to the previous, later one.  With SCK = phi_out / SCK_DIV the
// output frequency is f_vco * (1 + mean_steps / (N * SCK_DIV)), where
// mean_steps = word / 2**(W-1) is the negated modulator mean.
//
// Document: accumulator, modulator, rotator and multiplexer chain, 14-bit
// modulator input, modulator clock at one eighth of the selector rate, and
// "accumulator output increases -> DSM output -1 -> frequency of the DPA
// increases".  This design's choice: the negation that gives that sign, the
// phase numbering (PHI(k+1) leads PHI(k) by T/N, so that a -1 step advances
// the output) and the synchronizer between the clock domains.
//
// Timing: a new word is taken on the next falling reference edge and reaches
// the modulator within four SCK cycles after that; a
// modulator decision moves the pointer one SCK later and the output one SCK
// after that.
module dpa
  import dpll_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned W       = 14,
  parameter int unsigned INT_W   = 18,
  parameter int unsigned SCK_DIV = 8
) (
  input  logic                ref_clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] word,     // reference-domain integral word
  input  logic [N-1:0]        phi,      // VCO1 phases
  output logic                phi_out,
  output logic                sck,
  output step_t               step,
  output logic [$clog2(N)-1:0] ptr
);
  logic signed [W-1:0] word_s, x;
  logic signed [1:0]   lvl;
  logic [N-1:0]        s;
  logic                s_odd;
  logic [$clog2(SCK_DIV)-1:0] sck_cnt, sck_gray;

  clk_divider #(.DIV(SCK_DIV)) u_sck (
    .clk_in(phi_out), .rst_n, .clk_out(sck), .count(sck_cnt), .count_gray(sck_gray));

  cdc_word #(.W(W)) u_cdc (
    .src_clk(ref_clk), .src_rst_n(rst_n), .load(1'b1), .src_data(word),
    .dst_clk(sck), .dst_rst_n(rst_n), .dst_data(word_s));

  // Negate with saturation so that the most negative word stays in range.
  always_comb x = (word_s == W'(2**(W-1))) ? W'(2**(W-1) - 1) : -word_s;

  dsm #(.IN_W(W), .INT_W(INT_W)) u_dsm (
    .clk(sck), .rst_n, .x(x), .level(lvl), .step(step));

  phase_rotator #(.N(N)) u_rot (
    .sck, .r_n(rst_n), .step, .s, .ptr);

  phase_mux #(.N(N)) u_mux (
    .sck, .rst_n, .s, .phi, .phi_out, .s_odd);
endmodule
