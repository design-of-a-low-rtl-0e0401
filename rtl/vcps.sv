`timescale 1ns / 1fs
// Phase shifter of the proportional path (VCPS).
//
// The proportional path of this DPLL works in the phase domain: instead of
// adding K_P times the loop-filter word to an oscillator control, it shifts
// the phase of the feedback clock by that many rotator steps of T/N, where T
// is the period of the sub-PLL clock.  The target offset arrives from the
// reference domain; in the SCK domain a small controller compares it with
// the offset already applied (modulo 2**PW, the rotator being circular) and
// issues one -1 or +1 step per SCK cycle until they agree (-1 advances the
// output, matching the integral path).  Its output goes only to the
// feedback divider; the DPLL output is taken before it.  A phase
// rotator and a phase multiplexer, the same circuits as in the DPA, apply the
// steps to the sub-PLL phases.  Document: "by using phase rotator, we can
// implement the phase-domain proportional path", reusing the rotator and
// multiplexer, and a phase-shifter output that dithers with the bang-bang
// decisions.  This design's choice: the step controller and its one step per
// SCK cycle.
//
// Timing: a new target is reached |target - applied| SCK cycles after it is
// seen, plus two SCK cycles of pipeline (rotator, bank load); it is seen
// three to four SCK cycles after the falling reference edge that follows
// the change.
module vcps
  import dpll_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned PW      = 12,  // width of the offset word
  parameter int unsigned SCK_DIV = 8
) (
  input  logic                 ref_clk,
  input  logic                 rst_n,
  input  logic signed [PW-1:0] offset,  // K_P * e, reference domain
  input  logic [N-1:0]         phi,     // sub-PLL phases
  output logic                 phi_out,
  output logic                 sck,
  output step_t                step,
  output logic signed [PW-1:0] applied
);
  logic signed [PW-1:0] target, diff;
  logic [N-1:0]         s;
  logic [$clog2(N)-1:0] ptr;
  logic                 s_odd;
  logic [$clog2(SCK_DIV)-1:0] sck_cnt, sck_gray;

  clk_divider #(.DIV(SCK_DIV)) u_sck (
    .clk_in(phi_out), .rst_n, .clk_out(sck), .count(sck_cnt), .count_gray(sck_gray));

  cdc_word #(.W(PW)) u_cdc (
    .src_clk(ref_clk), .src_rst_n(rst_n), .load(1'b1), .src_data(offset),
    .dst_clk(sck), .dst_rst_n(rst_n), .dst_data(target));

  always_comb diff = target - applied;

  always_ff @(posedge sck or negedge rst_n) begin
    if (!rst_n) begin
      applied <= '0;
      step    <= STEP_ZERO;
    end else if (diff > 0) begin
      applied <= applied + PW'(1);
      step    <= STEP_M1;
    end else if (diff < 0) begin
      applied <= applied - PW'(1);
      step    <= STEP_P1;
    end else begin
      step    <= STEP_ZERO;
    end
  end

  phase_rotator #(.N(N)) u_rot (
    .sck, .r_n(rst_n), .step, .s, .ptr);

  phase_mux #(.N(N)) u_mux (
    .sck, .rst_n, .s, .phi, .phi_out, .s_odd);
endmodule
