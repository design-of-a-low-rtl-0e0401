`timescale 1ns / 1fs
// Digital core of the low-jitter DPLL with a low-frequency reference.
//
// The loop multiplies a 1 MHz reference by DIV = 1024.  A bang-bang phase
// detector compares the reference with the divided output.  Its decision
// feeds two paths that are kept apart so that the detector's coarse
// quantization does not reach the output through the proportional gain:
//  * integral path: K_I-scaled decisions are accumulated (dlf) and the word
//    drives the digital phase accumulator (dpa), which rotates through the
//    phases of VCO1 under delta-sigma control; the sub-PLL (outside this
//    core) multiplies the DPA output by 4 and filters its phase noise; the
//    sub-PLL clock is the DPLL output;
//  * proportional path: K_PPhi times the same accumulator word is applied as
//    a phase offset to the sub-PLL phases by the phase shifter (vcps), whose
//    output only feeds the divider back to the detector.
// A frequency-locked loop (fll_ctrl) first trims VCO1 through its DAC to
// REF * FLL_DIV, and the same code is the sub-PLL's coarse control.
//
// The block structure follows the document; the gains, the FLL ratio, the
// sub-PLL ratio and the clock-domain handling are this design's choice (see
// each block).  Clock domains: ref_clk (loop filter, detectors, FLL
// accumulator), VCO1/8 (FLL modulator), DPA output/8 (DPA), output/8 (VCPS),
// output (feedback divider).  rst_n is asynchronous, active low.
// clk_out is sub_phi[0] passed straight through: the output is the sub-PLL
// clock itself, brought out of the core so that it sits beside vcps_out.
module dpll_core
  import dpll_pkg::*;
#(
  parameter int unsigned DIV      = 1024,
  parameter int unsigned FLL_DIV  = 256,
  parameter int unsigned N_PHASE  = 4,
  parameter int unsigned SCK_DIV  = 8,
  parameter int unsigned DSM_IN_W = 14,
  parameter int unsigned DSM_INT_W= 18,
  parameter int unsigned K_I_SH   = 2,
  parameter int          K_P      = 4,
  parameter int unsigned PW       = 12,
  parameter int unsigned DAC_W    = 10,
  parameter int unsigned FRAC_W   = 13,
  parameter int unsigned K_F_SH   = 11,
  parameter int unsigned DAC_INIT = 512
) (
  input  logic                       ref_clk,
  input  logic                       rst_n,
  input  logic [N_PHASE-1:0]         vco1_phi,   // from the DCO (VCO1)
  input  logic [N_PHASE-1:0]         sub_phi,    // from the sub-PLL VCO
  output logic [DAC_W-1:0]           dac_code,   // to the DAC / sub-PLL coarse
  output logic                       dpa_out,    // to the sub-PLL input
  output logic                       clk_out,    // DPLL output (sub-PLL clock)
  output logic                       vcps_out,   // phase-shifted feedback clock
  output logic                       fb_clk,     // divided feedback
  output logic signed [1:0]          bb_err,
  output logic signed [DSM_IN_W-1:0] dlf_acc,
  output logic signed [PW-1:0]       prop,
  output step_t                      dpa_step,
  output step_t                      vcps_step,
  output logic                       dpa_sck,
  output logic                       vcps_sck,
  output logic signed [$clog2(FLL_DIV)-1:0] fd_err
);
  logic                          early, bb_valid;
  logic [$clog2(DIV)-1:0]        div_cnt, div_gray;
  logic [$clog2(N_PHASE)-1:0]    dpa_ptr;
  logic signed [PW-1:0]          vcps_applied;

  assign clk_out = sub_phi[0];
  logic [DAC_W+FRAC_W-1:0]       fll_acc;

  bbpd u_bbpd (
    .ref_clk, .rst_n, .fb_clk, .early_ref(early), .valid(bb_valid), .err(bb_err));

  dlf #(.W(DSM_IN_W), .K_I_SH(K_I_SH), .K_P(K_P), .P_SH(K_I_SH), .PW(PW)) u_dlf (
    .ref_clk, .rst_n, .err(bb_err), .acc(dlf_acc), .prop);

  dpa #(.N(N_PHASE), .W(DSM_IN_W), .INT_W(DSM_INT_W), .SCK_DIV(SCK_DIV)) u_dpa (
    .ref_clk, .rst_n, .word(dlf_acc), .phi(vco1_phi), .phi_out(dpa_out),
    .sck(dpa_sck), .step(dpa_step), .ptr(dpa_ptr));

  vcps #(.N(N_PHASE), .PW(PW), .SCK_DIV(SCK_DIV)) u_vcps (
    .ref_clk, .rst_n, .offset(prop), .phi(sub_phi), .phi_out(vcps_out),
    .sck(vcps_sck), .step(vcps_step), .applied(vcps_applied));

  clk_divider #(.DIV(DIV)) u_fbdiv (
    .clk_in(vcps_out), .rst_n, .clk_out(fb_clk), .count(div_cnt), .count_gray(div_gray));

  fll_ctrl #(.FLL_DIV(FLL_DIV), .DAC_W(DAC_W), .FRAC_W(FRAC_W), .K_F_SH(K_F_SH),
             .INIT(DAC_INIT), .SCK_DIV(SCK_DIV)) u_fll (
    .ref_clk, .rst_n, .vco_clk(vco1_phi[0]), .dac_code, .fd_err, .acc(fll_acc));
endmodule
