// Top of the low-jitter DPLL: digital core plus behavioural models of the
// analog parts, so that the whole loop can be simulated.
//
// dpll_core holds all synthesizable logic.  dco_model stands for the FLL's
// DAC and closed-loop VCO (VCO1, about 256 MHz, N_PHASE phases) and
// sub_pll_model for the charge-pump sub-PLL that multiplies the DPA output by
// SUB_MULT (to about 1.024 GHz) with about 1 MHz bandwidth.  The output clk_out
// is the sub-PLL clock; vcps_out, the same clock shifted by the proportional
// path, is what the feedback divider sees.  With the defaults the loop locks
// to 1 MHz * 1024 = 1.024 GHz.  This top is for simulation: the two models use
// delays and real numbers.  Synthesize dpll_core and replace the models by
// the analog macros.
`timescale 1ns / 1fs
module dpll_top
  import dpll_pkg::*;
#(
  parameter int unsigned DIV      = 1024,
  parameter int unsigned FLL_DIV  = 256,
  parameter int unsigned N_PHASE  = 4,
  parameter int unsigned SUB_MULT = 4,
  parameter int unsigned DAC_W    = 10,
  parameter int unsigned K_I_SH   = 2,
  parameter int          K_P      = 4,
  parameter real         F_MIN    = 180.0e6,
  parameter real         F_LSB    = 125.0e3
) (
  input  logic                 ref_clk,
  input  logic                 rst_n,
  output logic                 clk_out,
  output logic                 vcps_out,
  output logic                 fb_clk,
  output logic [DAC_W-1:0]     dac_code,
  output logic signed [1:0]    bb_err,
  output logic signed [13:0]   dlf_acc,
  output logic signed [11:0]   prop,
  output step_t                dpa_step,
  output step_t                vcps_step,
  output logic                 dpa_sck,
  output logic                 vcps_sck,
  output logic                 dpa_out,
  output logic signed [$clog2(FLL_DIV)-1:0] fd_err
);
  logic [N_PHASE-1:0] vco1_phi, sub_phi;

  dpll_core #(.DIV(DIV), .FLL_DIV(FLL_DIV), .N_PHASE(N_PHASE), .DAC_W(DAC_W),
              .K_I_SH(K_I_SH), .K_P(K_P), .DSM_IN_W(14), .PW(14 - K_I_SH)) u_core (
    .ref_clk, .rst_n, .vco1_phi, .sub_phi, .dac_code, .dpa_out, .clk_out, .vcps_out, .fb_clk,
    .bb_err, .dlf_acc, .prop, .dpa_step, .vcps_step, .dpa_sck, .vcps_sck, .fd_err);

  dco_model #(.N(N_PHASE), .DAC_W(DAC_W), .F_MIN(F_MIN), .F_LSB(F_LSB)) u_vco1 (
    .code(dac_code), .phi(vco1_phi));

  sub_pll_model #(.N(N_PHASE), .MULT(SUB_MULT), .DAC_W(DAC_W), .F_MIN(F_MIN),
                  .F_LSB(F_LSB)) u_subpll (
    .clk_in(dpa_out), .coarse(dac_code), .phi(sub_phi));
endmodule
