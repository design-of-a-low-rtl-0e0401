// Behavioural model, not synthesizable: DAC plus closed-loop VCO (VCO1).
//
// The FLL's digitally controlled oscillator is a DAC driving a ring VCO that
// is embedded in a voltage-mode feedback loop: a switched-capacitor
// frequency-to-current converter and an integrator force
// F_OUT = V_CTRL / (V_REF * R * C_S), so the frequency is linear in the
// control voltage and hence in the DAC code.  This model keeps that static
// relation, f = F_MIN + code * F_LSB, and the loop's first-order response
// to its control input with the loop bandwidth F_BW (3 MHz by default, the
// document's figure for the closed-loop VCO): at every phase step the
// frequency moves towards the target by 1 - exp(-2*pi*F_BW*dt).  This also
// smooths the delta-sigma dither of the DAC code.  It produces N equally
// spaced phases of 50 % duty cycle.  PHI(k+1) leads PHI(k) by T/N (phi[k+1] is
// phi[k] one step earlier), the numbering the phase selectors assume.
// Noise and the analog circuit (converter, integrator, ring) are not
// modelled.
// F_MIN and F_LSB are this design's choice (the document gives a VCO of about
// 3 GHz/V and an integrator swing of 0.25 V to 0.73 V, but no DAC); the
// defaults centre 256 MHz near code 608 of a 10-bit DAC.
//
// Timing: a code change starts to move the frequency at the next phase step
// (T/N) and settles with a time constant of 1 / (2*pi*F_BW), about 53 ns.
`timescale 1ns / 1fs
module dco_model #(
  parameter int unsigned N     = 4,
  parameter int unsigned DAC_W = 10,
  parameter real         F_MIN = 180.0e6,
  parameter real         F_LSB = 125.0e3,
  parameter real         F_BW  = 3.0e6     // closed-loop VCO bandwidth, Hz
) (
  input  logic [DAC_W-1:0] code,
  output logic [N-1:0]     phi
);
  int unsigned m;
  real         f_hz;      // present frequency, Hz
  real         f_tgt;     // frequency the code asks for, Hz
  real         dt;        // length of the present phase step, s

  always_comb f_tgt = F_MIN + real'(code) * F_LSB;

  initial begin
    m    = 0;
    phi  = '0;
    f_hz = F_MIN + real'(code) * F_LSB;
    forever begin
      for (int k = 0; k < N; k++)
        phi[k] = (((m + k) % N) < N / 2);
      dt = 1.0 / (f_hz * real'(N));
      #(dt * 1.0e9);
      f_hz = f_hz + (f_tgt - f_hz) * (1.0 - $exp(-2.0 * 3.14159265358979 * F_BW * dt));
      m = (m + 1) % N;
    end
  end
endmodule
