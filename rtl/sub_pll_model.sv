// Behavioural model, not synthesizable: the charge-pump sub-PLL.
//
// In the DPLL the sub-PLL takes the DPA output (about 256 MHz), multiplies
// it by MULT and low-pass filters the phase noise that the delta-sigma
// modulated phase selection produces, with a bandwidth of about 1 MHz.  The
// model is a phase-locked charge-pump loop built from its parts:
//  * a tri-state phase-frequency detector: a rising input edge moves its
//    state up (towards UP), a rising edge of the divided output moves it
//    down (towards DN); UP and DN together reset at once;
//  * a charge pump of I_CP sourcing on UP and sinking on DN;
//  * a passive filter: R in series with C1 from the control node to ground,
//    and C2 from the control node to ground;
//  * a VCO with two controls: the coarse code sets the frequency
//    MULT * (F_MIN + coarse * F_LSB) at fine voltage V_LOCK, and the fine
//    control voltage adds K_VCO per volt; N output phases, PHI(k+1) leading
//    PHI(k) by T/N, as in the DCO model;
//  * a divider by MULT on phi[0] that closes the loop.
// The filter is integrated with forward-Euler steps of at most H_MAX at every
// detector and VCO event, so the charge delivered by each detector pulse is
// exact to within one step.  The fine voltage is held within 0 .. V_DD.
// Defaults: I_CP = 12 uA, R = 4 kOhm, C1 = 147 pF, C2 = 11.5 pF,
// K_VCO = 600 MHz/V, input 256 MHz and a locked fine voltage of 0.61 V are the
// document's numbers (loop bandwidth about 1 MHz, 60 degree phase margin);
// the supply V_DD = 1.2 V is its supply voltage.  This model's own choices:
// the VCO's linear coarse and fine tuning and its centring on V_LOCK, the
// ideal detector (no reset pulse, no dead zone), no noise or mismatch.
//
// Timing: until the first input edge the detector is idle and the VCO runs
// at the coarse frequency.  A
// step of the input frequency or phase settles in a few microseconds.  The
// filter state and the detector are updated with blocking assignments in
// edge-triggered processes; lint reports this, and it is intended in a model
// that is only simulated.
`timescale 1ns / 1fs
module sub_pll_model #(
  parameter int unsigned N      = 4,
  parameter int unsigned MULT   = 4,
  parameter int unsigned DAC_W  = 10,
  parameter real         F_MIN  = 180.0e6,
  parameter real         F_LSB  = 125.0e3,
  parameter real         I_CP   = 12.0e-6,    // A
  parameter real         R      = 4.0e3,      // Ohm
  parameter real         C1     = 147.0e-12,  // F
  parameter real         C2     = 11.5e-12,   // F
  parameter real         K_VCO  = 600.0e6,    // Hz/V
  parameter real         V_LOCK = 0.61,       // V, fine voltage at the coarse frequency
  parameter real         V_DD   = 1.2,        // V
  parameter real         H_MAX  = 0.1         // ns, largest integration step
) (
  input  logic             clk_in,
  input  logic [DAC_W-1:0] coarse,
  output logic [N-1:0]     phi
);
  real     vc;            // control (fine) voltage on C2, V
  real     v1;            // voltage on C1, V
  realtime t_upd;         // time the filter state refers to, ns
  int      pd;            // detector state: +1 UP, -1 DN, 0 idle
  int      div_cnt;
  bit      started;       // an input edge has been seen
  int unsigned m;

  // Bring the filter state up to time t (ns) with the present pump current.
  function automatic void advance(input realtime t);
    real dt, h, i_cp, i_r;
    int  n;
    dt = (t - t_upd) * 1.0e-9;
    if (dt > 0.0) begin
      n = int'($ceil(dt / (H_MAX * 1.0e-9)));
      if (n < 1) n = 1;
      h = dt / real'(n);
      i_cp = real'(pd) * I_CP;
      for (int i = 0; i < n; i++) begin
        i_r = (vc - v1) / R;
        vc  = vc + h * (i_cp - i_r) / C2;
        v1  = v1 + h * i_r / C1;
      end
      if (vc < 0.0)  vc = 0.0;
      if (vc > V_DD) vc = V_DD;
    end
    t_upd = t;
  endfunction

  initial begin
    vc      = V_LOCK;
    v1      = V_LOCK;
    t_upd   = 0.0;
    pd      = 0;
    div_cnt = 0;
    started = 1'b0;
  end

  // Detector: input edge.
  always @(posedge clk_in) begin
    advance($realtime);
    started = 1'b1;
    if (pd < 1) pd = pd + 1;
  end

  // VCO, output divider and the detector's divided-clock edge.
  initial begin
    real f;
    m   = 0;
    phi = '0;
    forever begin
      for (int k = 0; k < N; k++)
        phi[k] = (((m + k) % N) < N / 2);
      advance($realtime);
      if (m == 0) begin
        div_cnt = div_cnt + 1;
        if (div_cnt == int'(MULT)) begin
          div_cnt = 0;
          if (started && pd > -1) pd = pd - 1;
        end
      end
      f = real'(MULT) * (F_MIN + real'(coarse) * F_LSB) + K_VCO * (vc - V_LOCK);
      if (f < 1.0e6) f = 1.0e6;
      #(1.0e9 / (f * real'(N)));
      m = (m + 1) % N;
    end
  end
endmodule
