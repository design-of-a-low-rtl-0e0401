`timescale 1ns / 1fs
// Phase multiplexer with phase-switching control and glitch-free retimer.
//
// The N clock phases are split into an odd bank (PHI1, PHI3, ...) and an even
// bank (PHI2, PHI4, ...), each with its own multiplexer and its own select
// register (the ODD and EVEN controls).  Because the phase rotator moves its
// one-hot pointer by at most one place per SCK cycle, every move lands in the
// other bank.  On each SCK edge the bank that will hold the new phase loads
// its select from the rotator contents S[N:1] while the other bank keeps
// driving the output, and the bank flag S_ODD/S_EVEN is updated.  The retimer
// then hands the output over to the flagged bank only while both bank outputs
// are low, so the output never shows a short pulse: moving to an earlier phase
// shortens one period by T/N and moving to a later phase stretches one period
// by T/N.
//
// Document: odd/even banks, EVEN/ODD select signals loaded from S[2,4] and
// S[1,3], a retimer steered by S_ODD/S_EVEN, SCK-clocked control.  This
// design's choice: the bank flag is taken from the pointer parity instead of
// a toggle flip-flop, and the retimer is a level-sensitive latch that is open
// only while both bank outputs are low (the document does not give the
// retimer's insides).  The latch is intended; it is the retimer.
//
// Timing: SCK must be generated from the rising edge of phi_out (as the
// document's SCK, phi_out divided by 8), so that bank loads happen while the
// active bank is high.  The selected phase reaches phi_out at the first
// both-low window after the SCK edge that loads it, one SCK after the rotator
// moved.
module phase_mux #(
  parameter int unsigned N = 4           // number of phases, even
) (
  input  logic         sck,
  input  logic         rst_n,
  input  logic [N-1:0] s,                // rotator contents, s[k] = S[k+1]
  input  logic [N-1:0] phi,              // phi[k] = PHI(k+1)
  output logic         phi_out,
  output logic         s_odd             // S_ODD/S_EVEN: 1 = odd bank wanted
);
  localparam int unsigned H = N / 2;

  logic [H-1:0] odd_sel, even_sel;       // one-hot bank selects
  logic [H-1:0] s_oddb, s_evenb, phi_oddb, phi_evenb;
  logic         phi_odd, phi_even, sel_q;

  always_comb begin
    for (int i = 0; i < H; i++) begin
      s_oddb[i]    = s[2*i];             // S1, S3, ...
      s_evenb[i]   = s[2*i+1];           // S2, S4, ...
      phi_oddb[i]  = phi[2*i];
      phi_evenb[i] = phi[2*i+1];
    end
  end

  // Phase-switching control: load the bank that receives the pointer.
  always_ff @(posedge sck or negedge rst_n) begin
    if (!rst_n) begin
      odd_sel  <= H'(1);
      even_sel <= H'(1);
      s_odd    <= 1'b1;
    end else if (|s_oddb) begin
      odd_sel  <= s_oddb;
      s_odd    <= 1'b1;
    end else if (|s_evenb) begin
      even_sel <= s_evenb;
      s_odd    <= 1'b0;
    end
  end

  // Bank multiplexers.
  assign phi_odd  = |(odd_sel & phi_oddb);
  assign phi_even = |(even_sel & phi_evenb);

  // Retimer: change banks only while both bank outputs are low.
  always_latch begin
    if (!rst_n)                    sel_q = 1'b1;
    else if (!phi_odd && !phi_even) sel_q = s_odd;
  end

  assign phi_out = sel_q ? phi_odd : phi_even;
endmodule
