`timescale 1ns / 1fs
// Digital loop filter of the DPLL (integral path and proportional word).
//
// Every reference cycle the bang-bang error e (+1/-1, 0 before the first
// decision) is scaled by K_I = 2**K_I_SH and added to a saturating
// accumulator.  The accumulator is the frequency word: it drives the digital
// phase accumulator (DPA), whose own phase accumulation is the second
// integrator of the loop.  The proportional branch is taken from the same
// accumulator output, across the DPA accumulator, and scaled by K_PPhi:
// prop = K_P * (acc >>> P_SH) rotator steps of phase offset.  With the
// defaults (P_SH = K_I_SH) one detector decision moves the offset by K_P
// steps (four quarter periods, one output period), so the loop phase is
// K_PPhi * sum(e) + sum(sum(e)), a type-II loop whose proportional part
// acts on phase.  The branch points follow the document's block diagram;
// the gains are not given there and are parameters; saturation is this
// design's choice.
//
// Timing: acc and prop update on the reference edge after err is presented.
// With K_P a power of two (4 by default) the low log2(K_P) bits of prop are
// always zero; synthesis reports them as constant outputs, as intended.
module dlf #(
  parameter int unsigned W       = 14,  // DSM input width (document: 14 bits)
  parameter int unsigned K_I_SH  = 2,   // integral gain 2**K_I_SH LSB per cycle
  parameter int          K_P     = 4,   // proportional phase gain
  parameter int unsigned P_SH    = 2,   // acc LSBs per rotator step = 2**P_SH
  parameter int unsigned PW      = W - P_SH  // width of the phase word
) (
  input  logic                 ref_clk,
  input  logic                 rst_n,
  input  logic signed [1:0]    err,
  output logic signed [W-1:0]  acc,
  output logic signed [PW-1:0] prop
);
  localparam logic signed [W:0] MAXV = (W+1)'(2**(W-1) - 1);
  localparam logic signed [W:0] MINV = -(W+1)'(2**(W-1));

  logic signed [W:0] sum;
  always_comb sum = (W+1)'(acc) + ((W+1)'(err) <<< K_I_SH);

  logic signed [W-1:0] acc_sh;
  always_comb acc_sh = acc >>> P_SH;
  always_comb prop = PW'(K_P * int'(acc_sh));

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
    end else begin
      if (sum > MAXV)      acc <= MAXV[W-1:0];
      else if (sum < MINV) acc <= MINV[W-1:0];
      else                 acc <= sum[W-1:0];
    end
  end
endmodule
