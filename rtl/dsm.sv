`timescale 1ns / 1fs
// Second-order error-feedback delta-sigma modulator with a 3-level quantizer.
//
// The input word x (IN_W bits, signed) is a fraction of one quantizer step
// D = 2**(IN_W-1): the long-run mean of the output level equals x / D.  Each
// clock the loop forms
//     v[n]   = x[n] + 2*e[n-1] - e[n-2]
//     q[n]   = +1 if v >= D/2, -1 if v < -D/2, else 0
//     e[n]   = v[n] - q[n]*D
// so that q = x/D - (1 - z^-1)^2 * e/D: the quantization error is fed back
// through a loop filter made of two delay elements and shaped to high
// frequencies.  The structure, the 3-level quantizer, the 14-bit input and
// the 18-bit internal arithmetic follow the document; the scaling of the
// input to the quantizer step and the saturation of v at the internal width
// are this design's choice.
//
// Timing: one output level per clock, registered; the level produced from
// x[n] appears after the clock edge that samples x[n].  The document clocks
// this block at one eighth of the phase-selector rate.
module dsm
  import dpll_pkg::*;
#(
  parameter int unsigned IN_W  = 14,   // input word width (document: 14)
  parameter int unsigned INT_W = 18    // internal arithmetic width (document: 18)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] x,
  output logic signed [1:0]      level,  // -1, 0, +1
  output step_t                  step    // same decision as a one-hot code
);
  localparam logic signed [INT_W-1:0] D     = INT_W'(2**(IN_W-1));
  localparam logic signed [INT_W-1:0] HALF  = INT_W'(2**(IN_W-2));
  localparam logic signed [INT_W+1:0] VMAX  = (INT_W+2)'(2**(INT_W-1) - 1);
  localparam logic signed [INT_W+1:0] VMIN  = -(INT_W+2)'(2**(INT_W-1));

  logic signed [INT_W-1:0] e1, e2;     // e[n-1], e[n-2]
  logic signed [INT_W+1:0] v_wide;
  logic signed [INT_W-1:0] v, e;
  logic signed [1:0]       q;

  always_comb begin
    v_wide = (INT_W+2)'(x) + ((INT_W+2)'(e1) <<< 1) - (INT_W+2)'(e2);
    if (v_wide > VMAX)      v = VMAX[INT_W-1:0];
    else if (v_wide < VMIN) v = VMIN[INT_W-1:0];
    else                    v = v_wide[INT_W-1:0];
    if (v >= HALF)          q = 2'sd1;
    else if (v < -HALF)     q = -2'sd1;
    else                    q = 2'sd0;
    e = v - (q == 2'sd1 ? D : (q == -2'sd1 ? -D : '0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1    <= '0;
      e2    <= '0;
      level <= 2'sd0;
    end else begin
      e1    <= e;
      e2    <= e1;
      level <= q;
    end
  end

  assign step = level_to_step(level);
endmodule
