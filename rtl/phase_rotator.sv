`timescale 1ns / 1fs
// Phase rotator: a circular shift register holding a one-hot phase pointer.
//
// Cell j (S[j], j = 1..N, stored here as s[j-1]) is a 3:1 multiplexer in
// front of a flip-flop clocked by SCK.  The multiplexer takes S[j-1] for a
// step code of -1, S[j] for 0 and S[j+1] for +1, indices wrapping around the
// ring.  Seen as the word S[N:1], a -1 shifts the contents left and a +1
// shifts them right, so the position of the single 1 integrates the
// delta-sigma modulator output: this register is the accumulator of the
// digital phase accumulator, in the phase domain.  Cell structure, the three
// step values and the active-low reset R follow the document; reset to
// S[1] = 1 and the one-hot step encoding are this design's choice.
//
// Timing: the pointer moves on the SCK edge that samples the step code.
// ptr gives the binary index (0 = S[1]) of the 1 for observers.
module phase_rotator
  import dpll_pkg::*;
#(
  parameter int unsigned N = 4        // number of phases (document figure: 4)
) (
  input  logic                 sck,
  input  logic                 r_n,   // R, active low
  input  step_t                step,
  output logic [N-1:0]         s,     // s[k] is S[k+1]
  output logic [$clog2(N)-1:0] ptr
);
  always_ff @(posedge sck or negedge r_n) begin
    if (!r_n) begin
      s <= N'(1);
    end else begin
      for (int k = 0; k < N; k++) begin
        unique case (step)
          STEP_M1:   s[k] <= s[(k + N - 1) % N];
          STEP_P1:   s[k] <= s[(k + 1) % N];
          default:   s[k] <= s[k];
        endcase
      end
    end
  end

  always_comb begin
    ptr = '0;
    for (int k = 0; k < N; k++)
      if (s[k]) ptr = ($clog2(N))'(k);
  end
endmodule
