`timescale 1ns / 1fs
// Shared types and constants of the low-jitter digital PLL.
//
// The 3-level delta-sigma modulator output ("DSM_OUT", three wires in the
// phase-rotator schematic) is carried as a one-hot code: one wire each for
// the -1, 0 and +1 decisions.  The one-hot encoding is this design's choice;
// the three levels and the three-wire width follow the document.
package dpll_pkg;

  // One-hot step code of the phase rotator.
  typedef enum logic [2:0] {
    STEP_M1   = 3'b001,   // -1 : S[j] <= S[j-1]  (contents shift left in S[N:1])
    STEP_ZERO = 3'b010,   //  0 : hold
    STEP_P1   = 3'b100    // +1 : S[j] <= S[j+1]  (contents shift right)
  } step_t;

  // Map a signed quantizer level (-1, 0, +1) to the one-hot step code.
  function automatic step_t level_to_step(input logic signed [1:0] lvl);
    if (lvl > 0)      return STEP_P1;
    else if (lvl < 0) return STEP_M1;
    else              return STEP_ZERO;
  endfunction

  // Signed level of a step code (illegal codes read as 0).
  function automatic logic signed [1:0] step_to_level(input step_t s);
    case (s)
      STEP_P1: return 2'sd1;
      STEP_M1: return -2'sd1;
      default: return 2'sd0;
    endcase
  endfunction

endpackage
