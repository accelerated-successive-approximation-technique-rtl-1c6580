`timescale 1ns/1ps
// asar_case_decode: turns the three phase-detector outputs into the two
// control signals of the bound update circuits.
//
// P_M is the main detector (input at or above the trial level D). P_A+ is 1
// when the input is clearly above D + A, P_A- is 0 when it is clearly below
// D - A. Only four patterns can occur, and the document encodes them as
//   S1 = P_A- . (~P_M + P_A+)        S2 = P_M . P_A-
//   {P_A+,P_M,P_A-} = 111 -> S1S2 = 11  raise LB only (aggressively)
//                     000 -> 00         lower UB only (aggressively)
//                     011 -> 01         raise LB to D, maybe lower UB
//                     001 -> 10         lower UB to D-1, maybe raise LB
// The `invalid` flag, set for the other four patterns, is this design's
// addition; it only observes and changes nothing.
//
// Purely combinational.
module asar_case_decode
  import asar_pkg::*;
(
  input  logic        pa_pos,   // P_A+
  input  logic        pm,       // P_M
  input  logic        pa_neg,   // P_A-
  output logic        s1,
  output logic        s2,
  output bound_case_e kind,
  output logic        invalid
);

  always_comb begin
    s1      = pa_neg & (~pm | pa_pos);
    s2      = pm & pa_neg;
    kind    = bound_case_e'({s1, s2});
    unique case ({pa_pos, pm, pa_neg})
      3'b111, 3'b000, 3'b011, 3'b001: invalid = 1'b0;
      default:                        invalid = 1'b1;
    endcase
  end

endmodule
