`timescale 1ns/1ps
// asar_pkg: constants and types shared by the A-SAR (accelerated successive
// approximation) ADC logic.
//
// The converter resolves a 10-bit code. Besides the usual main phase
// detector it has two auxiliary detectors whose decision threshold lies
// somewhere inside an "enforced uncertainty band" [A, A+B] LSB away from the
// trial level. A = 62 LSB is the start of that band and B = 34 LSB its width,
// chosen to cover the 63..93 LSB spread of the detector threshold over process
// corners and temperature. Bound arithmetic is done on N+2 = 12 bits, signed,
// so that D - (A+B) below zero and D + A + B above 2^N - 1 compare correctly.
package asar_pkg;

  localparam int unsigned ADC_BITS  = 10;  // resolution N
  localparam int unsigned A_DEFAULT = 62;  // start of the enforced band, LSB
  localparam int unsigned B_DEFAULT = 34;  // width of the enforced band, LSB

  // The four phase-detector patterns the analog front end can produce,
  // named after the bound(s) they move.
  typedef enum logic [1:0] {
    CASE_LB_ONLY = 2'b11,  // {S1,S2}: P_A+ = P_M = P_A- = 1, input above D+A
    CASE_UB_ONLY = 2'b00,  // all detectors 0, input below D-A
    CASE_BOTH_UP = 2'b01,  // P_M = 1, P_A+ = 0, P_A- = 1: D <= input < D+A+B
    CASE_BOTH_DN = 2'b10   // P_M = 0, P_A+ = 0, P_A- = 1: D-A-B <= input < D
  } bound_case_e;

endpackage
