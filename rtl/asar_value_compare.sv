`timescale 1ns/1ps
// asar_value_compare: the "X < Y ?" block of the bound update circuits.
//
// It subtracts Y from X and returns the sign (borrow) of the difference:
// g = 1 when X < Y. X is the output of the bound adder and may be negative
// (D - A, D - A - B) or exceed the N-bit range (D + A + B), so X is a W-bit
// two's complement number. The document widens its 11-bit subtractor by one
// bit for exactly this reason; here X and Y are both held as W-bit signed
// values and the subtraction is done one bit wider still, so that it can
// never overflow.
//
// Purely combinational.
module asar_value_compare #(
  parameter int unsigned W = 12
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic                g
);

  logic signed [W:0] diff;

  always_comb begin
    diff = (W+1)'(x) - (W+1)'(y);
    g    = diff[W];
  end

endmodule
