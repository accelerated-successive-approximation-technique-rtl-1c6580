`timescale 1ns/1ps
// asar_phase_detector: BEHAVIOURAL MODEL (not synthesizable) of the binary
// phase detector that compares the arrival of two rising edges.
//
// In the circuit two cross-coupled inverters, enabled by the inputs
// themselves, decide which input rose first, and a NAND latch holds the
// decision while both inputs are low. The model does the same: out goes to
// 1 when in_p rises while in_n is still low, to 0 when in_n rises while
// in_p is still low, and holds otherwise. Offset and metastability are not
// modelled (the document treats the detector as offset-free); the initial
// state 0 is this model's choice.
//
// Timing: out changes at the first of the two rising edges and stays until
// the next decision.
module asar_phase_detector (
  input  logic in_p,
  input  logic in_n,
  output logic out,
  output logic out_b
);

  initial out = 1'b0;

  always @(posedge in_p or posedge in_n) begin
    if (in_p && !in_n)      out <= 1'b1;
    else if (in_n && !in_p) out <= 1'b0;
  end

  assign out_b = ~out;

endmodule
