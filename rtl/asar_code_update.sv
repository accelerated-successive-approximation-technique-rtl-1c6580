`timescale 1ns/1ps
// asar_code_update: digital code update circuit, which picks the next trial
// code D from the current bounds LB and UB.
//
// The circuit is a chain of N identical cells from the MSB down. Cell i
// computes C_i = (UB_i xor LB_i) or C_(i+1): C_i is 1 from the first bit
// where the bounds differ onwards. Its code bit is
//   D_i = UB_i  when C_i = 0          (still in the common prefix)
//   D_i = 1     when C_i = 1, C_(i+1) = 0   (first differing bit)
//   D_i = 0     when C_i = 1, C_(i+1) = 1   (below it)
// So D is the common prefix of LB and UB followed by 1 0 0 ... 0, the split
// point of the aligned block that holds the whole interval; with LB = 0 and
// UB = all ones it is 100...0, the first trial of a conventional SAR. The
// last cell's output C_0 is 0 exactly when LB = UB, i.e. when the conversion
// has finished; the output register uses its inverse.
//
// Purely combinational.
module asar_code_update #(
  parameter int unsigned N = 10
) (
  input  logic [N-1:0] lb,
  input  logic [N-1:0] ub,
  output logic [N-1:0] d,
  output logic         c_out
);

  logic [N:0] c;  // c[N] is the chain input, tied to 0

  always_comb begin
    c[N] = 1'b0;
    for (int i = N-1; i >= 0; i--) begin
      c[i] = (ub[i] ^ lb[i]) | c[i+1];
      d[i] = c[i] ? ~c[i+1] : ub[i];
    end
    c_out = c[0];
  end

endmodule
