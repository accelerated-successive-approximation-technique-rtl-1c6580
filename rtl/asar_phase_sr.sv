`timescale 1ns/1ps
// asar_phase_sr: the (N+1)-bit phase shift register of the A-SAR ADC.
//
// A single 1 (the token) travels along S0..SN, one position per clock. S0
// marks the sampling phase, in which the capacitor arrays track the input;
// S1..SN mark the N conversion cycles. As in the document, an N-bit
// converter uses an (N+1)-bit register (11 bits for N = 10). The token
// wrapping from SN back to S0, which makes every conversion frame exactly
// N+1 clocks long, is this design's choice: the A-SAR logic may finish a
// conversion early, but the frame (and so the sample rate) stays fixed.
//
// Interface: clk (the conversion clock), rst_n (asynchronous, active low;
// puts the token in S0), s[N:0] the phase outputs.
// Timing: s changes on the rising clock edge; exactly one bit is ever high.
module asar_phase_sr #(
  parameter int unsigned N = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [N:0] s
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= (N+1)'(1);
    else        s <= {s[N-1:0], s[N]};
  end

  // The token must never be lost or duplicated.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(s))
    else $error("phase token not one-hot: %b", s);

endmodule
