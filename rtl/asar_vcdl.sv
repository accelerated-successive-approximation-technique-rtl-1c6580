`timescale 1ns/1fs
// asar_vcdl: BEHAVIOURAL MODEL (not synthesizable) of the voltage-controlled
// delay line that turns the DAC voltages into a time difference.
//
// The line is a chain of STAGES current-starved inverters. Odd stages are
// limited by an NMOS whose gate is vctl_p (a higher voltage gives more
// current, less delay); even stages by a PMOS whose gate is vctl_n (a higher
// voltage gives less current, more delay). The total delay therefore falls
// as vctl_p - vctl_n rises. A second output, tap, leaves the line after its
// first TAP_STAGES stages; the auxiliary phase detectors compare it with the
// full delay of the other line. Stage count, tap position and the
// odd/even arrangement follow the document.
//
// The delay law is this model's own, as the document gives only transistor
// sizes and measured results:
//   NMOS stage: T0 * exp(-(vctl_p - VMID)/VS)
//   PMOS stage: T0 * exp(+(vctl_n - VMID)/VS)
// with the exponent clamped to +-3.5 so that a line never takes longer than
// about 330 ns (a third of a 1 us clock period). For two lines driven with
// opposite differential voltages x, the full line beats the two-stage tap of
// the other line when x > VS * ln(STAGES/TAP_STAGES); VS = 42.5 mV puts that
// point at about 70 LSB, the typical corner of the document's measurements.
//
// Timing: the line launches on the rising edge of clk_bar (falling edge of
// the conversion clock); out and tap rise after the line and tap delays and
// fall back as soon as clk_bar falls. Delays use the control voltages at
// the launch instant. The file uses a 1 fs time precision: near a decision
// level the two lines differ by about 0.1 ps per 0.001 LSB of input, so a
// 1 ps grid would blur the decisions by about 0.01 LSB.
module asar_vcdl #(
  parameter int unsigned STAGES     = 10,
  parameter int unsigned TAP_STAGES = 2,
  parameter real         T0_NS      = 1.0,
  parameter real         VS         = 0.0425,
  parameter real         VMID       = 0.25
) (
  input  real  vctl_p,
  input  real  vctl_n,
  input  logic clk_bar,
  output logic out,
  output logic tap
);

  localparam real XMAX = 3.5;

  function automatic real clamp(input real v);
    return (v > XMAX) ? XMAX : ((v < -XMAX) ? -XMAX : v);
  endfunction

  // Delay of the first k stages (stage 1 is NMOS-limited).
  function automatic real line_delay(input int unsigned k, input real vp, input real vn);
    real tn = T0_NS * $exp(clamp(-(vp - VMID) / VS));
    real tp = T0_NS * $exp(clamp((vn - VMID) / VS));
    return real'((k + 1) / 2) * tn + real'(k / 2) * tp;
  endfunction

  real d_out, d_tap;

  initial begin
    out = 1'b0;
    tap = 1'b0;
  end

  always @(clk_bar) begin
    if (clk_bar) begin
      d_out = line_delay(STAGES, vctl_p, vctl_n);
      d_tap = line_delay(TAP_STAGES, vctl_p, vctl_n);
      fork
        begin
          #(d_tap);
          if (clk_bar) tap = 1'b1;
        end
        begin
          #(d_out);
          if (clk_bar) out = 1'b1;
        end
      join_none
    end else begin
      out = 1'b0;
      tap = 1'b0;
    end
  end

endmodule
