`timescale 1ns/1ps
// asar_split_cap_dac: BEHAVIOURAL MODEL (not synthesizable) of the
// differential charge-scaling DAC with split capacitor arrays.
//
// Each side (V_in+ and V_in-) is a 5-bit MSB array (Cu..16Cu on the output
// node) and a 5-bit LSB array (Cu..16Cu) joined by an attenuation capacitor
// Cs = Cu, with Cu = 10 fF. During sampling the bottom plates are connected
// to the inputs and the equalization switch shorts the two top nodes, which
// settle at the input common mode V_CM. When the input switches open, the
// charge C_tot*(V_CM - V_in) is trapped on each top node. During conversion
// each bottom plate goes to VDD or GND, and charge conservation gives
//   V_DAC = V_CM - V_in_sampled + VDD * W / (2^N - 1)
// where W is the binary weight of the capacitors tied to VDD. With Cs = Cu
// the equivalent weights of the split array sum to 2^N - 1 units, not 2^N,
// which is where the 2^N - 1 comes from. This follows the document's
// charge-conservation equations; capacitor mismatch, parasitics, settling
// and switch leakage are not modelled.
//
// Ports mirror the switch network: one input gate level for the sampling
// transmission gates, the equalization switch gate, and a PMOS (to VDD,
// low = on) and NMOS (to GND, high = on) gate per capacitor and array.
// Voltages are in volts. The input is captured at the falling edge of the
// sampling gate; outputs follow the switch gates with no delay.
module asar_split_cap_dac #(
  parameter int unsigned N   = 10,
  parameter real         VDD = 0.5
) (
  input  real          vin_p,
  input  real          vin_n,
  input  logic         vin_tg_n_gate,
  input  logic         es_n_gate,
  input  logic [N-1:0] pos_vdd_gate,
  input  logic [N-1:0] pos_gnd_gate,
  input  logic [N-1:0] neg_vdd_gate,
  input  logic [N-1:0] neg_gnd_gate,
  output real          vdac_p,
  output real          vdac_n
);

  localparam real FULL = real'((2 ** N) - 1);

  real vin_p_s, vin_n_s, vcm_s;

  initial begin
    vin_p_s = 0.0;
    vin_n_s = 0.0;
    vcm_s   = VDD / 2.0;
  end

  // End of the sampling phase: the input gates open and the charge is held.
  always @(negedge vin_tg_n_gate) begin
    vin_p_s <= vin_p;
    vin_n_s <= vin_n;
    vcm_s   <= (vin_p + vin_n) / 2.0;
  end

  // Bottom-plate weight tied to VDD on each side.
  function automatic real weight(input logic [N-1:0] vdd_on);
    real w = 0.0;
    for (int i = 0; i < N; i++) if (vdd_on[i]) w += real'(2 ** i);
    return w;
  endfunction

  always_comb begin
    if (es_n_gate) begin
      vdac_p = (vin_p + vin_n) / 2.0;
      vdac_n = (vin_p + vin_n) / 2.0;
    end else begin
      vdac_p = vcm_s - vin_p_s + VDD * weight(~pos_vdd_gate) / FULL;
      vdac_n = vcm_s - vin_n_s + VDD * weight(~neg_vdd_gate) / FULL;
    end
  end

  // A bottom plate must never see its VDD and GND switches on together.
  always @(pos_vdd_gate or pos_gnd_gate or neg_vdd_gate or neg_gnd_gate) begin
    assert (((~pos_vdd_gate) & pos_gnd_gate) == '0 && ((~neg_vdd_gate) & neg_gnd_gate) == '0)
      else $error("DAC switch shoot-through");
  end

endmodule
