`timescale 1ns/1ps
// asar_dac_switch_ctrl: gate drive for the switches of the differential
// split-capacitor DAC.
//
// Every capacitor has three switches: a transmission gate to its input
// (V_in+ or V_in-), a PMOS to VDD and an NMOS to GND. A fourth switch, the
// equalization switch (ES), shorts the two top-plate nodes while sampling.
// During sampling (S0 = 1) the input gates and ES are on and the VDD/GND
// switches off. During conversion bit i of the SAR code D sets the bottom
// plate of capacitor i: in the V_in+ array D_i = 1 connects VDD and D_i = 0
// connects GND; the V_in- array gets the complement. The gate equations are
// the document's switch table:
//   PMOS (VDD) gate, V_in+ array: S0 + ~D     V_in- array: S0 + D
//   NMOS (GND) gate, V_in+ array: ~S0 . ~D    V_in- array: ~S0 . D
// A PMOS conducts with its gate low, an NMOS with its gate high. Driving ES
// from S0 as well is this design's choice; the small extra delay by which
// the document opens ES before the input gates is analog timing and is left
// to the switch drivers.
//
// Interface: s0 (sampling phase), d[N-1:0] (SAR code, MSB = d[N-1]); outputs
// are gate levels, one bit per capacitor. Purely combinational.
module asar_dac_switch_ctrl #(
  parameter int unsigned N = 10
) (
  input  logic         s0,
  input  logic [N-1:0] d,
  output logic         vin_tg_n_gate,     // NMOS of every input transmission gate
  output logic         vin_tg_p_gate,     // PMOS of every input transmission gate
  output logic         es_n_gate,         // NMOS of the equalization switch
  output logic         es_p_gate,         // PMOS of the equalization switch
  output logic [N-1:0] pos_vdd_gate,      // V_in+ array, PMOS to VDD (low = on)
  output logic [N-1:0] pos_gnd_gate,      // V_in+ array, NMOS to GND (high = on)
  output logic [N-1:0] neg_vdd_gate,      // V_in- array, PMOS to VDD (low = on)
  output logic [N-1:0] neg_gnd_gate       // V_in- array, NMOS to GND (high = on)
);

  always_comb begin
    vin_tg_n_gate = s0;
    vin_tg_p_gate = ~s0;
    es_n_gate     = s0;
    es_p_gate     = ~s0;
    pos_vdd_gate  = {N{s0}} | ~d;
    pos_gnd_gate  = ~{N{s0}} & ~d;
    neg_vdd_gate  = {N{s0}} | d;
    neg_gnd_gate  = ~{N{s0}} & d;
  end

endmodule
