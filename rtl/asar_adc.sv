`timescale 1ns/1ps
// asar_adc: 10-bit accelerated successive-approximation (A-SAR) ADC for a
// 0.5 V supply, top level. The analog parts are BEHAVIOURAL MODELS, so this
// module as a whole simulates but does not synthesize; asar_digital is the
// synthesizable part.
//
// Signal path (voltage -> time -> bits):
//   asar_split_cap_dac   samples vin_p/vin_n and, from the trial code D,
//                        produces two node voltages whose difference is
//                        proportional to (input - level of D).
//   2 x asar_vcdl        the "top" line runs faster and the "bottom" line
//                        slower the more the input exceeds the level of D.
//   3 x asar_phase_detector
//                        P_M  : full top line vs full bottom line  (input >= D?)
//                        P_A+ : full top line vs bottom line's 2-stage tap
//                        P_A- : top line's 2-stage tap vs full bottom line
//                        The auxiliary detectors flip somewhere 63..93 LSB
//                        away from D, depending on process and temperature.
//   asar_digital         turns the three decisions into new bounds LB/UB and
//                        the next D, and raises DONE when LB = UB.
//
// The DAC as built has its node vdac_p falling as the input rises, so its
// vdac_n output drives the VCDL inputs named "+" (V_DAC+ in the A-SAR
// description) and vdac_p the "-" inputs; this keeps P_M = 1 meaning
// "input at or above D", the convention of the A-SAR algorithm.
//
// Timing: one conversion frame is N+1 periods of clk: one sampling cycle
// (phase[0]) and up to N conversion cycles. The DAC settles in the first
// half of a cycle, the delay lines are launched at the falling edge of clk,
// and the digital logic takes the detector outputs at the next rising edge.
// With the models' defaults clk may run at up to about 1.4 MHz; the
// original design samples at 100 kS/s (a 1.1 MHz clock), the testbenches
// use 1 MHz. DONE rises after the deciding cycle; dout follows one
// cycle later and holds until the next result. The code is
// floor(Vdiff / V_LSB + 2^(N-1) - 1/2) with V_LSB = 2*VDD/(2^N - 1) and
// Vdiff = vin_p - vin_n, in the rail-to-rail range -VDD..VDD.
module asar_adc
  import asar_pkg::*;
#(
  parameter int unsigned N           = ADC_BITS,
  parameter int unsigned A_CODE      = A_DEFAULT,
  parameter int unsigned B_CODE      = B_DEFAULT,
  parameter real         VDD         = 0.5,
  parameter int unsigned STAGES      = 10,
  parameter int unsigned TAP_STAGES  = 2,
  parameter real         STAGE_T0_NS = 1.0,
  parameter real         DELAY_VS    = 0.0425
) (
  input  logic         clk,
  input  logic         rst_n,
  input  real          vin_p,
  input  real          vin_n,
  output logic [N-1:0] dout,
  output logic         o_en,
  output logic         done,
  output logic [N-1:0] sar_code,
  output logic [N:0]   phase,
  output logic [2:0]   pd_out      // {P_A+, P_M, P_A-}
);

  logic         vin_tg_n_gate, vin_tg_p_gate, es_n_gate, es_p_gate;
  logic [N-1:0] pos_vdd_gate, pos_gnd_gate, neg_vdd_gate, neg_gnd_gate;
  logic [N-1:0] lb, ub;
  logic         pd_invalid, g1, g2;
  bound_case_e  bound_kind;
  real          vdac_p, vdac_n;
  logic         clk_bar;
  logic         top_out, top_tap, bot_out, bot_tap;
  logic         pm, pa_pos, pa_neg;
  logic         pm_b, pa_pos_b, pa_neg_b;

  assign clk_bar = ~clk;
  assign pd_out  = {pa_pos, pm, pa_neg};

  asar_digital #(.N(N), .A_CODE(A_CODE), .B_CODE(B_CODE)) u_digital (
    .clk(clk), .rst_n(rst_n),
    .pa_pos(pa_pos), .pm(pm), .pa_neg(pa_neg),
    .vin_tg_n_gate(vin_tg_n_gate), .vin_tg_p_gate(vin_tg_p_gate),
    .es_n_gate(es_n_gate), .es_p_gate(es_p_gate),
    .pos_vdd_gate(pos_vdd_gate), .pos_gnd_gate(pos_gnd_gate),
    .neg_vdd_gate(neg_vdd_gate), .neg_gnd_gate(neg_gnd_gate),
    .dout(dout), .o_en(o_en), .done(done),
    .sar_code(sar_code), .phase(phase), .lb(lb), .ub(ub),
    .pd_invalid(pd_invalid), .bound_kind(bound_kind), .g1(g1), .g2(g2)
  );

  asar_split_cap_dac #(.N(N), .VDD(VDD)) u_dac (
    .vin_p(vin_p), .vin_n(vin_n),
    .vin_tg_n_gate(vin_tg_n_gate), .es_n_gate(es_n_gate),
    .pos_vdd_gate(pos_vdd_gate), .pos_gnd_gate(pos_gnd_gate),
    .neg_vdd_gate(neg_vdd_gate), .neg_gnd_gate(neg_gnd_gate),
    .vdac_p(vdac_p), .vdac_n(vdac_n)
  );

  asar_vcdl #(.STAGES(STAGES), .TAP_STAGES(TAP_STAGES), .T0_NS(STAGE_T0_NS),
              .VS(DELAY_VS), .VMID(VDD / 2.0)) u_vcdl_top (
    .vctl_p(vdac_n), .vctl_n(vdac_p), .clk_bar(clk_bar), .out(top_out), .tap(top_tap)
  );

  asar_vcdl #(.STAGES(STAGES), .TAP_STAGES(TAP_STAGES), .T0_NS(STAGE_T0_NS),
              .VS(DELAY_VS), .VMID(VDD / 2.0)) u_vcdl_bot (
    .vctl_p(vdac_p), .vctl_n(vdac_n), .clk_bar(clk_bar), .out(bot_out), .tap(bot_tap)
  );

  asar_phase_detector u_pd_m   (.in_p(top_out), .in_n(bot_out), .out(pm),     .out_b(pm_b));
  asar_phase_detector u_pd_pos (.in_p(top_out), .in_n(bot_tap), .out(pa_pos), .out_b(pa_pos_b));
  asar_phase_detector u_pd_neg (.in_p(top_tap), .in_n(bot_out), .out(pa_neg), .out_b(pa_neg_b));

endmodule
