`timescale 1ns/1ps
// asar_digital: the complete digital logic of the A-SAR converter.
//
// A conventional SAR ADC moves one bound of its search interval per cycle.
// Here two auxiliary phase detectors tell, besides the main comparison
// against the trial level D, whether the input lies more than A codes above
// or below D. With that the logic can move both bounds at once, or one bound
// further than half way, and often finishes in fewer than N cycles.
//
// Per frame of N+1 clocks (token S0..SN from asar_phase_sr):
//   S0       sampling: DAC switches connect the inputs (asar_dac_switch_ctrl);
//            LB/UB still hold the last result; at the edge that ends S0 they
//            are set to 0 and all ones.
//   S1..SN   conversion: D = asar_code_update(LB, UB) drives the DAC; the
//            analog front end returns {P_A+, P_M, P_A-} before the next edge;
//            asar_case_decode makes S1/S2 and the LB/UB update circuits load
//            the new bounds at the edge, until LB = UB.
//   DONE     high once LB = UB, until the bounds are re-initialised.
//   O_EN     one-cycle strobe; dout loads LB at the end of it.
// Each conversion cycle moves at least one bound past D, so the interval
// always fits in a smaller aligned block and N cycles always suffice.
//
// Interface: phase-detector inputs are sampled on the rising edge of clk;
// DAC gate outputs follow the registers combinationally. Grouping all the
// digital blocks in one module is this design's choice.
module asar_digital
  import asar_pkg::*;
#(
  parameter int unsigned N      = ADC_BITS,
  parameter int unsigned A_CODE = A_DEFAULT,
  parameter int unsigned B_CODE = B_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  // phase detectors
  input  logic         pa_pos,
  input  logic         pm,
  input  logic         pa_neg,
  // DAC switch gates
  output logic         vin_tg_n_gate,
  output logic         vin_tg_p_gate,
  output logic         es_n_gate,
  output logic         es_p_gate,
  output logic [N-1:0] pos_vdd_gate,
  output logic [N-1:0] pos_gnd_gate,
  output logic [N-1:0] neg_vdd_gate,
  output logic [N-1:0] neg_gnd_gate,
  // results
  output logic [N-1:0] dout,
  output logic         o_en,
  output logic         done,
  // observation
  output logic [N-1:0] sar_code,
  output logic [N:0]   phase,
  output logic [N-1:0] lb,
  output logic [N-1:0] ub,
  output logic         pd_invalid,
  output bound_case_e  bound_kind,
  output logic         g1,
  output logic         g2
);

  logic        s1, s2, c_out, init, upd;
  logic [N-1:0] lb_next, ub_next;

  asar_phase_sr #(.N(N)) u_phase (.clk(clk), .rst_n(rst_n), .s(phase));

  asar_case_decode u_case (
    .pa_pos(pa_pos), .pm(pm), .pa_neg(pa_neg),
    .s1(s1), .s2(s2), .kind(bound_kind), .invalid(pd_invalid)
  );

  asar_code_update #(.N(N)) u_code (.lb(lb), .ub(ub), .d(sar_code), .c_out(c_out));

  always_comb begin
    init = phase[0];
    upd  = ~phase[0] & c_out;
  end

  asar_lb_update #(.N(N), .A_CODE(A_CODE), .B_CODE(B_CODE)) u_lb (
    .clk(clk), .rst_n(rst_n), .init(init), .upd(upd), .s1(s1), .s2(s2),
    .d(sar_code), .ub(ub), .lb(lb), .lb_next(lb_next), .g1(g1)
  );

  asar_ub_update #(.N(N), .A_CODE(A_CODE), .B_CODE(B_CODE)) u_ub (
    .clk(clk), .rst_n(rst_n), .init(init), .upd(upd), .s1(s1), .s2(s2),
    .d(sar_code), .lb(lb), .ub(ub), .ub_next(ub_next), .g2(g2)
  );

  asar_output_reg #(.N(N)) u_out (
    .clk(clk), .rst_n(rst_n), .c_out(c_out), .lb(lb),
    .dout(dout), .o_en(o_en), .done(done)
  );

  asar_dac_switch_ctrl #(.N(N)) u_sw (
    .s0(phase[0]), .d(sar_code),
    .vin_tg_n_gate(vin_tg_n_gate), .vin_tg_p_gate(vin_tg_p_gate),
    .es_n_gate(es_n_gate), .es_p_gate(es_p_gate),
    .pos_vdd_gate(pos_vdd_gate), .pos_gnd_gate(pos_gnd_gate),
    .neg_vdd_gate(neg_vdd_gate), .neg_gnd_gate(neg_gnd_gate)
  );

  // A bound update must never cross the other bound (the interval always
  // holds the input when the phase detectors are consistent).
  a_no_cross: assert property (@(posedge clk) disable iff (!rst_n)
    (upd && !pd_invalid) |-> (lb_next <= ub_next))
    else $error("bounds crossed: LB=%0d UB=%0d", lb_next, ub_next);

endmodule
