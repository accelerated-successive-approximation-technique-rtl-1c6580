`timescale 1ns/1ps
// tb_asar_split_cap_dac: the DAC model against hand calculations.
//
// 1. The 60 mV example (V_in+ = 0.28 V, V_in- = 0.22 V) run as a conventional
//    10-cycle SAR: the node voltages of every cycle are compared, within
//    2 mV, with the calculated values published for this example, and the
//    comparator decision (1 when V_DAC+ < V_DAC-) with the published
//    decisions 1 0 0 0 1 1 1 1 0 0.
// 2. Random inputs and codes: exact charge-conservation formula
//    V = V_CM - V_in + VDD * code / 1023, and the held input must not follow
//    the live input after sampling.
module tb_asar_split_cap_dac;
  localparam int N = 10;
  localparam real VDD = 0.5;
  real vin_p = 0.28, vin_n = 0.22, vdac_p, vdac_n;
  logic s0 = 1'b1;
  logic [N-1:0] d = '0;
  int checks = 0, failures = 0;

  // gate levels as the switch controller produces them
  logic [N-1:0] pvdd, pgnd, nvdd, ngnd;
  assign pvdd = {N{s0}} | ~d;
  assign pgnd = ~{N{s0}} & ~d;
  assign nvdd = {N{s0}} | d;
  assign ngnd = ~{N{s0}} & d;

  asar_split_cap_dac #(.N(N), .VDD(VDD)) dut (
    .vin_p(vin_p), .vin_n(vin_n), .vin_tg_n_gate(s0), .es_n_gate(s0),
    .pos_vdd_gate(pvdd), .pos_gnd_gate(pgnd), .neg_vdd_gate(nvdd), .neg_gnd_gate(ngnd),
    .vdac_p(vdac_p), .vdac_n(vdac_n));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real calc_p[10] = '{0.2207, 0.344, 0.282, 0.2516, 0.2362, 0.2439, 0.2478, 0.2497, 0.2507, 0.2502};
  real calc_n[10] = '{0.2788, 0.155, 0.217, 0.2479, 0.2634, 0.2557, 0.2518, 0.2499, 0.2489, 0.2494};
  bit  comp[10]   = '{1, 0, 0, 0, 1, 1, 1, 1, 0, 0};

  initial begin
    logic [N-1:0] code;
    #10;
    chk(absr(vdac_p - 0.25) < 1e-9 && absr(vdac_n - 0.25) < 1e-9, "equalized at V_CM while sampling");
    s0 = 0;
    #1 vin_p = 0.4; vin_n = 0.1;   // input moves after sampling: must be ignored
    code = '0;
    for (int k = 0; k < N; k++) begin
      bit c;
      d = code | (N'(1) << (N - 1 - k));
      #10;
      chk(absr(vdac_p - calc_p[k]) < 0.002, $sformatf("cycle %0d V_DAC+ %f, calculated %f", k + 1, vdac_p, calc_p[k]));
      chk(absr(vdac_n - calc_n[k]) < 0.002, $sformatf("cycle %0d V_DAC- %f, calculated %f", k + 1, vdac_n, calc_n[k]));
      c = (vdac_p < vdac_n);
      chk(c == comp[k], $sformatf("cycle %0d decision %0d", k + 1, c));
      if (c) code = d;
    end
    chk(code == 10'b1000111100, $sformatf("final code %b", code));

    for (int t = 0; t < 500; t++) begin
      automatic real vp = real'($urandom_range(0, 500000)) / 1e6;
      automatic real vn = real'($urandom_range(0, 500000)) / 1e6;
      automatic logic [N-1:0] dc = N'($urandom);
      real cm, ep, en;
      s0 = 1; vin_p = vp; vin_n = vn; #5;
      cm = (vp + vn) / 2.0;
      chk(absr(vdac_p - cm) < 1e-9 && absr(vdac_n - cm) < 1e-9, "sampling node at V_CM");
      s0 = 0; #1 vin_p = 0.0; vin_n = 0.5; d = dc; #5;
      ep = cm - vp + VDD * real'(dc) / 1023.0;
      en = cm - vn + VDD * real'(~dc) / 1023.0;
      chk(absr(vdac_p - ep) < 1e-9 && absr(vdac_n - en) < 1e-9,
          $sformatf("code %0d: %f/%f expected %f/%f", dc, vdac_p, vdac_n, ep, en));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
