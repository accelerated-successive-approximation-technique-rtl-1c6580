`timescale 1ns/1ps
// tb_asar_adc: end-to-end test of the complete A-SAR ADC at its default
// parameters (10 bits, A = 62, B = 34, 0.5 V, 1 MHz clock).
//
// Stimulus, in order:
//   1. the 60 mV differential example (0.28 V / 0.22 V): code 1000111100,
//      found in 8 conversion cycles; the trial codes are checked one by one;
//   2. both rails, zero and codes just around the first auxiliary threshold;
//   3. 200 random differential inputs over the full range;
//   4. 1024 samples of a full-scale sine with f_in/f_s = 137/1024, the
//      workload of the conversion-cycle statistics; the histogram of cycles
//      per conversion is printed, and the SNDR and ENOB of the 1024 codes are
//      computed with a DFT (the ideal analog models must reach the 10-bit
//      quantization limit, about 62 dB).
// Every result is compared with the ideal transfer and with the cycle count
// of an independent reference model (asar_ref_pkg). The test also counts how
// often each mechanism of the bound logic was used and fails if one never
// happened. A watchdog ends the run if it stalls.
module tb_asar_adc;
  import asar_ref_pkg::*;

  localparam int unsigned N      = 10;
  localparam real         VDD    = 0.5;
  localparam int unsigned A      = 62;
  localparam int unsigned B      = 34;
  localparam real         T_LSB  = 0.0425 * $ln(5.0) / (2.0 * VDD / 1023.0);
  localparam real         PERIOD = 1000.0;  // ns, 1 MHz

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin_p = 0.25, vin_n = 0.25;
  logic [N-1:0] dout, sar_code;
  logic o_en, done;
  logic [N:0] phase;
  logic [2:0] pd_out;

  asar_adc dut (.clk(clk), .rst_n(rst_n), .vin_p(vin_p), .vin_n(vin_n), .dout(dout),
                .o_en(o_en), .done(done), .sar_code(sar_code), .phase(phase), .pd_out(pd_out));

  always #(PERIOD / 2.0) clk = ~clk;

  int checks = 0, failures = 0;
  ref_result_t expq[$];
  int          results[$];   // every output code, in order
  real         vdq[$];
  int unsigned hist[17];
  int unsigned cyc, trace[16], nconv = 0, record_trace = 0;
  // mechanism counters
  int unsigned n_case[4], n_lb_fallback = 0, n_lb_hold = 0, n_ub_fallback = 0, n_ub_hold = 0;
  int unsigned n_early = 0, n_full = 0, n_invalid = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Monitor: counts conversion cycles, checks results.
  logic o_en_d = 1'b0;
  int   skip = 2;
  bit   stop = 0;
  always @(posedge clk) begin
    if (stop) begin
      // results after the report are not counted
    end else if (rst_n && skip > 0) begin
      if (o_en || o_en_d) skip--;
      o_en_d <= o_en;
      cyc = 0;
    end else if (rst_n) begin
      if (o_en_d) begin
        ref_result_t e;
        real vd;
        e = expq.pop_front();
        vd = vdq.pop_front();
        check(dout == N'(e.code), $sformatf("vd=%f dout=%0d expected %0d", vd, dout, e.code));
        results.push_back(int'(dout));
      end
      if (o_en) begin
        ref_result_t e;
        e = expq[0];
        check(cyc == e.cycles, $sformatf("vd=%f took %0d cycles, reference %0d", vdq[0], cyc, e.cycles));
        check(dut.u_digital.lb == N'(e.code), $sformatf("LB=%0d expected %0d", dut.u_digital.lb, e.code));
        if (record_trace != 0) begin
          for (int k = 0; k < int'(cyc); k++)
            check(trace[k] == e.trace[k], $sformatf("trial %0d: D=%0d expected %0d", k + 1, trace[k], e.trace[k]));
          record_trace = 0;
        end
        hist[cyc]++;
        nconv++;
        if (cyc < N) n_early++; else n_full++;
      end
      o_en_d <= o_en;
      if (phase[0]) cyc = 0;
      else if (!done) begin
        if (cyc < 16) trace[cyc] = sar_code;
        cyc++;
        // mechanism accounting for this conversion cycle
        n_case[dut.u_digital.bound_kind]++;
        if (dut.u_digital.pd_invalid) n_invalid++;
        case (dut.u_digital.bound_kind)
          2'b11: if (!dut.u_digital.g1) n_lb_fallback++;
          2'b10: if (dut.u_digital.g1) n_lb_hold++;
          2'b00: if (dut.u_digital.g2) n_ub_fallback++;
          2'b01: if (!dut.u_digital.g2) n_ub_hold++;
          default: ;
        endcase
      end
    end
  end

  // Apply one input during the sampling phase of the next frame.
  task automatic convert_one(real vd_in);
    real vd = nudge(vd_in);
    @(posedge clk iff phase[N]);   // last conversion cycle of the frame
    @(negedge clk);
    vin_p = VDD / 2.0 + vd / 2.0;
    vin_n = VDD / 2.0 - vd / 2.0;
    @(posedge clk);                // sampling phase begins
    expq.push_back(convert(vd, VDD, N, A, B, T_LSB));
    vdq.push_back(vd);
  endtask

  real lsb = 2.0 * VDD / 1023.0;

  // Keep inputs at least 0.02 LSB away from a code boundary and from an
  // auxiliary-detector threshold, where the model and the reference could
  // round differently.
  function automatic real nudge(real vd);
    real pos, f1, f2;
    if (vd >= VDD) vd = VDD * 0.9999;
    if (vd <= -VDD) vd = -VDD * 0.9999;
    for (int k = 0; k < 4; k++) begin
      pos = vd / lsb + 511.5;
      f1 = pos - $floor(pos);
      f2 = (pos - T_LSB) - $floor(pos - T_LSB);
      if (f1 < 0.02 || f1 > 0.98 || f2 < 0.02 || f2 > 0.98) vd += 0.05 * lsb;
    end
    return vd;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Reset leaves the token in S0; the result of the first frame is ignored.

    // 1. 60 mV example
    record_trace = 0;
    convert_one(0.06);
    record_trace = 1;
    begin
      ref_result_t e;
      e = convert(0.06, VDD, N, A, B, T_LSB);
      check(e.code == 10'b1000111100, $sformatf("reference code for 60 mV is %b", e.code));
      check(e.cycles == 8, $sformatf("reference cycles for 60 mV is %0d", e.cycles));
      check(e.trace[0] == 512 && e.trace[1] == 576 && e.trace[2] == 544 && e.trace[3] == 560 &&
            e.trace[4] == 568 && e.trace[5] == 572 && e.trace[6] == 574 && e.trace[7] == 573,
            "reference trial sequence for 60 mV");
    end
    // 2. edges
    convert_one(VDD);
    convert_one(-VDD);
    convert_one(0.0);
    convert_one(-0.0001);
    for (int k = 55; k <= 100; k += 5) begin
      convert_one(real'(k) * lsb + 0.3 * lsb);
      convert_one(-real'(k) * lsb + 0.3 * lsb);
    end
    // 3. random
    for (int i = 0; i < 200; i++)
      convert_one((real'($urandom_range(0, 1000000)) / 1000000.0 * 2.0 - 1.0) * VDD);
    // 4. sine, f_in/f_s = 137/1024, full scale
    for (int i = 0; i < 17; i++) hist[i] = 0;
    for (int i = 0; i < 1024; i++)
      convert_one(0.999 * VDD * $sin(2.0 * 3.14159265358979 * 137.0 * real'(i) / 1024.0));
    repeat (2 * (N + 1)) @(posedge clk);

    $display("sine workload, conversions by cycle count:");
    for (int i = 1; i <= 16; i++)
      if (hist[i] != 0) $display("  %2d cycles: %4d (%0.3f %%)", i, hist[i], 100.0 * real'(hist[i]) / 1024.0);
    $display("cases 00/01/10/11: %0d %0d %0d %0d; LB fallback %0d, LB hold %0d, UB fallback %0d, UB hold %0d; early %0d full %0d invalid %0d",
             n_case[0], n_case[1], n_case[2], n_case[3], n_lb_fallback, n_lb_hold, n_ub_fallback, n_ub_hold, n_early, n_full, n_invalid);
    check(expq.size() == 0, $sformatf("%0d results never arrived", expq.size()));
    // Spectrum of the 1024 sine codes: signal power in bin 137, noise and
    // distortion in all other bins except DC.
    begin
      real re, im, ps, pn, sndr;
      int  base;
      base = results.size() - 1024;
      ps = 0.0;
      pn = 0.0;
      for (int k = 1; k < 512; k++) begin
        re = 0.0;
        im = 0.0;
        for (int i = 0; i < 1024; i++) begin
          re += real'(results[base + i]) * $cos(2.0 * 3.14159265358979 * real'(k * i) / 1024.0);
          im += real'(results[base + i]) * $sin(2.0 * 3.14159265358979 * real'(k * i) / 1024.0);
        end
        if (k == 137) ps = re * re + im * im;
        else          pn += re * re + im * im;
      end
      sndr = 10.0 * $log10(ps / pn);
      $display("sine workload: SNDR %0.2f dB, ENOB %0.2f bits", sndr, (sndr - 1.76) / 6.02);
      check(sndr > 59.0, $sformatf("SNDR %0.2f dB below the 10-bit quantization limit", sndr));
    end
    for (int i = 0; i < 4; i++) check(n_case[i] > 0, $sformatf("bound case %0d never happened", i));
    // The two fallbacks (LB = D when D+A >= UB, UB = D-1 when D-A < LB) can only
    // be taken when an auxiliary threshold lies below A+1 LSB, outside the
    // modelled corners; the unit tests of the bound circuits cover them.
    check(n_lb_hold > 0, "LB hold (D-A-B < LB) never happened");
    check(n_ub_hold > 0, "UB hold (D+A+B >= UB) never happened");
    check(n_early > 0, "no conversion finished early");
    check(n_full > 0, "no conversion used all cycles");
    check(n_invalid == 0, "invalid phase-detector pattern seen");
    stop = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 20000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
