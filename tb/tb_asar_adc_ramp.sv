`timescale 1ns/1ps
// tb_asar_adc_ramp: static linearity of the default converter from a slow
// ramp.
//
// The differential input rises from -VDD to +VDD in equal steps, one step per
// conversion frame, so that every code is hit about nine times (9 x 1024
// conversions, 11 clock periods each, about 101 ms at 1 MHz). The output
// codes must never decrease and every code below full scale must appear.
// From the code histogram the test computes, for codes 1..1022,
//   DNL(k) = hits(k) / mean_hits - 1,   INL(k) = sum of DNL up to k,
// prints the extremes, and requires |DNL| < 0.25 LSB and |INL| < 0.5 LSB.
// With ideal analog parts the only DNL left is the +-1/9 LSB granularity of
// sampling nine points per code. Every result is also compared with the ideal
// code of the sampled input, and the cycle-count histogram is printed.
module tb_asar_adc_ramp;
  import asar_ref_pkg::*;

  localparam int unsigned N      = 10;
  localparam real         VDD    = 0.5;
  localparam real         PERIOD = 1000.0;
  localparam int          PER    = 9;
  localparam int          NS     = PER * 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin_p = 0.0, vin_n = VDD;
  logic [N-1:0] dout, sar_code;
  logic o_en, done;
  logic [N:0] phase;
  logic [2:0] pd_out;

  asar_adc dut (.clk(clk), .rst_n(rst_n), .vin_p(vin_p), .vin_n(vin_n), .dout(dout),
                .o_en(o_en), .done(done), .sar_code(sar_code), .phase(phase), .pd_out(pd_out));

  always #(PERIOD / 2.0) clk = ~clk;

  int   checks = 0, failures = 0;
  int   hits[1024];
  int   cyc_hist[17];
  real  vdq[$];
  int   nres = 0, last_code = 0;
  int   skip = 2;
  int unsigned cyc = 0;
  logic o_en_d = 1'b0;
  bit   stop = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  always @(posedge clk) begin
    if (!stop && rst_n) begin
      if (skip > 0) begin
        if (o_en || o_en_d) skip--;
      end else if (nres < vdq.size()) begin
        if (o_en) cyc_hist[cyc]++;
        if (o_en_d) begin
          check(dout == N'(ideal_code(vdq[nres], VDD, N)),
                $sformatf("ramp step %0d: %0d, ideal %0d", nres, dout, ideal_code(vdq[nres], VDD, N)));
          check(int'(dout) >= last_code, $sformatf("ramp step %0d: code fell to %0d", nres, dout));
          last_code = int'(dout);
          hits[dout]++;
          nres++;
        end
      end
      o_en_d <= o_en;
      if (phase[0]) cyc = 0;
      else if (!done) cyc++;
    end
  end

  initial begin
    real mean, dnl, inl, dmax, dmin, imax, imin;
    int  missing;
    for (int k = 0; k < 1024; k++) hits[k] = 0;
    for (int k = 0; k < 17; k++) cyc_hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      real vd;
      vd = -VDD + 2.0 * VDD * (real'(i) + 0.5) / real'(NS);
      @(posedge clk iff phase[N]);
      @(negedge clk);
      vin_p = VDD / 2.0 + vd / 2.0;
      vin_n = VDD / 2.0 - vd / 2.0;
      @(posedge clk);
      vdq.push_back(vd);
    end
    repeat (2 * (N + 1)) @(posedge clk);
    stop = 1;
    check(nres == NS, $sformatf("%0d of %0d results", nres, NS));
    missing = 0;
    for (int k = 0; k < 1023; k++) if (hits[k] == 0) missing++;
    check(missing == 0, $sformatf("%0d missing codes", missing));
    mean = 0.0;
    for (int k = 1; k < 1023; k++) mean += real'(hits[k]);
    mean = mean / 1022.0;
    inl = 0.0; dmax = -9.0; dmin = 9.0; imax = -9.0; imin = 9.0;
    for (int k = 1; k < 1023; k++) begin
      dnl = real'(hits[k]) / mean - 1.0;
      inl += dnl;
      if (dnl > dmax) dmax = dnl;
      if (dnl < dmin) dmin = dnl;
      if (inl > imax) imax = inl;
      if (inl < imin) imin = inl;
    end
    $display("ramp: %0d conversions, %0f hits per code", nres, mean);
    $display("DNL max %0.4f min %0.4f LSB, INL max %0.4f min %0.4f LSB", dmax, dmin, imax, imin);
    for (int k = 1; k <= 16; k++)
      if (cyc_hist[k] != 0) $display("  %2d cycles: %5d (%0.3f %%)", k, cyc_hist[k], 100.0 * real'(cyc_hist[k]) / real'(NS));
    check(dmax < 0.25 && dmin > -0.25, "DNL out of bounds");
    check(imax < 0.5 && imin > -0.5, "INL out of bounds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 120000.0);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
