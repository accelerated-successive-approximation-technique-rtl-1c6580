`timescale 1ns/1ps
// tb_asar_adc_corners: the converter at the nine process/temperature corners
// of the delay lines.
//
// The only corner-dependent quantity in the conversion is where the
// auxiliary detectors switch: the differential input, in LSB, at which the
// two-stage tap of one delay line is as slow as the full other line. The
// corner simulations of the original circuit put it at
//            0 C   25 C   85 C
//     TT      64     70     86
//     FF      68     74     93
//     SS      63     68     82
// In the delay-line model this threshold is DELAY_VS * ln 5 (the ratio of
// 10 to 2 stages), so each of nine converters gets
// DELAY_VS = T * (2 * VDD / 1023) / ln 5. All of them keep A = 62 and B = 34,
// chosen so that every threshold lies in [A+1, A+B] = [63, 96].
// Every converter digitizes the same 300 random inputs and 256 samples of a
// full-scale sine; each result must equal the ideal code and each cycle count
// that of the reference model at that corner (a bit-true model of the bound
// rules with ideal detectors switching exactly at the threshold). The cycle histogram of every
// corner is printed.
module tb_asar_adc_corners;
  import asar_ref_pkg::*;

  localparam int unsigned N      = 10;
  localparam real         VDD    = 0.5;
  localparam int unsigned A      = 62;
  localparam int unsigned B      = 34;
  localparam real         LSB    = 2.0 * VDD / 1023.0;
  localparam real         PERIOD = 1000.0;
  localparam int          NC     = 9;
  localparam int          THR [NC] = '{64, 70, 86, 68, 74, 93, 63, 68, 82};
  localparam string       NAME[NC] = '{"TT 0C", "TT 25C", "TT 85C", "FF 0C", "FF 25C",
                                       "FF 85C", "SS 0C", "SS 25C", "SS 85C"};

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin_p = 0.25, vin_n = 0.25;
  int   checks = 0, failures = 0;
  real  vdq[$];             // applied inputs, in order
  int   nres[NC];           // results checked per corner
  int   hist[NC][17];
  bit   stop = 0;

  always #(PERIOD / 2.0) clk = ~clk;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  for (genvar c = 0; c < NC; c++) begin : g_corner
    localparam real VS = real'(THR[c]) * LSB / $ln(5.0);
    logic [N-1:0] dout, sar_code;
    logic o_en, done;
    logic [N:0] phase;
    logic [2:0] pd_out;

    asar_adc #(.DELAY_VS(VS)) dut (
      .clk(clk), .rst_n(rst_n), .vin_p(vin_p), .vin_n(vin_n), .dout(dout),
      .o_en(o_en), .done(done), .sar_code(sar_code), .phase(phase), .pd_out(pd_out));

    int unsigned cyc = 0;
    int          skip = 2;
    logic        o_en_d = 1'b0;
    ref_result_t e;

    always @(posedge clk) begin
      if (!stop && rst_n) begin
        if (skip > 0) begin
          if (o_en || o_en_d) skip--;
        end else if (nres[c] < vdq.size()) begin
          if (o_en) begin
            e = convert(vdq[nres[c]], VDD, N, A, B, real'(THR[c]));
            check(cyc == e.cycles, $sformatf("%s: input %0d took %0d cycles, reference %0d",
                                             NAME[c], nres[c], cyc, e.cycles));
            hist[c][cyc]++;
          end
          if (o_en_d) begin
            check(dout == N'(e.code), $sformatf("%s: input %0d gave %0d, expected %0d",
                                                NAME[c], nres[c], dout, e.code));
            check(dout == N'(ideal_code(vdq[nres[c]], VDD, N)),
                  $sformatf("%s: input %0d gave %0d, ideal %0d", NAME[c], nres[c], dout,
                            ideal_code(vdq[nres[c]], VDD, N)));
            nres[c]++;
          end
        end
        o_en_d <= o_en;
        if (phase[0]) cyc = 0;
        else if (!done) cyc++;
      end
    end
  end

  // Inputs sit half an LSB away from every code boundary and every threshold
  // (all thresholds are whole LSB), with a random offset of up to 0.3 LSB.
  function automatic real place(real vd);
    real pos = $floor(vd / LSB + 511.5);
    real jit = (real'($urandom_range(0, 600)) / 1000.0) - 0.3;
    if (pos < 0.0) pos = 0.0;
    if (pos > 1022.0) pos = 1022.0;
    return (pos + 0.5 + jit - 511.5) * LSB;
  endfunction

  task automatic apply(real vd_in);
    real vd = place(vd_in);
    @(posedge clk iff g_corner[0].phase[N]);
    @(negedge clk);
    vin_p = VDD / 2.0 + vd / 2.0;
    vin_n = VDD / 2.0 - vd / 2.0;
    @(posedge clk);
    vdq.push_back(vd);
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin
      nres[c] = 0;
      for (int k = 0; k < 17; k++) hist[c][k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // the frame running at reset converts the idle input and is not checked
    for (int i = 0; i < 300; i++)
      apply((real'($urandom_range(0, 1000000)) / 1000000.0 * 2.0 - 1.0) * VDD);
    for (int i = 0; i < 256; i++)
      apply(0.999 * VDD * $sin(2.0 * 3.14159265358979 * 37.0 * real'(i) / 256.0));
    repeat (3 * (N + 1)) @(posedge clk);
    stop = 1;
    for (int c = 0; c < NC; c++) begin
      string s;
      s = "";
      for (int k = 1; k <= 16; k++)
        if (hist[c][k] != 0) s = {s, $sformatf("  %0d:%0d", k, hist[c][k])};
      $display("%-7s threshold %0d LSB, cycles:count%s", NAME[c], THR[c], s);
      check(nres[c] == vdq.size(), $sformatf("%s: %0d of %0d results", NAME[c], nres[c], vdq.size()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 10000.0);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
