`timescale 1ns/1ps
// tb_asar_vcdl: two delay lines driven with opposite differential control
// voltages x, as in the converter.
// Checks: the measured line and tap delays equal the stage-delay law of the
// model; the full delay falls as x rises; the full line of one beats the
// two-stage tap of the other only above the auxiliary threshold
// (VS * ln 5, about 70 LSB with the defaults), checked at 65 and 75 LSB;
// outputs return low when clk_bar falls.
module tb_asar_vcdl;
  localparam real VS = 0.0425, T0 = 1.0, VMID = 0.25;
  localparam real LSB = 1.0 / 1023.0;
  real vp, vn;
  logic clk_bar = 1'b0;
  logic a_out, a_tap, b_out, b_tap;
  int checks = 0, failures = 0;

  asar_vcdl u_a (.vctl_p(vp), .vctl_n(vn), .clk_bar(clk_bar), .out(a_out), .tap(a_tap));
  asar_vcdl u_b (.vctl_p(vn), .vctl_n(vp), .clk_bar(clk_bar), .out(b_out), .tap(b_tap));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real clampx(real v);
    return (v > 3.5) ? 3.5 : ((v < -3.5) ? -3.5 : v);
  endfunction

  real t_a_out, t_a_tap, t_b_out, t_b_tap, t0;
  always @(posedge a_out) t_a_out = $realtime - t0;
  always @(posedge a_tap) t_a_tap = $realtime - t0;
  always @(posedge b_out) t_b_out = $realtime - t0;
  always @(posedge b_tap) t_b_tap = $realtime - t0;

  task automatic fire(real x);
    vp = VMID + x / 2.0;
    vn = VMID - x / 2.0;
    t_a_out = -1; t_a_tap = -1; t_b_out = -1; t_b_tap = -1;
    #10;
    t0 = $realtime;
    clk_bar = 1'b1;
    #500;
    clk_bar = 1'b0;
    #1;
    chk(!a_out && !a_tap && !b_out && !b_tap, "outputs reset when clk_bar falls");
    #100;
  endtask

  initial begin
    real prev = 1e9;
    for (int i = -40; i <= 40; i++) begin
      automatic real x = real'(i) * 0.01;
      real ea, eb;
      fire(x);
      ea = 5.0 * T0 * ($exp(clampx(-(x / 2.0) / VS)) + $exp(clampx(-(x / 2.0) / VS)));
      eb = 5.0 * T0 * ($exp(clampx((x / 2.0) / VS)) + $exp(clampx((x / 2.0) / VS)));
      chk(absr(t_a_out - ea) < 0.01, $sformatf("x=%f line delay %f expected %f", x, t_a_out, ea));
      chk(absr(t_b_out - eb) < 0.01, $sformatf("x=%f mirrored line delay %f expected %f", x, t_b_out, eb));
      chk(absr(t_a_tap - ea / 5.0) < 0.01, $sformatf("x=%f tap delay %f expected %f", x, t_a_tap, ea / 5.0));
      chk(t_a_out < prev + 1e-9, "delay falls as x rises");
      prev = t_a_out;
    end
    fire(65.0 * LSB);
    chk(t_a_out > t_b_tap, "65 LSB: full line slower than the other line's tap");
    fire(75.0 * LSB);
    chk(t_a_out < t_b_tap, "75 LSB: full line faster than the other line's tap");
    fire(-65.0 * LSB);
    chk(t_a_tap < t_b_out, "-65 LSB: tap faster than the other full line");
    fire(-75.0 * LSB);
    chk(t_a_tap > t_b_out, "-75 LSB: tap slower than the other full line");
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
