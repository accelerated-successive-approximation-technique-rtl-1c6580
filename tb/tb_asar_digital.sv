`timescale 1ns/1ps
// tb_asar_digital: the digital A-SAR logic with the phase detectors replaced
// by the testbench.
//
// Part 1, a 4-bit instance (A = 1, B = 2) driven with the detector outputs
// of the 4-bit worked example (input 0.8 LSB above mid-scale, code 1000):
//   scenario 1: cycle 1 P_A+ P_M P_A- = 011, cycle 2 = 000 -> done in 2 cycles
//   scenario 2: cycle 1 = 011, cycles 2 and 3 = 001          -> done in 3 cycles
//   with SAR/LB/UB after each cycle 1010/1000/1010, 1001/1000/1001, -/1000/1000
//   for scenario 2.
// Part 2, the 10-bit instance at its defaults: for random inputs, detectors
// answer from the true code; an auxiliary detector whose input lies inside
// its uncertainty band [A, A+B) LSB answers at random. After every cycle LB
// and UB are compared with the update rules applied by the testbench, the
// code must be found within 10 cycles, DONE/O_EN/dout must follow, and the
// DAC gates must match the trial code.
module tb_asar_digital;
  import asar_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- 4-bit instance ----------------
  logic pap4 = 0, pm4 = 0, pan4 = 0;
  logic [3:0] dout4, code4, lb4, ub4, g4a, g4b, g4c, g4d;
  logic o_en4, done4, inv4, g14, g24;
  logic [4:0] phase4;
  logic t4a, t4b, t4c, t4d;
  bound_case_e k4;

  asar_digital #(.N(4), .A_CODE(1), .B_CODE(2)) dut4 (
    .clk(clk), .rst_n(rst_n), .pa_pos(pap4), .pm(pm4), .pa_neg(pan4),
    .vin_tg_n_gate(t4a), .vin_tg_p_gate(t4b), .es_n_gate(t4c), .es_p_gate(t4d),
    .pos_vdd_gate(g4a), .pos_gnd_gate(g4b), .neg_vdd_gate(g4c), .neg_gnd_gate(g4d),
    .dout(dout4), .o_en(o_en4), .done(done4), .sar_code(code4), .phase(phase4),
    .lb(lb4), .ub(ub4), .pd_invalid(inv4), .bound_kind(k4), .g1(g14), .g2(g24));

  // ---------------- 10-bit instance ----------------
  localparam int N = 10, A = 62, B = 34;
  logic pap = 0, pm = 0, pan = 0;
  logic [N-1:0] dout, code, lb, ub, pvdd, pgnd, nvdd, ngnd;
  logic o_en, done, inv, g1, g2, tga, tgb, esa, esb;
  logic [N:0] phase;
  bound_case_e kind;

  asar_digital dut (
    .clk(clk), .rst_n(rst_n), .pa_pos(pap), .pm(pm), .pa_neg(pan),
    .vin_tg_n_gate(tga), .vin_tg_p_gate(tgb), .es_n_gate(esa), .es_p_gate(esb),
    .pos_vdd_gate(pvdd), .pos_gnd_gate(pgnd), .neg_vdd_gate(nvdd), .neg_gnd_gate(ngnd),
    .dout(dout), .o_en(o_en), .done(done), .sar_code(code), .phase(phase),
    .lb(lb), .ub(ub), .pd_invalid(inv), .bound_kind(kind), .g1(g1), .g2(g2));

  // Four-bit scenario: detector patterns per conversion cycle.
  task automatic run4(logic [2:0] pats[3], int ncyc, logic [3:0] exp_sar[3],
                      logic [3:0] exp_lb[3], logic [3:0] exp_ub[3], string name);
    @(posedge clk iff phase4[4]);   // this edge enters the sampling phase
    @(posedge clk);                 // conversion cycle 1 starts
    #1 chk(code4 == 4'b1000 && lb4 == 4'b0000 && ub4 == 4'b1111, {name, ": start"});
    for (int c = 0; c < ncyc; c++) begin
      {pap4, pm4, pan4} = pats[c];
      @(posedge clk); #1;
      chk(lb4 == exp_lb[c] && ub4 == exp_ub[c],
          $sformatf("%s cycle %0d: LB=%b UB=%b expected %b %b", name, c + 1, lb4, ub4, exp_lb[c], exp_ub[c]));
      if (c < ncyc - 1) chk(code4 == exp_sar[c], $sformatf("%s cycle %0d: SAR=%b expected %b", name, c + 1, code4, exp_sar[c]));
    end
    chk(done4 && o_en4, {name, ": DONE right after the last cycle"});
    @(posedge clk); #1;
    chk(dout4 == 4'b1000, $sformatf("%s: dout=%b", name, dout4));
  endtask

  // Reference bound update for the 10-bit part.
  int rlb, rub;
  function automatic void ref_step(logic [2:0] p, int d);
    case (p)
      3'b111: rlb = (d + A < rub) ? d + A : d;
      3'b000: rub = (d - A < rlb) ? d - 1 : d - A - 1;
      3'b011: begin rlb = d; if (d + A + B < rub) rub = d + A + B - 1; end
      default: begin rub = d - 1; if (d - A - B >= rlb) rlb = d - A - B; end
    endcase
  endfunction

  int hist[16];
  int n_rand_band = 0;

  initial begin
    logic [2:0] p1[3] = '{3'b011, 3'b000, 3'b000};
    logic [3:0] s1sar[3] = '{4'b1010, 4'b0000, 4'b0000};
    logic [3:0] s1lb[3] = '{4'b1000, 4'b1000, 4'b0000};
    logic [3:0] s1ub[3] = '{4'b1010, 4'b1000, 4'b0000};
    logic [2:0] p2[3] = '{3'b011, 3'b001, 3'b001};
    logic [3:0] s2sar[3] = '{4'b1010, 4'b1001, 4'b0000};
    logic [3:0] s2lb[3] = '{4'b1000, 4'b1000, 4'b1000};
    logic [3:0] s2ub[3] = '{4'b1010, 4'b1001, 4'b1000};
    repeat (2) @(posedge clk);
    rst_n = 1;
    run4(p1, 2, s1sar, s1lb, s1ub, "scenario 1");
    run4(p2, 3, s2sar, s2lb, s2ub, "scenario 2");

    // 10-bit random conversions
    for (int t = 0; t < 600; t++) begin
      automatic int k = $urandom_range(0, 1023);
      automatic real f = real'($urandom_range(1, 999)) / 1000.0;
      int cyc;
      @(posedge clk iff phase[N]);
      #1 chk(tga && !tgb && esa && !esb, "sampling switches on in S0");
      @(posedge clk); #1;
      rlb = 0; rub = 1023; cyc = 0;
      while (!done) begin
        automatic real x = real'(k) + f - real'(code);
        logic [2:0] p;
        chk(pvdd == ~code && nvdd == code && pgnd == ~code && ngnd == code && !tga,
            "DAC gates follow the trial code");
        p[1] = (x > 0.0);
        if (x >= real'(A + B)) p[2] = 1; else if (x < real'(A)) p[2] = 0; else begin p[2] = 1'($urandom); n_rand_band++; end
        if (x > -real'(A)) p[0] = 1; else if (x <= -real'(A + B)) p[0] = 0; else begin p[0] = 1'($urandom); n_rand_band++; end
        {pap, pm, pan} = p;
        ref_step(p, int'(code));
        @(posedge clk); #1;
        cyc++;
        chk(int'(lb) == rlb && int'(ub) == rub, $sformatf("code %0d cycle %0d: LB/UB %0d/%0d expected %0d/%0d", k, cyc, lb, ub, rlb, rub));
        if (cyc > N) break;
      end
      chk(cyc <= N, $sformatf("code %0d took %0d cycles", k, cyc));
      chk(done && o_en && lb == N'(k), $sformatf("code %0d: result %0d", k, lb));
      hist[cyc]++;
      @(posedge clk); #1;
      chk(dout == N'(k), $sformatf("code %0d: dout %0d", k, dout));
    end
    chk(n_rand_band > 0, "uncertainty band never exercised");
    for (int i = 1; i <= N; i++) if (hist[i] != 0) $display("  %2d cycles: %0d", i, hist[i]);
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
