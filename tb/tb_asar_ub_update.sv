`timescale 1ns/1ps
// tb_asar_ub_update: the upper-bound circuit against the update rules.
// Each trial first loads a chosen UB (pattern S1S2 = 10 sets UB = D-1), then
// applies a random pattern, trial code and LB and compares ub_next, g2 and
// the register after the clock with:
//   11: UB kept                              10: UB = D-1
//   00: UB = D-A-1 if D-A >= LB else D-1     01: UB = D+A+B-1 if D+A+B < UB, else kept
// Also checks init (UB = all ones) and that upd = 0 holds the register.
module tb_asar_ub_update;
  localparam int N = 10, A = 62, B = 34;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, upd = 1'b0, s1 = 1'b0, s2 = 1'b0, g2;
  logic [N-1:0] d = '0, lb = '0, ub, ub_next;
  int checks = 0, failures = 0;
  int hits[6];

  asar_ub_update #(.N(N), .A_CODE(A), .B_CODE(B)) dut (
    .clk(clk), .rst_n(rst_n), .init(init), .upd(upd), .s1(s1), .s2(s2),
    .d(d), .lb(lb), .ub(ub), .ub_next(ub_next), .g2(g2));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load(int v);
    @(negedge clk); s1 = 1; s2 = 0; d = N'(v + 1); upd = 1;
    @(posedge clk); #1; upd = 0;
    chk(ub == N'(v), $sformatf("load UB=%0d got %0d", v, ub));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 chk(ub == 10'h3ff, "reset value");
    for (int t = 0; t < 3000; t++) begin
      automatic int u0 = $urandom_range(20, 1022), dd, ll, e, eg;
      automatic int pat = t % 4;
      load(u0);
      dd = $urandom_range(1, u0);
      ll = (t % 3 == 0) ? $urandom_range((dd > 70) ? dd - 70 : 0, dd - 1) : $urandom_range(0, dd - 1);
      if (pat == 1 && t % 5 == 0) dd = $urandom_range((u0 > 100) ? u0 - 100 : 1, u0);
      if (ll >= dd) ll = dd - 1;
      if (pat == 0 && dd == A && ll == 0) ll = 1;  // else D-A-1 = -1: no input fits
      @(negedge clk);
      {s1, s2} = 2'(pat); d = N'(dd); lb = N'(ll); upd = 1;
      #1;
      case (pat)
        3: begin e = u0; eg = -1; hits[0] += 1; end
        2: begin e = dd - 1; eg = -1; hits[1] += 1; end
        0: begin eg = (dd - A < ll); e = eg ? dd - 1 : dd - A - 1; hits[2 + eg] += 1; end
        default: begin eg = (dd + A + B < u0); e = eg ? dd + A + B - 1 : u0; hits[4 + eg] += 1; end
      endcase
      chk(ub_next == N'(e), $sformatf("pattern %b D=%0d LB=%0d UB=%0d: next %0d expected %0d", 2'(pat), dd, ll, u0, ub_next, e));
      if (eg >= 0) chk(g2 == eg[0], $sformatf("g2 for pattern %b", 2'(pat)));
      @(posedge clk); #1; upd = 0;
      chk(ub == N'(e), "register after update");
      @(negedge clk); {s1, s2} = 2'b10; d = N'(dd ^ 1);
      @(posedge clk); #1;
      chk(ub == N'(e), "hold with upd = 0");
    end
    @(negedge clk); init = 1; upd = 1;
    @(posedge clk); #1; init = 0; upd = 0;
    chk(ub == 10'h3ff, "init presets UB");
    for (int i = 0; i < 6; i++) chk(hits[i] > 0, $sformatf("rule outcome %0d never exercised", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
