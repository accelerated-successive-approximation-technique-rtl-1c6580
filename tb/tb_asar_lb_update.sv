`timescale 1ns/1ps
// tb_asar_lb_update: the lower-bound circuit against the update rules.
// Each trial first loads a chosen LB (pattern S1S2 = 01 sets LB = D), then
// applies a random pattern, trial code and UB and compares lb_next, g1 and the
// register after the clock with:
//   11: LB = D+A if D+A < UB else D     00: LB kept
//   01: LB = D                          10: LB = D-A-B unless below LB
// Every rule, including both outcomes of the comparisons, must be exercised.
// Also checks init (LB = 0) and that upd = 0 holds the register.
module tb_asar_lb_update;
  localparam int N = 10, A = 62, B = 34;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, upd = 1'b0, s1 = 1'b0, s2 = 1'b0, g1;
  logic [N-1:0] d = '0, ub = '1, lb, lb_next;
  int checks = 0, failures = 0;
  int hits[6];

  asar_lb_update #(.N(N), .A_CODE(A), .B_CODE(B)) dut (
    .clk(clk), .rst_n(rst_n), .init(init), .upd(upd), .s1(s1), .s2(s2),
    .d(d), .ub(ub), .lb(lb), .lb_next(lb_next), .g1(g1));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load(int v);
    @(negedge clk); s1 = 0; s2 = 1; d = N'(v); upd = 1;
    @(posedge clk); #1; upd = 0;
    chk(lb == N'(v), $sformatf("load LB=%0d got %0d", v, lb));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 chk(lb == 0, "reset value");
    for (int t = 0; t < 3000; t++) begin
      automatic int l0 = $urandom_range(0, 1000), dd, uu, e, eg;
      automatic int pat = t % 4;
      load(l0);
      dd = $urandom_range(l0 + 1, 1023);
      uu = (t % 3 == 0) ? $urandom_range(dd, (dd + 70 > 1023) ? 1023 : dd + 70) : $urandom_range(dd, 1023);
      if (pat == 3 && t % 5 == 0) dd = $urandom_range(l0 + 1, (l0 + 100 > 1023) ? 1023 : l0 + 100);
      @(negedge clk);
      {s1, s2} = 2'(pat); d = N'(dd); ub = N'(uu); upd = 1;
      #1;
      case (pat)
        3: begin eg = (dd + A < uu); e = eg ? dd + A : dd; hits[eg] += 1; end
        0: begin e = l0; eg = -1; hits[2] += 1; end
        1: begin e = dd; eg = -1; hits[3] += 1; end
        default: begin eg = (dd - A - B < l0); e = eg ? l0 : dd - A - B; hits[4 + eg] += 1; end
      endcase
      chk(lb_next == N'(e), $sformatf("pattern %b D=%0d LB=%0d UB=%0d: next %0d expected %0d", 2'(pat), dd, l0, uu, lb_next, e));
      if (eg >= 0) chk(g1 == eg[0], $sformatf("g1 for pattern %b", 2'(pat)));
      @(posedge clk); #1; upd = 0;
      chk(lb == N'(e), "register after update");
      // hold when upd = 0
      @(negedge clk); {s1, s2} = 2'b01; d = N'(dd ^ 1);
      @(posedge clk); #1;
      chk(lb == N'(e), "hold with upd = 0");
    end
    // init
    @(negedge clk); init = 1; upd = 1;
    @(posedge clk); #1; init = 0; upd = 0;
    chk(lb == 0, "init clears LB");
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
