`timescale 1ns/1ps
// tb_asar_code_update: for random bound pairs LB <= UB the trial code must be
// the common prefix of LB and UB followed by 1 0 ... 0, and the chain output
// must be 0 exactly when LB = UB. Also the rows of the 4-bit example
// (LB/UB 0000/1111 -> 1000, 1000/1010 -> 1010, 1000/1001 -> 1001).
module tb_asar_code_update;
  localparam int unsigned N = 10;
  logic [N-1:0] lb, ub, d;
  logic c_out;
  logic [3:0] lb4, ub4, d4;
  logic c4;
  int checks = 0, failures = 0;

  asar_code_update #(.N(N)) dut (.lb(lb), .ub(ub), .d(d), .c_out(c_out));
  asar_code_update #(.N(4)) dut4 (.lb(lb4), .ub(ub4), .d(d4), .c_out(c4));

  function automatic int unsigned expected(int unsigned l, int unsigned u);
    // largest power-of-two-aligned split point inside (l, u]
    for (int h = N - 1; h >= 0; h--)
      if ((l >> h) != (u >> h)) return (u >> h) << h;
    return u;
  endfunction

  task automatic try4(int unsigned l, int unsigned u, int unsigned e);
    lb4 = 4'(l); ub4 = 4'(u); #1;
    checks++;
    if (d4 != 4'(e)) begin failures++; $display("FAIL: 4-bit LB=%b UB=%b D=%b", lb4, ub4, d4); end
  endtask

  initial begin
    try4(4'b0000, 4'b1111, 4'b1000);
    try4(4'b1000, 4'b1010, 4'b1010);
    try4(4'b1000, 4'b1001, 4'b1001);
    lb4 = 4'b1000; ub4 = 4'b1000; #1;
    checks++; if (c4 != 1'b0) begin failures++; $display("FAIL: 4-bit done"); end
    for (int i = 0; i < 3000; i++) begin
      automatic int unsigned a = $urandom_range(0, 1023), b = $urandom_range(0, 1023);
      if (i % 10 == 0) b = a;
      lb = N'((a < b) ? a : b); ub = N'((a < b) ? b : a);
      #1;
      checks++;
      if (d != N'(expected(lb, ub)) || c_out != (lb != ub)) begin
        failures++; $display("FAIL: LB=%0d UB=%0d D=%0d C=%b", lb, ub, d, c_out);
      end
      if (lb != ub) begin
        checks++;
        if (!(d > lb && d <= ub)) begin failures++; $display("FAIL: D=%0d outside (LB,UB]", d); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
