`timescale 1ns/1ps
// tb_asar_value_compare: X < Y over the whole range of the bound adder,
// including negative X (D - A - B below zero) and X above 2^N - 1, plus the
// document's example where X = D - A is negative and Y = UB.
module tb_asar_value_compare;
  localparam int unsigned W = 12;
  logic signed [W-1:0] x, y;
  logic g;
  int checks = 0, failures = 0;

  asar_value_compare #(.W(W)) dut (.x(x), .y(y), .g(g));

  task automatic try(int xi, int yi);
    x = W'(xi); y = W'(yi);
    #1;
    checks++;
    if (g != (xi < yi)) begin failures++; $display("FAIL: %0d < %0d gave %b", xi, yi, g); end
  endtask

  initial begin
    try(-62, 1023);          // D - A with D = 0
    try(1119, 1023);         // D + A + B with D = 1023
    try(574, 1023);
    try(1023, 1023);
    try(-96, 0);
    try(0, 0);
    for (int i = 0; i < 2000; i++)
      try($urandom_range(0, 1215) - 96, $urandom_range(0, 1023));
    for (int i = 0; i < 200; i++)
      try(-$urandom_range(0, 2047), -$urandom_range(0, 2047));
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
