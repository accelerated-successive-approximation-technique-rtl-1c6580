`timescale 1ns/1ps
// tb_asar_phase_sr: checks that the phase token starts in S0 after reset,
// visits S1..S10 in order, one per clock, and returns to S0 every 11 clocks.
module tb_asar_phase_sr;
  localparam int unsigned N = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N:0] s;
  int checks = 0, failures = 0;

  asar_phase_sr #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++; if (s !== 11'b1) begin failures++; $display("FAIL: reset state %b", s); end
    rst_n = 1'b1;
    for (int k = 1; k <= 5 * (N + 1); k++) begin
      @(posedge clk); #1;
      checks++;
      if (s !== (11'b1 << (k % (N + 1)))) begin
        failures++;
        $display("FAIL: after %0d clocks s=%b", k, s);
      end
    end
    // asynchronous reset mid-frame
    #2 rst_n = 1'b0; #1;
    checks++; if (s !== 11'b1) begin failures++; $display("FAIL: async reset %b", s); end
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
