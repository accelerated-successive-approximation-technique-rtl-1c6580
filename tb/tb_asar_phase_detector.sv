`timescale 1ns/1ps
// tb_asar_phase_detector: random edge orders and gaps. OUT must be 1 when the
// + input rises first, 0 when the - input rises first, OUT_B its inverse,
// and the decision must hold while both inputs are low again.
module tb_asar_phase_detector;
  logic in_p = 1'b0, in_n = 1'b0, out, out_b;
  int checks = 0, failures = 0;

  asar_phase_detector dut (.in_p(in_p), .in_n(in_n), .out(out), .out_b(out_b));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5;
    for (int t = 0; t < 500; t++) begin
      automatic int gap = $urandom_range(1, 50);
      automatic bit p_first = 1'($urandom);
      if (p_first) begin in_p = 1; #(gap); in_n = 1; end
      else         begin in_n = 1; #(gap); in_p = 1; end
      #3;
      chk(out == p_first && out_b == !p_first, $sformatf("trial %0d: + first=%0d out=%0d", t, p_first, out));
      in_p = 0; in_n = 0;
      #7;
      chk(out == p_first, "decision held while inputs low");
    end
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
