`timescale 1ns/1ps
// tb_asar_case_decode: all eight detector patterns; the four legal ones must
// give the S1/S2 values of the case table (111 -> 11, 000 -> 00,
// P_A+ P_M P_A- = 011 -> 01, 001 -> 10) and the rest must be flagged.
module tb_asar_case_decode;
  import asar_pkg::*;
  logic pa_pos, pm, pa_neg, s1, s2, invalid;
  bound_case_e kind;
  int checks = 0, failures = 0;

  asar_case_decode dut (.pa_pos(pa_pos), .pm(pm), .pa_neg(pa_neg), .s1(s1), .s2(s2),
                        .kind(kind), .invalid(invalid));

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp_s;
      bit exp_inv;
      {pa_pos, pm, pa_neg} = 3'(v);
      case (3'(v))
        3'b111: begin exp_s = 2'b11; exp_inv = 0; end
        3'b000: begin exp_s = 2'b00; exp_inv = 0; end
        3'b011: begin exp_s = 2'b01; exp_inv = 0; end
        3'b001: begin exp_s = 2'b10; exp_inv = 0; end
        default: begin exp_s = 2'bxx; exp_inv = 1; end
      endcase
      #1;
      checks++;
      if (invalid != exp_inv) begin failures++; $display("FAIL: pattern %b invalid=%b", 3'(v), invalid); end
      if (!exp_inv) begin
        checks++;
        if ({s1, s2} != exp_s || kind != bound_case_e'(exp_s)) begin
          failures++; $display("FAIL: pattern %b gave S1S2=%b%b", 3'(v), s1, s2);
        end
      end
      // S1/S2 equations hold for every pattern
      checks++;
      if (s1 != (pa_neg & (!pm | pa_pos)) || s2 != (pm & pa_neg)) begin
        failures++; $display("FAIL: equations for %b", 3'(v));
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
