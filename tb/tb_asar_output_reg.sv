`timescale 1ns/1ps
// tb_asar_output_reg: DONE must follow LB = UB (c_out = 0) at once, O_EN must
// be high only in the first cycle of DONE, and dout must take LB at the end
// of that cycle and keep it while LB changes afterwards.
module tb_asar_output_reg;
  localparam int N = 10;
  logic clk = 1'b0, rst_n = 1'b0, c_out = 1'b1, o_en, done;
  logic [N-1:0] lb = '0, dout;
  int checks = 0, failures = 0;

  asar_output_reg #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .c_out(c_out), .lb(lb),
                                .dout(dout), .o_en(o_en), .done(done));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int busy = $urandom_range(1, 10), hold = $urandom_range(1, 4);
      automatic logic [N-1:0] res = N'($urandom);
      logic [N-1:0] prev_out;
      prev_out = dout;
      @(negedge clk); c_out = 1; lb = N'($urandom);
      #1 chk(!done && !o_en, "idle while converting");
      repeat (busy - 1) begin
        @(negedge clk); lb = N'($urandom);
        chk(dout == prev_out, "dout stable during conversion");
      end
      @(negedge clk); c_out = 0; lb = res;
      #1 chk(done && o_en, "DONE and O_EN on first cycle");
      for (int h = 1; h < hold; h++) begin
        @(negedge clk); #1;
        chk(done && !o_en, "DONE held, O_EN single cycle");
        chk(dout == res, $sformatf("dout %0d expected %0d", dout, res));
      end
      @(posedge clk); #1;
      chk(dout == res, $sformatf("dout %0d expected %0d", dout, res));
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
