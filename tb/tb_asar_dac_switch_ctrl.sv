`timescale 1ns/1ps
// tb_asar_dac_switch_ctrl: for every sampling state and random SAR codes,
// checks the gate levels against the switch table: during sampling only the
// input gates and the equalization switch conduct; during conversion bit i
// of D ties capacitor i of the V_in+ array to VDD (1) or GND (0) and the
// V_in- array to the opposite rail, never both rails at once.
module tb_asar_dac_switch_ctrl;
  localparam int unsigned N = 10;
  logic s0;
  logic [N-1:0] d, pvdd, pgnd, nvdd, ngnd;
  logic tgn, tgp, esn, esp;
  int checks = 0, failures = 0;

  asar_dac_switch_ctrl #(.N(N)) dut (
    .s0(s0), .d(d), .vin_tg_n_gate(tgn), .vin_tg_p_gate(tgp), .es_n_gate(esn), .es_p_gate(esp),
    .pos_vdd_gate(pvdd), .pos_gnd_gate(pgnd), .neg_vdd_gate(nvdd), .neg_gnd_gate(ngnd));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int t = 0; t < 400; t++) begin
      s0 = (t % 4 == 0);
      d  = N'($urandom);
      #1;
      chk(tgn == s0 && tgp == !s0, "input transmission gate");
      chk(esn == s0 && esp == !s0, "equalization switch");
      for (int i = 0; i < N; i++) begin
        automatic bit p_vdd_on = !pvdd[i], p_gnd_on = pgnd[i], n_vdd_on = !nvdd[i], n_gnd_on = ngnd[i];
        if (s0) chk(!p_vdd_on && !p_gnd_on && !n_vdd_on && !n_gnd_on, $sformatf("bit %0d rails on in sampling", i));
        else begin
          chk(p_vdd_on == d[i] && p_gnd_on == !d[i], $sformatf("V+ array bit %0d, d=%b", i, d[i]));
          chk(n_vdd_on == !d[i] && n_gnd_on == d[i], $sformatf("V- array bit %0d, d=%b", i, d[i]));
        end
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
