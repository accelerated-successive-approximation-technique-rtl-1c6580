`timescale 1ns/1ps
// asar_output_reg: DONE / O_EN generation and the ADC output register.
//
// The conversion is complete when LB equals UB, which the code update chain
// signals with c_out = 0. DONE is the inverse of c_out: it rises right after
// the clock edge of the deciding conversion cycle and stays high until the
// bounds are re-initialised for the next conversion. O_EN is high in the
// first clock cycle of DONE only, and loads LB (equal to UB then) into the
// output register at the edge that ends that cycle. Making O_EN a one-cycle
// strobe is this design's choice; the document only says that O_EN loads
// the output register and that the inverted chain output enables it.
//
// Interface: c_out and lb from the bound logic; dout[N-1:0] holds the last
// result until the next conversion finishes.
// Timing: done and o_en are combinational from the registers; dout is valid
// one clock after done rises.
module asar_output_reg #(
  parameter int unsigned N = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         c_out,
  input  logic [N-1:0] lb,
  output logic [N-1:0] dout,
  output logic         o_en,
  output logic         done
);

  logic done_q;

  always_comb begin
    done = ~c_out;
    o_en = done & ~done_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_q <= 1'b0;
      dout   <= '0;
    end else begin
      done_q <= done;
      if (o_en) dout <= lb;
    end
  end

endmodule
