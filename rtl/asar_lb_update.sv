`timescale 1ns/1ps
// asar_lb_update: lower-bound (LB) update circuit and LB register.
//
// Each conversion cycle the A-SAR logic narrows the search interval
// [LB, UB] around the input using the trial code D and the control signals
// S1/S2 of the phase-detector pattern. For the lower bound the document's
// datapath is:
//   adder : X  = D + (S2 ? A : -(A+B))
//   X<Y?  : g1 = X < (S2 ? UB : LB)
//   mux 1 : SELECT1 = ~S1.S2 + S1.S2.~g1    (1 -> D, 0 -> X)
//   mux 2 : SELECT2 = ~S1.~S2 + S1.~S2.g1   (1 -> keep LB, 0 -> mux 1)
// which gives, per pattern:
//   S1S2 = 11 (input above D+A)        LB = D+A if D+A < UB, else D
//   S1S2 = 00 (input below D-A)        LB kept
//   S1S2 = 01 (D <= input < D+A+B)     LB = D
//   S1S2 = 10 (D-A-B <= input < D)     LB = D-A-B unless that is below LB
// The adder and comparator work on N+2 bits, signed.
//
// Register: loads 0 when `init` is high (the edge that ends the sampling
// phase, so the first conversion cycle starts from LB = 0) and loads the
// computed value when `upd` is high. Gating the update with `upd`, so that
// a finished result is frozen, is this design's choice.
// Interface: D, UB from the SAR and UB register; lb is the register output.
// Timing: lb changes on the rising clock edge; g1 and lb_next are
// combinational from the current D, LB, UB, S1, S2.
module asar_lb_update
  import asar_pkg::*;
#(
  parameter int unsigned N      = ADC_BITS,
  parameter int unsigned A_CODE = A_DEFAULT,
  parameter int unsigned B_CODE = B_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         upd,
  input  logic         s1,
  input  logic         s2,
  input  logic [N-1:0] d,
  input  logic [N-1:0] ub,
  output logic [N-1:0] lb,
  output logic [N-1:0] lb_next,
  output logic         g1
);

  localparam int unsigned CW = N + 2;
  typedef logic signed [CW-1:0] word_t;

  localparam word_t A_W  = word_t'(A_CODE);
  localparam word_t AB_W = word_t'(A_CODE + B_CODE);

  word_t addend, x, y;
  logic  select1, select2;
  logic [N-1:0] mux1;

  asar_value_compare #(.W(CW)) u_cmp (.x(x), .y(y), .g(g1));

  always_comb begin
    addend  = s2 ? A_W : -AB_W;
    x       = word_t'({2'b00, d}) + addend;
    y       = s2 ? word_t'({2'b00, ub}) : word_t'({2'b00, lb});
    select1 = (~s1 & s2) | (s1 & s2 & ~g1);
    select2 = (~s1 & ~s2) | (s1 & ~s2 & g1);
    mux1    = select1 ? d : x[N-1:0];
    lb_next = select2 ? lb : mux1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    lb <= '0;
    else if (init) lb <= '0;
    else if (upd)  lb <= lb_next;
  end

  // When the adder result is taken it must be a valid N-bit code.
  a_lb_range: assert property (@(posedge clk) disable iff (!rst_n)
    (!init && upd && !select2 && !select1) |-> (x >= 0 && x < word_t'(2**N)))
    else $error("LB adder out of range: %0d", x);

endmodule
