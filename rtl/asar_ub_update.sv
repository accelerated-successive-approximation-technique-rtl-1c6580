`timescale 1ns/1ps
// asar_ub_update: upper-bound (UB) update circuit and UB register.
//
// Companion of asar_lb_update. The document's datapath is:
//   adder : X  = D + (S2 ? A+B : -A)
//   X<Y?  : g2 = X < (S2 ? UB : LB)
//   mux 3 : SELECT3 = S1.~S2 + ~S1.~S2.g2   (1 -> D, 0 -> X)
//   -1    : the chosen value minus one
//   mux 4 : SELECT4 = S1.S2 + ~S1.S2.~g2    (1 -> keep UB, 0 -> decremented)
// which gives, per pattern:
//   S1S2 = 11 (input above D+A)        UB kept
//   S1S2 = 00 (input below D-A)        UB = D-A-1 unless D-A < LB, else D-1
//   S1S2 = 01 (D <= input < D+A+B)     UB = D+A+B-1 if D+A+B < UB, else kept
//   S1S2 = 10 (D-A-B <= input < D)     UB = D-1
// The new UB is always one code below the level that splits the interval,
// because an input a fraction of an LSB below level d converts to d-1.
//
// Register: presets to all ones when `init` is high, loads the computed value
// when `upd` is high (see asar_lb_update for the timing of both).
// Timing: ub changes on the rising clock edge; g2 and ub_next are
// combinational.
module asar_ub_update
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
  input  logic [N-1:0] lb,
  output logic [N-1:0] ub,
  output logic [N-1:0] ub_next,
  output logic         g2
);

  localparam int unsigned CW = N + 2;
  typedef logic signed [CW-1:0] word_t;

  localparam word_t A_W  = word_t'(A_CODE);
  localparam word_t AB_W = word_t'(A_CODE + B_CODE);

  word_t addend, x, y, mux3, dec;
  logic  select3, select4;

  asar_value_compare #(.W(CW)) u_cmp (.x(x), .y(y), .g(g2));

  always_comb begin
    addend  = s2 ? AB_W : -A_W;
    x       = word_t'({2'b00, d}) + addend;
    y       = s2 ? word_t'({2'b00, ub}) : word_t'({2'b00, lb});
    select3 = (s1 & ~s2) | (~s1 & ~s2 & g2);
    select4 = (s1 & s2) | (~s1 & s2 & ~g2);
    mux3    = select3 ? word_t'({2'b00, d}) : x;
    dec     = mux3 - word_t'(1);
    ub_next = select4 ? ub : dec[N-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ub <= '1;
    else if (init) ub <= '1;
    else if (upd)  ub <= ub_next;
  end

  // When the decremented value is taken it must be a valid N-bit code.
  a_ub_range: assert property (@(posedge clk) disable iff (!rst_n)
    (!init && upd && !select4) |-> (dec >= 0 && dec < word_t'(2**N)))
    else $error("UB update out of range: %0d", dec);

endmodule
