`timescale 1ns/1ps
// asar_ref_pkg: reference model used by the A-SAR testbenches.
//
// It is written independently of the RTL, straight from the bound update
// rules in words:
//   all detectors 1            LB = D+A if D+A < UB, else D
//   all detectors 0            UB = D-A-1 if D-A >= LB, else D-1
//   P_M = 1, P_A+ = 0, P_A- = 1  LB = D, UB = D+A+B-1 if D+A+B < UB
//   P_M = 0, P_A+ = 0, P_A- = 1  UB = D-1, LB = D-A-B if D-A-B >= LB
// and the next trial code is the common prefix of LB and UB followed by
// 1 0 ... 0. Detector decisions come from an ideal threshold model: the
// main detector fires when the input is above the trial level, the
// auxiliary ones when it is more than T LSB above (P_A+) or not more than
// T LSB below (P_A-) the trial level.
package asar_ref_pkg;

  typedef struct {
    int unsigned code;     // final code
    int unsigned cycles;   // conversion cycles used
    int unsigned trace[16];// trial codes, cycle 1 first
  } ref_result_t;

  // Ideal transfer of the modelled DAC: code = floor(vd/lsb + 2^(N-1) - 1/2).
  function automatic int unsigned ideal_code(real vd, real vdd, int unsigned n);
    real lsb, c;
    lsb = 2.0 * vdd / real'((2 ** n) - 1);
    c = vd / lsb + real'(2 ** (n - 1)) - 0.5;
    if (c < 0.0) return 0;
    if (c >= real'((2 ** n) - 1)) return (2 ** n) - 1;
    return int'($floor(c));
  endfunction

  function automatic int unsigned next_trial(int unsigned lb, int unsigned ub, int unsigned n);
    int h;
    h = -1;
    for (int i = n - 1; i >= 0; i--) if (((lb >> i) & 1) != ((ub >> i) & 1)) begin h = i; break; end
    if (h < 0) return ub;
    return ((ub >> (h + 1)) << (h + 1)) | (1 << h);
  endfunction

  // x_lsb: input minus trial level in LSB, given as a function of D through
  // vd; t_lsb: auxiliary detector threshold in LSB.
  function automatic ref_result_t convert(real vd, real vdd, int unsigned n,
                                          int a, int b, real t_lsb);
    ref_result_t r;
    int lb, ub, d;
    real lsb;
    bit pm, pap, pan;
    lb = 0;
    ub = (2 ** n) - 1;
    lsb = 2.0 * vdd / real'((2 ** n) - 1);
    r.cycles = 0;
    for (int k = 0; k < 16; k++) r.trace[k] = 0;
    while (lb != ub && r.cycles < 16) begin
      real x;
      d = int'(next_trial(lb, ub, n));
      r.trace[r.cycles] = d;
      x = vd / lsb - (real'(d) - real'(2 ** (n - 1)) + 0.5);
      pm  = (x > 0.0);
      pap = (x > t_lsb);
      pan = (x > -t_lsb);
      if (pap && pm && pan)            lb = (d + a < ub) ? d + a : d;
      else if (!pap && !pm && !pan)    ub = (d - a < lb) ? d - 1 : d - a - 1;
      else if (!pap && pm && pan) begin lb = d; if (d + a + b < ub) ub = d + a + b - 1; end
      else begin                       ub = d - 1; if (d - a - b >= lb) lb = d - a - b; end
      r.cycles++;
    end
    r.code = lb;
    return r;
  endfunction

endpackage
