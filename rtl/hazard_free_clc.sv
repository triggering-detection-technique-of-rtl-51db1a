// hazard_free_clc: the five-input combinational function, written so that it
// has no static hazard when x0 switches.
//
// The function's minimal cover is five prime implicants
//   E = x3 x2 x0,  H = ~x2 ~x0,  A = ~x4 ~x1 ~x0,  D = x4 x1 ~x0,  F = x4 x2 x0.
// Factored on x0 it reads
//   f = (x3 x2 + x4 x2) x0 + (~x2 + ~x4 ~x1 + x4 x1) ~x0.
// Both brackets are 1 for x4 x3 x2 x1 = 0110, 1011 and 1111, so for the
// x0 transitions 12<->13, 22<->23 and 30<->31 the output depends on the x0
// term handing over to the ~x0 term: while x0 and its complement rail are
// equal, the output can glitch to 0 (a static-1 hazard), and a Trojan that
// drives the complement rail at that moment could make it so. Adding the
// consensus implicants B = ~x4 x2 ~x1 and G = x4 x2 x1, i.e. the term
// x2 (x4 xnor x1), holds the output at 1 through those transitions without
// looking at x0 at all. The output is then
//   y = (x3 x2 + x4 x2) x0 + (~x2 + ~x4 ~x1 + x4 x1) x0_n + x2 (x4 xnor x1).
//
// With x0_n = ~x0 this is the same function f, except at minterm 5
// (x4..x0 = 00101), which B covers and the minimal cover does not; the
// function leaves minterm 5 as a don't-care, and here it is 1. For any other
// x0_n, y can differ from f only where f itself changes with x0; wherever f
// has the same value for x0 = 0 and x0 = 1, y equals that value whatever
// x0 and x0_n are.
// That is what makes a Trojan that drives x0_n while x0 switches harmless.
//
// The gate structure (two AND-OR groups gated by x0 and by the ~x0 rail,
// plus the XNOR-AND consensus term, into one OR) is the design's. Taking the
// ~x0 rail as a separate input, rather than inverting x0 here, is this
// block's choice so that the rail can be driven by the guard around it.
// Complements of x1, x2 and x4 are formed here.
//
// Interface: x (clc_in_t, x4..x0; x.x0 is the true rail) and x0_n in, y out.
// Timing: purely combinational, four gate levels.
module hazard_free_clc
  import ht_pkg::*;
(
  input  clc_in_t x,
  input  logic    x0_n,
  output logic    y
);
  timeunit 1ns;
  timeprecision 1ps;

  logic x0_group;   // x3 x2 + x4 x2, enabled by x0
  logic x0n_group;  // ~x2 + ~x4 ~x1 + x4 x1, enabled by the ~x0 rail
  logic consensus;  // x2 (x4 xnor x1) = B + G

  always_comb begin
    x0_group  = (x.x3 & x.x2) | (x.x4 & x.x2);
    x0n_group = ~x.x2 | (~x.x4 & ~x.x1) | (x.x4 & x.x1);
    consensus = x.x2 & ~(x.x4 ^ x.x1);
    y         = (x0_group & x.x0) | (x0n_group & x0_n) | consensus;
  end

endmodule
