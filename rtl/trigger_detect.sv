// trigger_detect: detects the Trojan trigger condition on a rail pair.
//
// A signal x and its complement rail x_n normally differ. Right after x
// changes, the complement rail still holds its old value for one inverter
// delay, so both rails are briefly equal: both 1 after a rising edge of x,
// both 0 after a falling edge. A Trojan can use exactly that moment as its
// trigger. This block flags it:
//
//   x x_n | t
//   0  0  | 1
//   0  1  | 0
//   1  0  | 0
//   1  1  | 1          t = xnor(x, x_n)
//
// The truth table and the XNOR form are those of the design. WIDTH lets one
// instance watch several inputs; the design watches only x0, so the default
// is 1 (the idea is stated to apply to any input).
//
// Interface: x, x_n (WIDTH bits each) in, t (WIDTH bits) out.
// Timing: purely combinational, one XNOR level.
module trigger_detect #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] x_n,
  output logic [WIDTH-1:0] t
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb t = ~(x ^ x_n);

endmodule
