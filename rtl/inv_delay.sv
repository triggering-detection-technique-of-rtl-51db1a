// inv_delay: behavioural model (not synthesizable as written) of the inverter
// that derives the complement rail ~x0 from x0, including its propagation
// delay.
//
// The whole attack rests on this delay: for DELAY_PS after each edge of a,
// y has not yet followed, so a and y are equal (both 1 after a rising edge,
// both 0 after a falling edge). Those are the two uncertainty windows of an
// inverter (called b and d here, as in the timing diagram the design comes
// from). Logic synthesis keeps only y = ~a; the delay is there so that a
// simulation shows the windows. The delay value is this model's choice: the
// design gives no number. The delay is the usual inertial delay of a continuous
// assignment: a pulse on a that is shorter than the delay does not reach y.
//
// Interface: a in, y out.
// Timing: y = ~a, DELAY_PS picoseconds later.
module inv_delay #(
  parameter int unsigned DELAY_PS = 100
) (
  input  logic a,
  output logic y
);
  timeunit 1ns;
  timeprecision 1ps;

  assign #(DELAY_PS * 1ps) y = ~a;

endmodule
