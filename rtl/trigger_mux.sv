// trigger_mux: the two-input multiplexer steered by the trigger flag E.
//
// While E = 0 (no trigger condition) the regular signal on in0 passes. While
// E = 1 the output of the Trojan malicious logic on in1 passes. In the guarded
// system this models the worst case: whatever a Trojan drives while its
// trigger condition holds reaches the logic, and the logic must be shaped so
// that it cannot change the output. Which input is selected by which value
// of E is the one printed on the multiplexer (inputs "1" and "0").
//
// Interface: sel (E), in0, in1 in; out out.
// Timing: purely combinational.
module trigger_mux (
  input  logic sel,
  input  logic in0,
  input  logic in1,
  output logic out
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb out = sel ? in1 : in0;

endmodule
