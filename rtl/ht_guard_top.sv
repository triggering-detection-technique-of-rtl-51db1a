// ht_guard_top: five-input combinational system guarded against a Trojan
// that fires on the propagation delay of the x0 inverter.
//
// The inverter (inv_delay) derives the ~x0 rail from x0. For one inverter
// delay after each x0 edge both rails are equal; trigger_detect raises
// trig_e (E) for exactly that time: E = xnor(x0, ~x0 rail). The multiplexer
// (trigger_mux) then hands the complement rail over to the Trojan's output,
// which models the worst a Trojan triggered by that condition can do: drive
// the rail to any value it likes while it is active. When E = 0 the
// multiplexer passes the inverter's output unchanged. The function itself
// (hazard_free_clc) includes the consensus term x2 (x4 xnor x1), so its
// output cannot be moved by the complement rail when f is the same for
// x0 = 0 and x0 = 1: the Trojan's trigger is detected (trig_e) and its
// payload has no effect. When f does depend on x0, y only settles to its new
// value at the end of the window, as it would without any Trojan, just later.
//
// What follows the design: the function and its hazard-free cover, the
// inverter, the XNOR detector producing E and the multiplexer selecting the
// Trojan logic on E = 1. This model's own choices: the multiplexer output is
// taken as the ~x0 rail of the ~x0 AND gate, so that the circuit computes the
// design's function whenever E = 0; the inverter delay value; and bringing
// the Trojan's output in as a port, since the Trojan is not part of the
// design.
//
// Interface: x (x4..x0) and trojan_out in; y and trig_e out.
// Timing: combinational; trig_e pulses for INV_DELAY_PS after each x0 edge.
module ht_guard_top
  import ht_pkg::*;
#(
  parameter int unsigned INV_DELAY_PS = 100
) (
  input  clc_in_t x,
  input  logic    trojan_out,
  output logic    y,
  output logic    trig_e
);
  timeunit 1ns;
  timeprecision 1ps;

  logic x0_inv;   // inverter output, the ~x0 rail before the multiplexer
  logic x0_rail;  // ~x0 rail as it reaches the function

  inv_delay #(
    .DELAY_PS(INV_DELAY_PS)
  ) u_inv (
    .a(x.x0),
    .y(x0_inv)
  );

  trigger_detect #(
    .WIDTH(1)
  ) u_detect (
    .x  (x.x0),
    .x_n(x0_inv),
    .t  (trig_e)
  );

  trigger_mux u_mux (
    .sel(trig_e),
    .in0(x0_inv),
    .in1(trojan_out),
    .out(x0_rail)
  );

  hazard_free_clc u_clc (
    .x   (x),
    .x0_n(x0_rail),
    .y   (y)
  );

endmodule
