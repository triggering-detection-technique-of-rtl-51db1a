// tb_inv_delay: checks the inverter model's value and its delay.
//
// After each edge of the input the output must still hold its old value
// (equal to the new input: the uncertainty window) just before the delay has
// passed, and must be the complement just after. A pulse shorter than the
// delay must not reach the output (inertial delay).
module tb_inv_delay;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DELAY_PS = 250;

  int checks = 0;
  int failures = 0;

  logic a, y;

  inv_delay #(.DELAY_PS(DELAY_PS)) dut (.a(a), .y(y));

  task automatic expect_y(input logic v, input string what);
    checks++;
    if (y !== v) begin
      failures++;
      $display("FAIL %s at %0t: y=%0b expected %0b", what, $realtime, y, v);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0;
    #2ns;
    expect_y(1'b1, "settled after start");
    for (int i = 0; i < 20; i++) begin
      logic nv;
      nv = ~a;
      a  = nv;
      #((DELAY_PS - 10) * 1ps);
      expect_y(nv, "window (old value still out)");
      #(20ps);
      expect_y(~nv, "after delay");
      #1ns;
    end
    // A pulse shorter than the delay: 100 ps high.
    a = 1'b1;
    #100ps;
    a = 1'b0;
    for (int i = 0; i < 6; i++) begin
      #(DELAY_PS * 1ps / 2);
      expect_y(1'b1, "short pulse filtered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
