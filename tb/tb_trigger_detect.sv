// tb_trigger_detect: exhaustive check of the trigger detector.
//
// A single-rail instance is checked against the four-row truth table (trigger
// when x equals its complement rail), and a 4-bit instance is checked on
// every combination of its eight inputs, bit by bit, so that each bit is
// shown to look only at its own rail pair.
module tb_trigger_detect;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic       x1, xn1, t1;
  logic [3:0] x4, xn4, t4;

  trigger_detect #(.WIDTH(1)) dut1 (.x(x1), .x_n(xn1), .t(t1));
  trigger_detect #(.WIDTH(4)) dut4 (.x(x4), .x_n(xn4), .t(t4));

  // Truth table rows {x, x_n} -> trigger
  localparam logic [3:0] TABLE = 4'b1001;  // bit index {x,x_n}: 00->1, 01->0, 10->0, 11->1

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      {x1, xn1} = 2'(r);
      #1;
      checks++;
      if (t1 !== TABLE[r]) begin
        failures++;
        $display("FAIL row x=%0b x_n=%0b: t=%0b expected %0b", x1, xn1, t1, TABLE[r]);
      end
    end
    for (int v = 0; v < 256; v++) begin
      {x4, xn4} = 8'(v);
      #1;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (t4[b] !== TABLE[{x4[b], xn4[b]}]) begin
          failures++;
          $display("FAIL bit %0d x=%b x_n=%b: t=%b", b, x4, xn4, t4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
