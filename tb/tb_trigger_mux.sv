// tb_trigger_mux: exhaustive check of the E-steered multiplexer: input 0 is
// passed while E = 0, input 1 while E = 1.
module tb_trigger_mux;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic sel, in0, in1, out;

  trigger_mux dut (.sel(sel), .in0(in0), .in1(in1), .out(out));

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int v = 0; v < 8; v++) begin
      {sel, in1, in0} = 3'(v);
      #1;
      expected = v[2] ? v[1] : v[0];
      checks++;
      if (out !== expected) begin
        failures++;
        $display("FAIL sel=%0b in1=%0b in0=%0b: out=%0b expected %0b", sel, in1, in0, out, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
