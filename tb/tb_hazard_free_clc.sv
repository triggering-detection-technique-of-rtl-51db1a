// tb_hazard_free_clc: exhaustive check of the hazard-free function.
//
// The reference on-set is built from the minterm lists of the seven prime
// implicants of the hazard-free cover (A, B, D, E, F, G, H), not from the
// block's equations. It differs from the minimal five-implicant cover only in
// minterm 5 (covered by B), which the function's specification leaves as a
// don't-care. Checks:
//  - with a correct complement rail (x0_n = ~x0) y equals f for all 32
//    inputs;
//  - with a wrong complement rail (x0_n = x0, as during an inverter's
//    uncertainty window, or as a Trojan may drive it) y still equals f
//    wherever f does not depend on x0 for the other four inputs;
//  - the three static-1 hazard transitions 12<->13, 22<->23 and 30<->31 are
//    exercised with the rail both 0 and 1, and a model of the minimal
//    five-implicant circuit is shown to drop to 0 there, while y holds 1.
module tb_hazard_free_clc;
  timeunit 1ns;
  timeprecision 1ps;
  import ht_pkg::*;

  int checks = 0;
  int failures = 0;
  int hazard_cases = 0;
  int minimal_glitches = 0;

  clc_in_t x;
  logic    x0_n;
  logic    y;

  hazard_free_clc dut (.x(x), .x0_n(x0_n), .y(y));

  logic [31:0] onset;

  function automatic logic [31:0] mset(input int unsigned m[]);
    logic [31:0] s = '0;
    foreach (m[i]) s[m[i]] = 1'b1;
    return s;
  endfunction

  // Minimal five-implicant circuit evaluated with an arbitrary ~x0 rail.
  function automatic logic minimal_circuit(input logic [4:0] v, input logic rail);
    logic x4, x3, x2, x1, x0;
    {x4, x3, x2, x1, x0} = v;
    return (x3 & x2 & x0) | (~x2 & rail) | (~x4 & ~x1 & rail) |
           (x4 & x1 & rail) | (x4 & x2 & x0);
  endfunction

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    onset = mset('{0, 4, 8, 12})                   // A
          | mset('{18, 22, 26, 30})                // D
          | mset('{13, 15, 29, 31})                // E
          | mset('{21, 23, 29, 31})                // F
          | mset('{0, 2, 8, 10, 16, 18, 24, 26})   // H
          | mset('{4, 5, 12, 13})                  // B
          | mset('{22, 23, 30, 31});               // G

    // Correct rails
    for (int v = 0; v < 32; v++) begin
      x    = clc_in_t'(v[4:0]);
      x0_n = ~v[0];
      #1;
      checks++;
      if (y !== onset[v]) begin
        failures++;
        $display("FAIL m=%0d: y=%0b expected %0b", v, y, onset[v]);
      end
    end

    // Wrong rails: x0_n equal to x0
    for (int v = 0; v < 32; v++) begin
      int unsigned lo, hi;
      lo   = v & ~1;
      hi   = v | 1;
      x    = clc_in_t'(v[4:0]);
      x0_n = v[0];
      #1;
      if (onset[lo] == onset[hi]) begin
        checks++;
        if (y !== onset[lo]) begin
          failures++;
          $display("FAIL m=%0d with x0_n=x0: y=%0b expected %0b", v, y, onset[lo]);
        end
        if (onset[lo] && (lo == 12 || lo == 22 || lo == 30)) begin
          hazard_cases++;
          if (minimal_circuit(5'(v), x0_n) == 1'b0) minimal_glitches++;
        end
      end
    end

    // The three hazard pairs must be among the cases above, each in both
    // rail states, and the minimal circuit must glitch on each pair.
    checks++;
    if (hazard_cases != 6) begin
      failures++;
      $display("FAIL hazard cases seen %0d, expected 6", hazard_cases);
    end
    checks++;
    if (minimal_glitches != 3) begin
      failures++;
      $display("FAIL minimal circuit glitches %0d, expected 3", minimal_glitches);
    end
    $display("hazard transitions exercised=%0d, minimal-circuit glitches=%0d",
             hazard_cases, minimal_glitches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
