// tb_ht_guard_top: end-to-end test of the guarded system at its default
// parameters, against a worst-case Trojan.
//
// For every value of x4..x1, for both directions of an x0 edge and for both
// values the Trojan can drive, the test settles the inputs, switches x0 and
// samples the outputs inside the inverter's uncertainty window and after it:
//  - trig_e must be 0 when settled, 1 from the x0 edge until just before one
//    inverter delay has passed, and 0 again just after;
//  - inside the window, wherever f has the same value before and after the
//    edge, y must hold that value whatever the Trojan drives;
//  - after the window y must equal f of the new inputs.
// The reference f is the on-set of the seven-implicant cover, built from the
// implicants' minterm lists. The same stimulus is applied to a model of the
// minimal (five-implicant) circuit fed with the same corrupted rail, to show
// the Trojan would have flipped that circuit's output.
//
// Mechanisms counted, each of which must happen at least once: trigger
// detected in the window after a rising x0 edge (both rails 1) and after a
// falling one (both rails 0), Trojan value passed onto the rail, static-1 hazard transition
// held by the consensus term, static-0 transition held, output transition
// delivered, and a flip the Trojan would have caused in the minimal circuit.
module tb_ht_guard_top;
  timeunit 1ns;
  timeprecision 1ps;
  import ht_pkg::*;

  localparam int unsigned DELAY_PS = 100;  // the top's default inverter delay

  int checks = 0;
  int failures = 0;
  int n_trigger = 0;
  int n_window_b = 0;   // rails both 1, after a rising x0 edge
  int n_window_d = 0;   // rails both 0, after a falling x0 edge
  int n_trojan_passed = 0;
  int n_static1_held = 0;
  int n_static0_held = 0;
  int n_hazard_pairs = 0;
  int n_transitions = 0;
  int n_minimal_flips = 0;

  clc_in_t x;
  logic    trojan_out;
  logic    y;
  logic    trig_e;

  ht_guard_top dut (
    .x         (x),
    .trojan_out(trojan_out),
    .y         (y),
    .trig_e    (trig_e)
  );

  logic [31:0] onset;

  function automatic logic [31:0] mset(input int unsigned m[]);
    logic [31:0] s = '0;
    foreach (m[i]) s[m[i]] = 1'b1;
    return s;
  endfunction

  function automatic logic minimal_circuit(input logic [4:0] v, input logic rail);
    logic x4, x3, x2, x1, x0;
    {x4, x3, x2, x1, x0} = v;
    return (x3 & x2 & x0) | (~x2 & rail) | (~x4 & ~x1 & rail) |
           (x4 & x1 & rail) | (x4 & x2 & x0);
  endfunction

  task automatic check(input logic got, input logic exp, input string what,
                       input logic [4:0] v);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s, inputs %05b at %0t: got %0b expected %0b",
               what, v, $realtime, got, exp);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    onset = mset('{0, 4, 8, 12}) | mset('{18, 22, 26, 30}) | mset('{13, 15, 29, 31})
          | mset('{21, 23, 29, 31}) | mset('{0, 2, 8, 10, 16, 18, 24, 26})
          | mset('{4, 5, 12, 13}) | mset('{22, 23, 30, 31});

    for (int hi4 = 0; hi4 < 16; hi4++) begin
      for (int dir = 0; dir < 2; dir++) begin
        for (int tv = 0; tv < 2; tv++) begin
          logic [4:0] vold, vnew;
          logic       fold, fnew;
          vold = 5'((hi4 << 1) | dir);
          vnew = 5'((hi4 << 1) | (1 - dir));
          fold = onset[vold];
          fnew = onset[vnew];

          // Settle at the old inputs. The Trojan is already driving.
          trojan_out = tv[0];
          x          = clc_in_t'(vold);
          #1ns;
          check(trig_e, 1'b0, "trig_e settled", vold);
          check(y, fold, "y settled", vold);

          // Switch x0 and look inside the window.
          x = clc_in_t'(vnew);
          for (int s = 1; s <= 3; s++) begin
            #(DELAY_PS * 1ps / 4);
            check(trig_e, 1'b1, "trig_e in window", vnew);
            if (s == 1 && trig_e) begin
              n_trigger++;
              if (vnew[0]) n_window_b++;
              else         n_window_d++;
            end
            // Rail the inverter alone would give now: still ~old x0 = new x0.
            if (s == 1 && trig_e && tv[0] != vnew[0]) n_trojan_passed++;
            if (fold == fnew) begin
              check(y, fold, "y held in window", vnew);
              if (s == 1 && fold) n_static1_held++;
              if (s == 1 && !fold) n_static0_held++;
              if (s == 1 && (vold[4:1] == 4'b0110 || vold[4:1] == 4'b1011 ||
                             vold[4:1] == 4'b1111)) begin
                n_hazard_pairs++;
                if (minimal_circuit(vnew, tv[0]) != fold) n_minimal_flips++;
              end
            end
          end
          // Just before and just after one inverter delay from the edge.
          #((DELAY_PS / 4 - 5) * 1ps);
          check(trig_e, 1'b1, "trig_e just before delay", vnew);
          #10ps;
          check(trig_e, 1'b0, "trig_e just after delay", vnew);
          check(y, fnew, "y after window", vnew);
          if (fold != fnew && y == fnew) n_transitions++;
          #1ns;
        end
      end
    end

    $display("windows: rising=%0d falling=%0d", n_window_b, n_window_d);
    $display("triggers=%0d trojan_passed=%0d static1_held=%0d static0_held=%0d",
             n_trigger, n_trojan_passed, n_static1_held, n_static0_held);
    $display("hazard_pair_events=%0d transitions=%0d minimal_circuit_flips=%0d",
             n_hazard_pairs, n_transitions, n_minimal_flips);
    checks++; if (n_trigger == 0)       begin failures++; $display("FAIL no trigger"); end
    checks++; if (n_window_b == 0)      begin failures++; $display("FAIL no window after a rising edge"); end
    checks++; if (n_window_d == 0)      begin failures++; $display("FAIL no window after a falling edge"); end
    checks++; if (n_trojan_passed == 0) begin failures++; $display("FAIL no Trojan value passed"); end
    checks++; if (n_static1_held == 0)  begin failures++; $display("FAIL no static-1 hold"); end
    checks++; if (n_static0_held == 0)  begin failures++; $display("FAIL no static-0 hold"); end
    checks++; if (n_hazard_pairs != 12) begin failures++; $display("FAIL hazard pairs %0d, expected 12", n_hazard_pairs); end
    checks++; if (n_transitions == 0)   begin failures++; $display("FAIL no output transition"); end
    checks++; if (n_minimal_flips == 0) begin failures++; $display("FAIL minimal circuit never flipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
