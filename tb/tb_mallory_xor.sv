// tb_mallory_xor - exhaustive test of the three-state coincidence circuit.
//
// The expected coincidence output is derived from the gate's input-plane
// picture rather than its equation: the output is "different" only in the
// two corners where one wire is fully up (at or above 13 of 15) and the other
// is below half swing (under 8); everywhere else it is "alike". The bench
// then replays the control pair's time-coded sequence 00 -> 11 -> 10 with
// unequal rise times and requires the clean coincidence sequence 1, 1, 0
// (no "different" pulse on the way from 00 to 11), and checks that in
// steady state the gate is an ordinary exclusive OR.
`timescale 1ns / 1ps
module tb_mallory_xor;
  import sm_pkg::*;

  level_t lvl_t, lvl_r;
  logic   valid, pol, coinc;
  int     checks = 0, failures = 0;

  mallory_xor dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0d r=%0d)", what, lvl_t, lvl_r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ramp_t [9] = '{0, 3, 6, 9, 12, 15, 15, 15, 15};
    automatic int ramp_r [9] = '{0, 2, 4, 6, 8, 10, 12, 14, 15};
    automatic int diff_pulses = 0;
    for (int t = 0; t <= 15; t++) begin
      for (int r = 0; r <= 15; r++) begin
        automatic bit corner = (t >= 13 && r < 8) || (r >= 13 && t < 8);
        lvl_t = level_t'(t);
        lvl_r = level_t'(r);
        #1;
        check(coinc == !corner, "coincidence region");
        check(valid == corner, "valid region");
        check(pol == (t >= 8), "polarity");
      end
    end
    // Steady state: ordinary XOR.
    for (int k = 0; k < 4; k++) begin
      lvl_t = k[1] ? 4'd15 : 4'd0;
      lvl_r = k[0] ? 4'd15 : 4'd0;
      #1;
      check(valid == (k[1] ^ k[0]), "steady-state XOR");
    end
    // Time-coded control pair: 00 -> 11 (unequal ramps) -> 10.
    lvl_t = '0; lvl_r = '0;
    #1;
    check(coinc, "00: alike");
    for (int k = 0; k < 9; k++) begin
      lvl_t = level_t'(ramp_t[k]);
      lvl_r = level_t'(ramp_r[k]);
      #1;
      if (!coinc) diff_pulses++;
    end
    check(diff_pulses == 0, "no transient from 00 to 11");
    check(coinc, "11: alike");
    for (int k = 14; k >= 0; k -= 2) begin
      lvl_r = level_t'(k);
      #1;
    end
    check(!coinc && valid && pol, "10: different, T wire active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
