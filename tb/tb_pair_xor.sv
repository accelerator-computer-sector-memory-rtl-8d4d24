// tb_pair_xor - exhaustive test of the conventional pair coding check.
//
// Every combination of the two wire levels is applied; the expected outputs
// are taken from the quadrant picture of the gate: a wire counts as up at or
// above half swing, the pair is valid when exactly one wire is up. The bench
// also replays the control room's time-coded sequence 00 -> 11 -> 10 with
// unequal rise times and checks that this gate, unlike the three-state one,
// shows the spurious "different" pulse on the way from 00 to 11.
`timescale 1ns / 1ps
module tb_pair_xor;
  import sm_pkg::*;

  level_t lvl_t, lvl_r;
  logic   valid, pol, coinc;
  int     checks = 0, failures = 0;

  pair_xor dut (.*);

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
    for (int t = 0; t <= int'(LVL_MAX); t++) begin
      for (int r = 0; r <= int'(LVL_MAX); r++) begin
        automatic bit up_t = (t > 7);
        automatic bit up_r = (r > 7);
        lvl_t = level_t'(t);
        lvl_r = level_t'(r);
        #1;
        check(valid == (up_t != up_r), "valid");
        check(coinc == (up_t == up_r), "coincidence");
        check(pol == up_t, "polarity");
      end
    end
    // 00 -> 11 with unequal rise times: the conventional gate glitches.
    for (int k = 0; k < 9; k++) begin
      lvl_t = level_t'(ramp_t[k]);
      lvl_r = level_t'(ramp_r[k]);
      #1;
      if (valid) diff_pulses++;
    end
    check(diff_pulses > 0, "conventional gate shows the transient");
    check(!valid && coinc, "settled at 11: alike");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
