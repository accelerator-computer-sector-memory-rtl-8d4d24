// tb_xor_venn - compares the conventional pair check with the three-state
// control-pair check over the whole input plane and along transition paths.
//
// Both gates are driven with the same wire levels. The bench first prints
// each gate's map of the input plane (rows: T wire level 15..0, columns: R
// wire level 0..15; '1' = alike, '0' = different), which shows the
// conventional gate's four quadrants and the three-state gate's two small
// "different" corners. It then runs each gate along three paths between two
// states: (a) both wires changing at the same speed, (b) and (c) one wire
// half again as fast as the other. Expected, from the input-plane picture:
//   - between equal states (0,0 -> 1,1) the conventional gate is clean on
//     path a but shows a "different" transient on b and c; the three-state
//     gate is clean on all three;
//   - between unequal states (1,0 -> 0,1) the conventional gate is clean on
//     path a and shows an "alike" transient on b and c; the three-state gate
//     shows it on all three, which does no harm to a pair that is never
//     switched that way.
`timescale 1ns / 1ps
module tb_xor_venn;
  import sm_pkg::*;

  level_t lvl_t, lvl_r;
  logic   cv_valid, cv_pol, cv_coinc;
  logic   ml_valid, ml_pol, ml_coinc;
  int     checks = 0, failures = 0;

  pair_xor    u_conv    (.lvl_t(lvl_t), .lvl_r(lvl_r), .valid(cv_valid), .pol(cv_pol), .coinc(cv_coinc));
  mallory_xor u_mallory (.lvl_t(lvl_t), .lvl_r(lvl_r), .valid(ml_valid), .pol(ml_pol), .coinc(ml_coinc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int clamp15(int v);
    return (v < 0) ? 0 : (v > 15) ? 15 : v;
  endfunction

  // Walk from (t0, r0) to (t1, r1); speeds in half-levels per step.
  // Returns the number of output changes of each gate's coincidence output.
  task automatic walk(input int t0, input int r0, input int t1, input int r1,
                      input int sp_t, input int sp_r,
                      output int ch_cv, output int ch_ml);
    logic last_cv, last_ml;
    ch_cv = 0;
    ch_ml = 0;
    lvl_t = level_t'(t0);
    lvl_r = level_t'(r0);
    #1;
    last_cv = cv_coinc;
    last_ml = ml_coinc;
    for (int k = 1; k <= 40; k++) begin
      automatic int dt = (t1 > t0) ? (k * sp_t) / 2 : -((k * sp_t) / 2);
      automatic int dr = (r1 > r0) ? (k * sp_r) / 2 : -((k * sp_r) / 2);
      lvl_t = level_t'(clamp15(t0 + dt));
      lvl_r = level_t'(clamp15(r0 + dr));
      #1;
      if (cv_coinc != last_cv) ch_cv++;
      if (ml_coinc != last_ml) ch_ml++;
      last_cv = cv_coinc;
      last_ml = ml_coinc;
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
    int cv, ml;
    string row_cv, row_ml;
    $display("input plane, rows T = 15..0, columns R = 0..15 (1 = alike)");
    $display("  conventional        three-state");
    for (int t = 15; t >= 0; t--) begin
      row_cv = "";
      row_ml = "";
      for (int r = 0; r <= 15; r++) begin
        lvl_t = level_t'(t);
        lvl_r = level_t'(r);
        #1;
        row_cv = {row_cv, cv_coinc ? "1" : "0"};
        row_ml = {row_ml, ml_coinc ? "1" : "0"};
        // Steady-state corners agree.
        if ((t == 0 || t == 15) && (r == 0 || r == 15)) begin
          check(cv_coinc == ml_coinc, "gates agree at the corners");
        end
        // Every point the three-state gate calls different, the
        // conventional gate does too.
        if (!ml_coinc) check(!cv_coinc, "three-state 'different' inside conventional");
      end
      $display("  %s    %s", row_cv, row_ml);
    end

    // 0,0 -> 1,1
    walk(0, 0, 15, 15, 2, 2, cv, ml);
    check(cv == 0 && ml == 0, "equal states, path a: both clean");
    walk(0, 0, 15, 15, 3, 2, cv, ml);
    check(cv == 2 && ml == 0, $sformatf("equal states, path b: conventional %0d, three-state %0d", cv, ml));
    walk(0, 0, 15, 15, 2, 3, cv, ml);
    check(cv == 2 && ml == 0, $sformatf("equal states, path c: conventional %0d, three-state %0d", cv, ml));
    // 1,1 -> 0,0
    walk(15, 15, 0, 0, 3, 2, cv, ml);
    check(cv == 2 && ml == 0, $sformatf("equal states falling: conventional %0d, three-state %0d", cv, ml));
    // 1,0 -> 0,1
    walk(15, 0, 0, 15, 2, 2, cv, ml);
    check(cv == 0 && ml == 2, $sformatf("unequal states, path a: conventional %0d, three-state %0d", cv, ml));
    walk(15, 0, 0, 15, 3, 2, cv, ml);
    check(cv == 2 && ml == 2, $sformatf("unequal states, path b: conventional %0d, three-state %0d", cv, ml));
    walk(15, 0, 0, 15, 2, 3, cv, ml);
    check(cv == 2 && ml == 2, $sformatf("unequal states, path c: conventional %0d, three-state %0d", cv, ml));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
