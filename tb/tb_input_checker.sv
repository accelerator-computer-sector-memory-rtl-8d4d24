// tb_input_checker - test of the eleven-pair coding check and the S gate.
//
// Random wire levels (mostly cleanly coded, sometimes miscoded or in
// transition) are applied to all pairs. The expected validity of each pair
// comes from the threshold rules: the control pair is "different" only
// when one wire is fully up and the other below half swing, every other pair
// when exactly one wire is at or above half swing. S must be high exactly
// when all eleven pairs are valid. A directed case checks that the same
// half-risen levels are valid on a looped pair but not on the control pair.
`timescale 1ns / 1ps
module tb_input_checker;
  import sm_pkg::*;

  level_t             lvl_t [N_PAIRS];
  level_t             lvl_r [N_PAIRS];
  logic [N_PAIRS-1:0] valid, pol;
  logic               s;
  int                 checks = 0, failures = 0;
  int                 n_s = 0;

  input_checker dut (.*);

  function automatic bit exp_valid(int i, int t, int r);
    if (i == 0) return (t >= 13 && r < 8) || (r >= 13 && t < 8);
    return (t >= 8) != (r >= 8);
  endfunction

  task automatic check_all();
    automatic bit all = 1'b1;
    for (int i = 0; i < N_PAIRS; i++) begin
      automatic bit ev = exp_valid(i, int'(lvl_t[i]), int'(lvl_r[i]));
      checks++;
      if (valid[i] != ev || pol[i] != (lvl_t[i] >= 8)) begin
        failures++;
        $display("FAIL: pair %0d t=%0d r=%0d valid=%b pol=%b", i, lvl_t[i], lvl_r[i], valid[i], pol[i]);
      end
      all &= ev;
    end
    checks++;
    if (s != all) begin
      failures++;
      $display("FAIL: S=%b expected %b", s, all);
    end
    if (s) n_s++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < N_PAIRS; i++) begin
        automatic int sel = $urandom_range(0, 39);
        automatic bit p = $urandom_range(0, 1);
        if (sel == 0) begin
          lvl_t[i] = level_t'($urandom_range(0, 15));
          lvl_r[i] = level_t'($urandom_range(0, 15));
        end else begin
          lvl_t[i] = p ? 4'd15 : 4'd0;
          lvl_r[i] = p ? 4'd0 : 4'd15;
        end
      end
      #1;
      check_all();
    end
    // Half-risen levels: valid on a looped pair, not on the control pair.
    for (int i = 0; i < N_PAIRS; i++) begin
      lvl_t[i] = 4'd10;
      lvl_r[i] = 4'd2;
    end
    #1;
    check_all();
    checks++;
    if (valid[PAIR_CP] || !valid[PAIR_PRA] || s) begin
      failures++;
      $display("FAIL: control pair not using the three-state check");
    end
    checks++;
    if (n_s == 0) begin
      failures++;
      $display("FAIL: S never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
