// tb_sector_control - sequencing test of the free/busy control at a reduced
// clock (100 kHz, so one millisecond is 100 cycles; the delay settings keep
// their millisecond meaning).
//
// The bench models the fast storage register: a command number on the
// pairs (0 = none) is stored on P0 and `match` is high while the live
// command equals the stored one. It then checks, with timings computed from
// the settings: P0 width (50 us) and acknowledge latency; D straight after
// loading when no panel holds the sector; T1 before D after the seize
// relays relax; D recharged by a held or repeated command and by a lone
// subdevice stretch, but not by a different command; T1 after D; release
// only when T1, D and the command are gone; the loading of a waiting
// different command; the clamping of the settings; and K3 = D,
// K3A = S + D + T1 in every cycle.
`timescale 1ns / 1ps
module tb_sector_control;
  import sm_pkg::*;

  localparam int unsigned CLK_HZ = 100_000;
  localparam longint      MS     = 100;

  logic            clk = 1'b0;
  logic            rst_n, s, match, sd_stretch, k1, k2;
  logic [MS_W-1:0] t1_ms, d_ms;
  logic            p0, ack, busy, t1, d, k3, k3a;
  int              checks = 0, failures = 0;
  longint          cyc = 0;
  int              live = 0, stored = 0;
  int              n_p0_cycles = 0;
  int              n_diff = 0, n_stretch = 0, n_held = 0, n_t1_first = 0;

  sector_control #(.CLK_HZ(CLK_HZ), .P0_US(50)) dut (.*);

  always #5000 clk = ~clk;

  // Register model.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (p0) begin
      stored <= live;
      n_p0_cycles <= n_p0_cycles + 1;
    end
  end
  always_comb begin
    s     = (live != 0);
    match = (live == stored);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s (s=%0b ack=%0b busy=%0b t1=%0b d=%0b)", cyc, what, s, ack, busy, t1, d);
    end
  endtask

  function automatic bit near(longint a, longint b, longint tol);
    return (a >= b - tol) && (a <= b + tol);
  endfunction

  // Relay equations every cycle.
  always @(negedge clk) begin
    if (rst_n) begin
      if (k3 != d || k3a != (s | d | t1) || ack != (s && match)) begin
        failures++;
        $display("FAIL @%0d: relay equations", cyc);
      end
      checks++;
    end
  end

  task automatic cycles(input longint n);
    repeat (int'(n)) @(posedge clk);
    #1;
  endtask

  function automatic logic sig(input int id);
    case (id)
      0: return d;
      1: return t1;
      2: return busy;
      default: return ack;
    endcase
  endfunction

  task automatic wait_sig(input int id, input logic v, input longint max, output longint at);
    longint n;
    n = 0;
    while (sig(id) !== v && n < max) begin
      @(posedge clk); #1;
      n++;
    end
    at = longint'(cyc);
    check(sig(id) === v, $sformatf("signal %0d did not reach %0b", id, v));
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ta, tb0, tr, tf, tk, tt;

  initial begin
    rst_n = 1'b0; k1 = 1'b0; k2 = 1'b0; sd_stretch = 1'b0;
    t1_ms = 100; d_ms = 200;
    cycles(3);
    rst_n = 1'b1;
    cycles(3);
    check(!busy && !t1 && !d, "free after reset");

    // A. Sector free, panels released: load, acknowledge, D at once.
    n_p0_cycles = 0;
    tb0 = cyc;
    live = 1;
    wait_sig(3, 1'b1, 20, ta);
    check(ta - tb0 <= 5, "acknowledge within 50 us");
    wait_sig(0, 1'b1, 5, tr);
    check(busy, "busy with D");
    cycles(10);
    check(n_p0_cycles == 5, $sformatf("P0 lasts 5 cycles (%0d)", n_p0_cycles));
    live = 0;
    tt = cyc;
    wait_sig(0, 1'b0, 300 * MS, tf);
    check(near(tf - tt, 200 * MS, 2), "D ends 200 ms after Same");
    wait_sig(1, 1'b1, 2, tt);
    wait_sig(2, 1'b0, 200 * MS, tt);
    check(near(tt - tf, 100 * MS, 2), "free 100 ms after D");

    // B. Panel 1 holds the sector; momentary command.
    k1 = 1'b1;
    cycles(5);
    live = 2;
    wait_sig(3, 1'b1, 20, ta);
    cycles(2 * MS);
    live = 0;
    cycles(3 * MS);
    check(busy && !d && !t1, "waiting for the panel relay");
    k1 = 1'b0;
    tk = cyc;
    wait_sig(1, 1'b1, 3, tt);
    wait_sig(0, 1'b1, 200 * MS, tr);
    check(near(tr - tk, 100 * MS, 2), "D one T1 after the relay relaxed");
    if (near(tr - tk, 100 * MS, 2)) n_t1_first++;
    wait_sig(0, 1'b0, 300 * MS, tf);
    check(near(tf - tr, 200 * MS, 2), "momentary: D lasts 200 ms");
    wait_sig(2, 1'b0, 200 * MS, tt);
    check(near(tt - tf, 100 * MS, 2), "free 100 ms after D");

    // C. Panel 2 holds the sector; command held 500 ms.
    k2 = 1'b1;
    cycles(5);
    tb0 = cyc;
    live = 3;
    wait_sig(3, 1'b1, 20, ta);
    cycles(MS);
    k2 = 1'b0;
    wait_sig(0, 1'b1, 200 * MS, tr);
    while (cyc - tb0 < 500 * MS) cycles(1);
    live = 0;
    tt = cyc;
    wait_sig(0, 1'b0, 300 * MS, tf);
    check(near(tf - tt, 200 * MS, 2), "held: D ends 200 ms after release");
    if (tf - tr > 300 * MS) n_held++;
    wait_sig(2, 1'b0, 200 * MS, tt);

    // D. Different command during D waits; a lone subdevice stretch counts.
    live = 4;
    wait_sig(0, 1'b1, 20, tr);
    cycles(MS);
    live = 0;
    cycles(50 * MS);
    live = 5;                      // different command
    sd_stretch = 1'b1;             // part of that command: no stretch
    cycles(10);
    check(!ack && busy, "different command not acknowledged");
    wait_sig(0, 1'b0, 300 * MS, tf);
    check(near(tf - tr, 201 * MS, 2), "different command does not stretch D");
    if (near(tf - tr, 201 * MS, 2)) n_diff++;
    wait_sig(1, 1'b0, 200 * MS, tt);
    wait_sig(3, 1'b1, 10, ta);
    check(near(ta - tt, 2, 2) && stored == 5, "different command loaded after T1");
    sd_stretch = 1'b0;
    wait_sig(0, 1'b1, 10, tr);
    cycles(MS);
    live = 0;
    sd_stretch = 1'b1;             // subdevice pair alone
    cycles(300 * MS);
    sd_stretch = 1'b0;
    tt = cyc;
    wait_sig(0, 1'b0, 300 * MS, tf);
    check(near(tf - tt, 200 * MS, 2), "lone subdevice pair stretches D");
    if (tf - tr > 400 * MS) n_stretch++;
    wait_sig(2, 1'b0, 200 * MS, tt);

    // E. Settings clamped to 100..500 ms.
    t1_ms = 9'd511; d_ms = 9'd10;
    live = 6;
    wait_sig(0, 1'b1, 20, tr);
    cycles(1);
    live = 0;
    wait_sig(0, 1'b0, 300 * MS, tf);
    check(near(tf - tr, 100 * MS, 3), "D clamped to 100 ms");
    wait_sig(2, 1'b0, 600 * MS, tt);
    check(near(tt - tf, 500 * MS, 3), "T1 clamped to 500 ms");

    check(n_t1_first > 0 && n_held > 0 && n_diff > 0 && n_stretch > 0, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
