// tb_sector_memory - end-to-end test of the sector memory at its default
// parameters (1 MHz clock, real millisecond delays).
//
// The bench plays the control room and the sector relays: it codes commands
// onto the eleven wire pairs, models the switched-sector-panel seize relays
// K1/K2 dropping out a few milliseconds after K3A disconnects them, and
// checks every step of the sequence against timings worked out here from
// the delay settings: load and acknowledge within 50 us, T1 before D when a
// panel had the sector, D of d_ms after the last Same, T1 after D, release.
// Scenarios: computer selects immediately, panel previously selected with a
// momentary and with a held command, the same command sent again during D,
// a different command during D, a subdevice stretch, a miscoded pair, the
// control pair's time-coded switching sequence, the external subdevice
// reset and the clamping of the delay settings. Each mechanism is counted
// and one that never happened counts as a failure.
`timescale 1ns / 1ps
module tb_sector_memory;
  import sm_pkg::*;

  localparam longint MS = 1000;   // cycles per millisecond at 1 MHz

  logic              clk = 1'b0;
  logic              rst_n;
  level_t            lvl_t [N_PAIRS];
  level_t            lvl_r [N_PAIRS];
  logic              k1, k2, ext_reset;
  logic [MS_W-1:0]   t1_ms, d_ms;
  logic              s, p0, ack, busy, t1, d, k3, k3a;
  logic [N_CTRL-1:0] drv_t, drv_r;
  logic [N_SD-1:0]   sd_q;

  sector_memory dut (.*);

  always #500 clk = ~clk;

  int     checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  int n_load = 0, n_ack_fast = 0, n_immediate = 0, n_t1_first = 0;
  int n_held = 0, n_retrig = 0, n_diff_ignored = 0, n_diff_later = 0;
  int n_sd_stretch = 0, n_code_reject = 0, n_cp_clean = 0, n_ext_reset = 0;
  int n_clamp = 0, n_t1_after = 0, n_inhibit = 0;

  // Command the decoder should see while D is on.
  logic [N_CTRL-1:0] exp_cmd;

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

  // Code one pair: pol 1 drives the T wire, pol 0 the R wire.
  task automatic code_pair(input int i, input bit p);
    lvl_t[i] = p ? level_t'(LVL_MAX) : '0;
    lvl_r[i] = p ? '0 : level_t'(LVL_MAX);
  endtask

  task automatic send(input logic [N_CTRL-1:0] c, input logic [N_SD-1:0] sdv);
    for (int i = 0; i < N_CTRL; i++) code_pair(i, c[i]);
    for (int i = 0; i < N_SD; i++)   code_pair(PAIR_SD0 + i, sdv[i]);
    code_pair(PAIR_SS, 1'b1);
  endtask

  task automatic remove();
    for (int i = 0; i < N_PAIRS; i++) begin
      lvl_t[i] = '0;
      lvl_r[i] = '0;
    end
  endtask

  function automatic logic sig(input int id);
    case (id)
      0: return d;
      1: return t1;
      2: return busy;
      3: return ack;
      4: return k3a;
      default: return s;
    endcase
  endfunction

  // Wait until signal `id` has value `v`; returns the cycle.
  task automatic wait_sig(input int id, input logic v, input longint max,
                          output longint at);
    longint n;
    n = 0;
    while (sig(id) !== v && n < max) begin
      @(posedge clk); #1;
      n++;
    end
    at = longint'(cyc);
    check(sig(id) === v, $sformatf("signal %0d did not reach %0b", id, v));
  endtask

  task automatic cycles(input longint n);
    repeat (int'(n)) @(posedge clk);
    #1;
  endtask

  // Continuous checks: decoder drivers follow D and the stored command.
  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      if (!d) begin
        if (drv_t != '0 || drv_r != '0) begin
          failures++; checks++;
          $display("FAIL @%0d: drivers on without D", cyc);
        end
      end else if (drv_t != exp_cmd || drv_r != ~exp_cmd || !k3 || !k3a) begin
        failures++; checks++;
        $display("FAIL @%0d: drivers %b/%b, expected %b", cyc, drv_t, drv_r, exp_cmd);
      end
      if (p0 && !busy) n_load++;
    end
  end

  // Seize relay model: a seized panel relay drops DROP cycles after K3A.
  localparam longint DROP = 5 * MS;

  longint t_ack, t_rm, t_drise, t_dfall, t_t1rise, t_t1fall, t_free, t_app, t_k;

  // One whole operation from the free state with the command momentary or
  // held for `hold` cycles; `seized` says that a panel relay is energised.
  task automatic operation(input logic [N_CTRL-1:0] c, input logic [N_SD-1:0] sdv,
                           input longint hold, input bit seized);
    longint t1_len, d_len;
    t1_len = longint'(t1_ms) * MS;
    d_len  = longint'(d_ms) * MS;
    k1 = seized;
    cycles(10);
    exp_cmd = c;
    t_app = cyc;
    send(c, sdv);
    wait_sig(3, 1'b1, 100, t_ack);
    cycles(1);
    check(busy && k3a, "busy and K3A after acknowledge");
    if (t_ack - t_app <= 50) n_ack_fast++;
    $display("acknowledge %0d us after the command was applied", t_ack - t_app);
    check(t_ack - t_app <= 50, "acknowledge within 50 us");
    if (seized) begin
      // Relay drops after K3A; T1 must then run before D.
      cycles(DROP);
      check(!d, "no D while the panel relay is held");
      if (k3a) n_inhibit++;
      k1 = 1'b0;
      t_k = cyc;
      wait_sig(1, 1'b1, 10, t_t1rise);
      wait_sig(0, 1'b1, t1_len + 10, t_drise);
      check(near(t_drise - t_k, t1_len, 3), "D starts one T1 after the relays relax");
      if (near(t_drise - t_k, t1_len, 3)) n_t1_first++;
    end else begin
      wait_sig(0, 1'b1, 10, t_drise);
      if (t_drise - t_ack <= 5) n_immediate++;
      check(t_drise - t_ack <= 5, "D starts immediately");
    end
    // Hold the command for `hold` cycles from its application.
    while (cyc - t_app < hold) cycles(1);
    remove();
    t_rm = cyc;
    wait_sig(0, 1'b0, 2 * d_len + hold, t_dfall);
    if (t_rm > t_drise) begin
      check(near(t_dfall - t_rm, d_len, 3), "D ends d_ms after the command goes");
      if (hold > d_len && near(t_dfall - t_rm, d_len, 3)) n_held++;
    end else begin
      check(near(t_dfall - t_drise, d_len, 3), "momentary command: D lasts d_ms");
    end
    wait_sig(1, 1'b1, 5, t_t1rise);
    wait_sig(2, 1'b0, t1_len + 10, t_free);
    check(near(t_free - t_dfall, t1_len, 3), "free one T1 after D");
    if (near(t_free - t_dfall, t1_len, 3)) n_t1_after++;
    check(!k3a && !t1 && !d, "all relay signals off when free");
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; k1 = 1'b0; k2 = 1'b0; ext_reset = 1'b0;
    t1_ms = 500; d_ms = 500;
    exp_cmd = '0;
    remove();
    cycles(5);
    rst_n = 1'b1;
    cycles(5);
    check(!busy && !d && !t1 && !k3a, "idle after reset");

    // 1. Computer selects the sector directly: D right after loading.
    operation(7'b1010011, 3'b000, 1 * MS, 1'b0);

    // 2. A panel had the sector, momentary command: T1, D, T1.
    operation(7'b0110101, 3'b010, 2 * MS, 1'b1);

    // 3. A panel had the sector, command held for 800 ms.
    operation(7'b1111000, 3'b001, 800 * MS, 1'b1);

    // 4. The same command sent again during D stretches it.
    begin
      longint t_second;
      exp_cmd = 7'b0001111;
      send(exp_cmd, 3'b000);
      wait_sig(3, 1'b1, 100, t_ack);
      cycles(MS);
      remove();
      wait_sig(0, 1'b1, 10, t_drise);
      cycles(300 * MS);
      send(exp_cmd, 3'b000);
      cycles(MS);
      check(ack, "acknowledge for the repeated command");
      remove();
      t_second = cyc;
      wait_sig(0, 1'b0, 600 * MS, t_dfall);
      check(near(t_dfall - t_second, 500 * MS, 3), "D ends d_ms after the repeat");
      if (t_dfall - t_drise > 700 * MS) n_retrig++;
      wait_sig(2, 1'b0, 600 * MS, t_free);
    end

    // 5. A different command during D is ignored, then executed.
    begin
      exp_cmd = 7'b1000001;
      send(exp_cmd, 3'b000);
      wait_sig(3, 1'b1, 100, t_ack);
      cycles(MS);
      remove();
      wait_sig(0, 1'b1, 10, t_drise);
      cycles(200 * MS);
      send(7'b0111110, 3'b111);
      cycles(10);
      check(s && !ack && busy, "different command: present but not acknowledged");
      wait_sig(0, 1'b0, 400 * MS, t_dfall);
      check(near(t_dfall - t_drise, 500 * MS, 3), "different command does not stretch D");
      if (!ack) n_diff_ignored++;
      wait_sig(1, 1'b0, 600 * MS, t_t1fall);
      exp_cmd = 7'b0111110;   // next D carries the new command
      wait_sig(3, 1'b1, 100, t_ack);
      check(near(t_ack - t_t1fall, 10, 12), "new command loaded when T1 ends");
      wait_sig(0, 1'b1, 10, t_drise);
      check(sd_q == 3'b111, "new subdevice bits stored");
      if (sd_q == 3'b111) n_diff_later++;
      cycles(50 * MS);
      remove();
      t_rm = cyc;
      wait_sig(0, 1'b0, 600 * MS, t_dfall);
      check(near(t_dfall - t_rm, 500 * MS, 3), "second command: D ends d_ms after removal");
      wait_sig(2, 1'b0, 600 * MS, t_free);
    end

    // 6. A subdevice pair alone stretches D.
    begin
      exp_cmd = 7'b0100100;
      send(exp_cmd, 3'b000);
      wait_sig(3, 1'b1, 100, t_ack);
      cycles(MS);
      remove();
      wait_sig(0, 1'b1, 10, t_drise);
      cycles(200 * MS);
      code_pair(PAIR_SD0, 1'b1);
      cycles(5);
      check(!s, "a lone subdevice pair is not a command");
      cycles(600 * MS);
      remove();
      t_rm = cyc;
      wait_sig(0, 1'b0, 600 * MS, t_dfall);
      check(near(t_dfall - t_rm, 500 * MS, 3), "subdevice stretch: D ends d_ms after it");
      if (t_dfall - t_drise > 700 * MS) n_sd_stretch++;
      wait_sig(2, 1'b0, 600 * MS, t_free);
    end

    // 7. A miscoded pair (both wires up, then both down) blocks S.
    begin
      send(7'b1100110, 3'b000);
      lvl_t[PAIR_PRC] = level_t'(LVL_MAX);
      lvl_r[PAIR_PRC] = level_t'(LVL_MAX);
      cycles(5 * MS);
      check(!s && !busy && !ack, "both wires up: no command");
      lvl_t[PAIR_PRC] = '0;
      lvl_r[PAIR_PRC] = '0;
      cycles(5 * MS);
      check(!s && !busy && !ack, "both wires down: no command");
      if (!busy && !s) n_code_reject++;
      remove();
      cycles(10);
    end

    // 8. Control pair time-coded 00 -> 11 -> 10 with unequal rise times,
    //    shorter delays, and clamping of out-of-range settings.
    begin
      automatic int ramp_t [9] = '{0, 3, 6, 9, 12, 15, 15, 15, 15};
      automatic int ramp_r [9] = '{0, 2, 4, 6, 8, 10, 12, 14, 15};
      automatic bit glitch = 1'b0;
      t1_ms = 100;
      d_ms  = 20;            // below range: clamped to 100 ms
      send(7'b0000001, 3'b000);
      lvl_t[PAIR_CP] = '0;
      lvl_r[PAIR_CP] = '0;
      cycles(10);
      for (int k = 0; k < 9; k++) begin
        lvl_t[PAIR_CP] = level_t'(ramp_t[k]);
        lvl_r[PAIR_CP] = level_t'(ramp_r[k]);
        cycles(1);
        if (s || busy) glitch = 1'b1;
      end
      cycles(20);
      check(!glitch && !busy, "no command during the 00 -> 11 transition");
      // 11 -> 10: conductor B falls.
      for (int k = 14; k >= 0; k -= 3) begin
        lvl_r[PAIR_CP] = level_t'(k);
        cycles(1);
      end
      lvl_r[PAIR_CP] = '0;
      exp_cmd = 7'b0000001;
      wait_sig(3, 1'b1, 100, t_ack);
      if (!glitch) n_cp_clean++;
      wait_sig(0, 1'b1, 10, t_drise);
      remove();
      wait_sig(0, 1'b0, 200 * MS, t_dfall);
      check(near(t_dfall - t_drise, 100 * MS, 3), "D clamped to 100 ms");
      wait_sig(2, 1'b0, 200 * MS, t_free);
      check(near(t_free - t_dfall, 100 * MS, 3), "T1 set to 100 ms");
      if (near(t_dfall - t_drise, 100 * MS, 3)) n_clamp++;
    end

    // 9. External reset clears the subdevice flip-flops only.
    begin
      t1_ms = 100; d_ms = 100;
      exp_cmd = 7'b1011001;
      send(exp_cmd, 3'b101);
      wait_sig(3, 1'b1, 100, t_ack);
      check(sd_q == 3'b101, "subdevice bits stored");
      cycles(MS);
      remove();
      wait_sig(0, 1'b1, 10, t_drise);
      ext_reset = 1'b1;
      cycles(1);
      ext_reset = 1'b0;
      cycles(1);
      check(sd_q == 3'b000, "external reset clears subdevice bits");
      if (sd_q == 3'b000) n_ext_reset++;
      wait_sig(2, 1'b0, 300 * MS, t_free);
    end

    // 10. A full-length operation again with the default 500 ms settings.
    t1_ms = 500; d_ms = 500;
    operation(7'b0101010, 3'b100, 3 * MS, 1'b1);

    $display("mechanisms: load=%0d ack<=50us=%0d immediate=%0d t1_first=%0d held=%0d",
             n_load, n_ack_fast, n_immediate, n_t1_first, n_held);
    $display("            retrigger=%0d diff_ignored=%0d diff_later=%0d sd_stretch=%0d",
             n_retrig, n_diff_ignored, n_diff_later, n_sd_stretch);
    $display("            code_reject=%0d cp_clean=%0d ext_reset=%0d clamp=%0d t1_after=%0d inhibit=%0d",
             n_code_reject, n_cp_clean, n_ext_reset, n_clamp, n_t1_after, n_inhibit);
    check(n_load > 0, "load pulse seen");
    check(n_ack_fast > 0, "fast acknowledge seen");
    check(n_immediate > 0, "immediate execute seen");
    check(n_t1_first > 0, "T1 before D seen");
    check(n_held > 0, "held command seen");
    check(n_retrig > 0, "retrigger seen");
    check(n_diff_ignored > 0, "different command ignored");
    check(n_diff_later > 0, "different command executed later");
    check(n_sd_stretch > 0, "subdevice stretch seen");
    check(n_code_reject > 0, "coding error rejected");
    check(n_cp_clean > 0, "clean control pair transition seen");
    check(n_ext_reset > 0, "external reset seen");
    check(n_clamp > 0, "delay clamp seen");
    check(n_t1_after > 0, "T1 after D seen");
    check(n_inhibit > 0, "panel inhibit seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
