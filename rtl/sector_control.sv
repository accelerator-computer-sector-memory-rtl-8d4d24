// sector_control - free/busy sequencing of the sector memory.
//
// This block implements the logic equations of the sector memory as a
// synchronous circuit clocked at CLK_HZ:
//   P0   = S . F                       load pulse of the fast storage register
//   Same = S . (live command == stored command)
//   A    = Same                        acknowledge to the control room
//   set B on Same, set F on T1' . D' . Same'
//   T1   started when the SSP seize relays K1, K2 both relax, and again when
//        D ends; it lets the decoder relays relax (t1_ms milliseconds)
//   D    started when busy, T1 off and K1, K2 relaxed; recharged while Same
//        is present or a subdevice pair alone asks for a stretch; ends d_ms
//        milliseconds after the last recharge
//   K3   = D                           connects the stored command
//   K3A  = S + D + T1                  disconnects SSP 1 and SSP 2
// P0 is a pulse of P0_US microseconds started when S and F are both high;
// the register loads while P0 and S are high.
// Two points are this design's own reading of the sequence: D is started a
// second time for the same busy period only if the command is present again
// (Same), and F is set only after D has run at least once, so a command is
// never dropped before it has been executed. D follows T1 without a gap and
// T1 follows D without a gap.
// The two delays are adjustable at run time through t1_ms and d_ms (the
// document gives an adjustment range of 100 to 500 ms); values outside that
// range are clamped to it. All outputs are registered or decoded from
// registers plus the current inputs; reset (synchronous, active low) puts
// the block in the free state with all timers idle.
module sector_control
  import sm_pkg::*;
#(
  parameter int unsigned CLK_HZ = 1_000_000,  // clock frequency
  parameter int unsigned P0_US  = 10          // load pulse width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            s,           // command signal exists
  input  logic            match,       // live control pairs == stored
  input  logic            sd_stretch,  // a subdevice pair requests a stretch
  input  logic            k1,          // SSP 1 seize relay energised
  input  logic            k2,          // SSP 2 seize relay energised
  input  logic [MS_W-1:0] t1_ms,       // relax delay setting
  input  logic [MS_W-1:0] d_ms,        // execute period setting
  output logic            p0,          // load pulse
  output logic            ack,         // acknowledge A to the control room
  output logic            busy,        // busy state B
  output logic            t1,          // relax delay running
  output logic            d,           // execute / drive signal
  output logic            k3,          // execute relay (tree driver)
  output logic            k3a          // inhibit SSP 1 and 2
);

  localparam int unsigned CYC_MS = (CLK_HZ / 1000 > 0) ? CLK_HZ / 1000 : 1;
  localparam int unsigned CNT_W  = $clog2(((1 << MS_W) - 1) * CYC_MS + 1);
  localparam longint unsigned P0_RAW = longint'(CLK_HZ) * P0_US / 1_000_000;
  localparam int unsigned P0_CYC = (P0_RAW > 0) ? int'(P0_RAW) : 1;
  localparam int unsigned P0_W   = $clog2(P0_CYC + 1);

  // ------------------------------------------------------------------
  // Delay settings, clamped to the adjustment range and scaled to cycles.
  logic [MS_W-1:0]  t1_set, d_set;
  logic [CNT_W-1:0] t1_len, d_len;

  always_comb begin
    t1_set = t1_ms;
    if (t1_ms < MS_W'(MS_MIN)) t1_set = MS_W'(MS_MIN);
    if (t1_ms > MS_W'(MS_MAX)) t1_set = MS_W'(MS_MAX);
    d_set = d_ms;
    if (d_ms < MS_W'(MS_MIN)) d_set = MS_W'(MS_MIN);
    if (d_ms > MS_W'(MS_MAX)) d_set = MS_W'(MS_MAX);
    t1_len = CNT_W'(t1_set) * CNT_W'(CYC_MS);
    d_len  = CNT_W'(d_set) * CNT_W'(CYC_MS);
  end

  // ------------------------------------------------------------------
  // Seize relays: T1 starts when both relax (K1' . K2' rises).
  logic k_relaxed, kr_q, kr_rise;

  assign k_relaxed = ~k1 & ~k2;
  assign kr_rise   = k_relaxed & ~kr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) kr_q <= 1'b1;
    else        kr_q <= k_relaxed;
  end

  // ------------------------------------------------------------------
  // Same and acknowledge.
  logic same, free;

  assign same = s & match;
  assign ack  = same;

  // ------------------------------------------------------------------
  // Load pulse P0: a P0_US pulse started by S . F.
  logic [P0_W-1:0] p0_cnt;
  logic            p0_on;

  assign p0_on = (p0_cnt != '0);
  assign p0    = p0_on & s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p0_cnt <= '0;
    end else if (p0_on) begin
      p0_cnt <= p0_cnt - P0_W'(1);
    end else if (s & free) begin
      p0_cnt <= P0_W'(P0_CYC);
    end
  end

  // ------------------------------------------------------------------
  // Relax delay T1 and execute one-shot D.
  logic t1_expire_unused, t1_next;
  logic d_start, d_hold, d_expire, d_next_unused;
  logic ran;      // D has run at least once in this busy period

  // A subdevice stretch counts only when no other command is on the pairs,
  // so that a different command never prolongs the present one.
  assign d_hold  = same | (sd_stretch & ~s);
  assign d_start = busy & ~t1_next & k_relaxed & ~d & (~ran | same);

  one_shot #(.CNT_W(CNT_W)) u_t1 (
    .clk         (clk),
    .rst_n       (rst_n),
    .trig        (kr_rise | d_expire),
    .hold        (1'b0),
    .len         (t1_len),
    .active      (t1),
    .expire      (t1_expire_unused),
    .active_next (t1_next)
  );

  one_shot #(.CNT_W(CNT_W)) u_d (
    .clk         (clk),
    .rst_n       (rst_n),
    .trig        (d_start),
    .hold        (d_hold),
    .len         (d_len),
    .active      (d),
    .expire      (d_expire),
    .active_next (d_next_unused)
  );

  // ------------------------------------------------------------------
  // Free/busy flip-flop.
  logic set_f;

  assign set_f = busy & ran & ~t1 & ~d & ~same;
  assign busy  = ~free;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      free <= 1'b1;
      ran  <= 1'b0;
    end else begin
      if (same)        free <= 1'b0;   // set B = Same
      else if (set_f)  free <= 1'b1;   // set F = T1' . D' . Same'
      if (set_f)         ran <= 1'b0;
      else if (d_expire) ran <= 1'b1;
    end
  end

  // ------------------------------------------------------------------
  // Relay signals.
  assign k3  = d;
  assign k3a = s | d | t1;

  // The execute relay is only ever driven while the memory is busy.
  a_d_only_busy : assert property (@(posedge clk) disable iff (!rst_n) d |-> busy);
  // A load pulse is only ever started from the free state.
  a_p0_free : assert property (@(posedge clk) disable iff (!rst_n)
                               (p0_on && !$past(p0_on)) |-> $past(free));

endmodule
