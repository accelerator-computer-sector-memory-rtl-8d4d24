// sector_memory - solid-state command memory between the control room's
// wire pairs and a sector's relay remote-control decoder.
//
// A command arrives as eleven coded wire pairs (control pair, six looped
// pairs, three subdevice pairs, sector select). input_checker verifies that
// every pair is correctly coded and forms S. When S is present and the
// memory is free, the load pulse P0 stores the seven looped pairs and the
// three subdevice pairs in fast_store_reg; as soon as the stored command
// agrees with the input (Same), an acknowledge goes back to the control room
// and the memory turns busy. sector_control then waits until the switched
// sector panels' seize relays K1 and K2 have relaxed and the relax delay T1
// has run, and drives the execute signal D for d_ms milliseconds, longer if
// the same command is held or sent again or a subdevice pair asks for a
// stretch. While D is on, output_drivers present the stored command to the
// decoder relays and K3 is energised. After D, T1 runs once more; the
// memory becomes free when T1 has ended and the command has been removed.
// A different command arriving while busy is ignored until then. K3A, high
// while S, D or T1 is present, keeps switched sector panels 1 and 2 off.
//
// Interface: wire levels per pair (index order of sm_pkg::pair_idx_e, level
// 0 = ground, LVL_MAX = full logic level), the seize relay contacts k1/k2,
// an external reset for the subdevice flip-flops and the two delay settings
// in milliseconds. Everything is synchronous to `clk` (CLK_HZ, default
// 1 MHz, this design's choice); `rst_n` is a synchronous active-low reset to
// the free state.
module sector_memory
  import sm_pkg::*;
#(
  parameter int unsigned CLK_HZ = 1_000_000,  // clock frequency
  parameter int unsigned P0_US  = 10          // load pulse width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  level_t            lvl_t [N_PAIRS],  // T wire levels
  input  level_t            lvl_r [N_PAIRS],  // R wire levels
  input  logic              k1,               // SSP 1 seize relay
  input  logic              k2,               // SSP 2 seize relay
  input  logic              ext_reset,        // clear subdevice flip-flops
  input  logic [MS_W-1:0]   t1_ms,            // relax delay setting
  input  logic [MS_W-1:0]   d_ms,             // execute period setting
  output logic              s,                // command present
  output logic              p0,               // load pulse
  output logic              ack,              // acknowledge A to CCR
  output logic              busy,             // busy state B
  output logic              t1,               // relax delay running
  output logic              d,                // execute signal
  output logic              k3,               // execute relay
  output logic              k3a,              // inhibit SSP 1 and 2
  output logic [N_CTRL-1:0] drv_t,            // decoder drivers, bit = 1
  output logic [N_CTRL-1:0] drv_r,            // decoder drivers, bit = 0
  output logic [N_SD-1:0]   sd_q              // stored subdevice bits
);

  logic [N_PAIRS-1:0] valid, pol;
  command_t           cmd_q;
  logic               match;
  logic               sd_stretch;

  input_checker u_inputs (
    .lvl_t (lvl_t),
    .lvl_r (lvl_r),
    .valid (valid),
    .pol   (pol),
    .s     (s)
  );

  fast_store_reg u_store (
    .clk       (clk),
    .rst_n     (rst_n),
    .p0        (p0),
    .ext_reset (ext_reset),
    .ctrl_pol  (pol[N_CTRL-1:0]),
    .sd_pol    (pol[PAIR_SD2:PAIR_SD0]),
    .cmd_q     (cmd_q),
    .match     (match)
  );

  // A subdevice pair that is correctly coded and active stretches D.
  assign sd_stretch = |(valid[PAIR_SD2:PAIR_SD0] & pol[PAIR_SD2:PAIR_SD0]);

  sector_control #(.CLK_HZ(CLK_HZ), .P0_US(P0_US)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .s          (s),
    .match      (match),
    .sd_stretch (sd_stretch),
    .k1         (k1),
    .k2         (k2),
    .t1_ms      (t1_ms),
    .d_ms       (d_ms),
    .p0         (p0),
    .ack        (ack),
    .busy       (busy),
    .t1         (t1),
    .d          (d),
    .k3         (k3),
    .k3a        (k3a)
  );

  output_drivers u_drivers (
    .d        (d),
    .cmd_ctrl (cmd_q.ctrl),
    .drv_t    (drv_t),
    .drv_r    (drv_r)
  );

  assign sd_q = cmd_q.sd;

endmodule
