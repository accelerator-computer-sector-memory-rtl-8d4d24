// output_drivers - decoder relay drive for the seven looped pairs.
//
// Each of the seven looped pairs is re-created towards the sector's RCS
// receiver by two relay drivers: one enabled by the stored bit and D, one by
// the complement of the stored bit and D. Their relays connect the two
// wires of the outgoing pair to the +24 V / -24 V supply in one polarity or
// the other, so while D is on the decoder sees the stored command, and while
// D is off neither driver of any pair is energised. The relays and the
// driver stages themselves are electrical parts outside this logic. The
// pairing of drivers with the stored bit and its complement follows the
// published driver arrangement; which wire is called T is this design's
// convention.
// Purely combinational.
module output_drivers
  import sm_pkg::*;
(
  input  logic              d,        // execute (drive) signal
  input  logic [N_CTRL-1:0] cmd_ctrl, // stored control bits
  output logic [N_CTRL-1:0] drv_t,    // driver for "stored bit = 1"
  output logic [N_CTRL-1:0] drv_r     // driver for "stored bit = 0"
);

  always_comb begin
    drv_t = {N_CTRL{d}} & cmd_ctrl;
    drv_r = {N_CTRL{d}} & ~cmd_ctrl;
  end

endmodule
