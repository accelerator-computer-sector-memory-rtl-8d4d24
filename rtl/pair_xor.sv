// pair_xor - coding check of one wire pair with a conventional exclusive OR.
//
// A pair is correctly coded when exactly one of its two wires is at the
// logic level and the other is at ground; both at ground or both at the
// logic level is not allowed. Each wire level is compared with the normal
// gate threshold TH_MID and the two results are combined by an exclusive OR:
// `valid` is high for a correctly coded pair, and `pol` tells which wire is
// the active one (1: the T wire). `coinc` is the coincidence output of the
// gate, the complement of `valid`, which is what the R131 module delivers.
// Because both wires use one threshold, a pair switching between two equal
// states (0,0 to 1,1) with unequal rise times passes through an unequal
// state and `valid` pulses briefly; the control pair therefore uses
// mallory_xor instead. The coding rule is the published one; the level
// code and the half-swing threshold are this design's choice. Purely
// combinational.
module pair_xor
  import sm_pkg::*;
(
  input  level_t lvl_t,   // level of the T wire
  input  level_t lvl_r,   // level of the R wire
  output logic   valid,   // pair is correctly coded (wires differ)
  output logic   pol,     // polarity: T wire is the active one
  output logic   coinc    // coincidence output (wires alike)
);

  logic bit_t, bit_r;

  always_comb begin
    bit_t = (lvl_t >= level_t'(TH_MID));
    bit_r = (lvl_r >= level_t'(TH_MID));
    valid = bit_t ^ bit_r;
    coinc = ~valid;
    pol   = bit_t;
  end

endmodule
