// mallory_xor - coding check of the control pair, free of transients when
// the pair moves between two equal states.
//
// The circuit is a coincidence gate, AB + a'b', whose two halves see the wire
// levels through different thresholds. The AND half (A, B) uses the normal
// threshold TH_MID. The NOR half (a, b) is fed through an attenuator, which
// is modelled as the higher threshold TH_HI: it only registers a wire that
// has reached nearly its full level. The coincidence output is therefore low
// ("different") only in the two corners of the input plane where one wire is
// fully up and the other is still below half swing. A change from 0,0 to 1,1
// with moderately unequal rise times stays "alike" all the way, so the coded
// sequence 00 -> 11 -> 10 sent from the control room gives the clean
// coincidence sequence 1, 1, 0 instead of 1, 0, 1, 0. In steady state (wires
// at 0 or LVL_MAX) the gate is an ordinary exclusive OR.
// `valid` is the XOR sense (the complement of the coincidence output) and
// `pol` the polarity, taken from the normal-threshold T input.
// The gate structure follows the published coincidence circuit; the two
// threshold values are this design's choice. Purely combinational.
module mallory_xor
  import sm_pkg::*;
(
  input  level_t lvl_t,   // level of conductor A (T wire)
  input  level_t lvl_r,   // level of conductor B (R wire)
  output logic   valid,   // pair is correctly coded
  output logic   pol,     // polarity: T wire is the active one
  output logic   coinc    // coincidence output AB + a'b'
);

  logic in_a, in_b;       // normal inputs of the AND (NAND gate 1)
  logic att_a, att_b;     // attenuated inputs of the NOR (gate 2)

  always_comb begin
    in_a  = (lvl_t >= level_t'(TH_MID));
    in_b  = (lvl_r >= level_t'(TH_MID));
    att_a = (lvl_t >= level_t'(TH_HI));
    att_b = (lvl_r >= level_t'(TH_HI));
    // NAND(NAND(A,B), NOT(NOR(a,b))) = AB + a'b'
    coinc = ~(~(in_a & in_b) & ~(~(att_a | att_b)));
    valid = ~coinc;
    pol   = in_a;
  end

endmodule
