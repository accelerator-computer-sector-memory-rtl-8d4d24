// input_checker - coding check of all eleven input pairs and the S gate.
//
// The control pair (index PAIR_CP) is checked by the three-state coincidence
// circuit (mallory_xor), which tolerates the control room's time-coded
// switching sequence; the six other looped pairs, the three subdevice pairs
// and the sector select pair are checked by conventional exclusive ORs
// (pair_xor). The S gate then forms the "command present" signal
//   S = CP . C1 . ... . C6 . (SD0 . SD1 . SD2) . SS
// i.e. S is high only when every one of the eleven pairs is correctly coded.
// The choice of gate per pair and the S equation follow the published
// circuit. Outputs are combinational: `valid` and `pol` per pair, and `s`.
module input_checker
  import sm_pkg::*;
(
  input  level_t                lvl_t [N_PAIRS],  // T wire level per pair
  input  level_t                lvl_r [N_PAIRS],  // R wire level per pair
  output logic   [N_PAIRS-1:0]  valid,            // pair correctly coded
  output logic   [N_PAIRS-1:0]  pol,              // pair polarity
  output logic                  s                 // command signal exists
);

  logic [N_PAIRS-1:0] coinc_unused;

  mallory_xor u_cp_xor (
    .lvl_t (lvl_t[PAIR_CP]),
    .lvl_r (lvl_r[PAIR_CP]),
    .valid (valid[PAIR_CP]),
    .pol   (pol[PAIR_CP]),
    .coinc (coinc_unused[PAIR_CP])
  );

  for (genvar i = 1; i < N_PAIRS; i++) begin : g_pair
    pair_xor u_xor (
      .lvl_t (lvl_t[i]),
      .lvl_r (lvl_r[i]),
      .valid (valid[i]),
      .pol   (pol[i]),
      .coinc (coinc_unused[i])
    );
  end

  // S gate: all pairs present and correctly coded.
  assign s = &valid;

endmodule
