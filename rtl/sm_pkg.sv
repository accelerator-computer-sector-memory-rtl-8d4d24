// sm_pkg - shared constants and types of the sector memory.
//
// The sector memory receives eleven wire pairs from the central control room:
// the control pair (CP), six further looped pairs (PrA..PrF), three subdevice
// pairs (SD0..SD2) and the sector select pair (SS). Each wire is presented to
// the logic as a small unsigned level: 0 is the 0 V (ground) level and
// LVL_MAX is the full -3 V logic level that the input level shifters deliver.
// Intermediate codes stand for a wire that is still rising or falling; they
// are what lets the control pair's three-state coincidence circuit be
// modelled. The level width and the two thresholds are this design's choice.
package sm_pkg;

  // Wire level code width and the two thresholds.
  localparam int unsigned LVL_W   = 4;
  localparam int unsigned LVL_MAX = (1 << LVL_W) - 1;
  // Threshold of a normal gate input (half swing).
  localparam int unsigned TH_MID  = 8;
  // Threshold of an attenuated gate input: it needs nearly the full swing.
  localparam int unsigned TH_HI   = 13;

  typedef logic [LVL_W-1:0] level_t;

  // Pair counts.
  localparam int unsigned N_CTRL  = 7;   // CP + PrA..PrF, stored and compared
  localparam int unsigned N_SD    = 3;   // subdevice pairs, stored only
  localparam int unsigned N_PAIRS = N_CTRL + N_SD + 1;  // + sector select

  // Pair positions in the input arrays.
  typedef enum int unsigned {
    PAIR_CP  = 0,
    PAIR_PRA = 1, PAIR_PRB = 2, PAIR_PRC = 3,
    PAIR_PRD = 4, PAIR_PRE = 5, PAIR_PRF = 6,
    PAIR_SD0 = 7, PAIR_SD1 = 8, PAIR_SD2 = 9,
    PAIR_SS  = 10
  } pair_idx_e;

  // One command as held in the fast storage register.
  typedef struct packed {
    logic [N_SD-1:0]   sd;    // subdevice pairs SD2..SD0
    logic [N_CTRL-1:0] ctrl;  // PrF..PrA, CP (bit 0)
  } command_t;

  // Delay adjustment range of the T1 and D one-shots, in milliseconds.
  localparam int unsigned MS_W    = 9;
  localparam int unsigned MS_MIN  = 100;
  localparam int unsigned MS_MAX  = 500;

endpackage
