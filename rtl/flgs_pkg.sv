// flgs_pkg: constants and types shared by the FLGS CIOQ switch.
//
// The switch is an N x N combined input/output queued (CIOQ) cell switch whose
// fabric is scheduled by FLGS (fully local Gale-Shapley). The defaults below are
// the configuration of the 32x32 evaluation (port count, speedup 2); buffer depth,
// cell width and weight width are this design's choices, since the algorithm
// assumes unbounded buffers and does not fix a cell size.
package flgs_pkg;

  // Number of ports of the switch (N x N).
  localparam int unsigned N_PORTS      = 32;
  // Cells each VOQ / VIQ can hold.
  localparam int unsigned Q_DEPTH      = 64;
  // Bits of cell payload carried through the switch.
  localparam int unsigned CELL_W       = 16;
  // Bits of a weighted-round-robin weight / credit.
  localparam int unsigned WEIGHT_W     = 4;
  // Speedup as a ratio: SPEEDUP_NUM scheduling phases every SPEEDUP_DEN slots.
  localparam int unsigned SPEEDUP_NUM  = 2;
  localparam int unsigned SPEEDUP_DEN  = 1;

  // Output link scheduling policy (both are port-ordered policies).
  typedef enum logic {
    POL_SP  = 1'b0,   // strict (static) priority among the inputs
    POL_WRR = 1'b1    // weighted round robin; all weights 1 gives round robin
  } policy_e;

  // Phase of a time slot, as sequenced by flgs_ctrl.
  typedef enum logic [2:0] {
    PH_ARRIVE   = 3'd0,  // at most one cell enters each input
    PH_SCHED    = 3'd1,  // preference lists are frozen, matching starts
    PH_MATCH    = 3'd2,  // Gale-Shapley proposal rounds
    PH_XFER     = 3'd3,  // matched cells cross the crossbar
    PH_DEPART   = 3'd4   // at most one cell leaves each output
  } phase_e;

endpackage
