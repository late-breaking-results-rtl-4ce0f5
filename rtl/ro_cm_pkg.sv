// Shared constants and types of the configurable ring-oscillator countermeasure.
//
// A ring-oscillator (RO) chain holds N_CCI groups. Each group is one complex
// configurable inverter (CCI) followed by SCI_PER_GROUP simple configurable
// inverters (SCI), so a chain has CHAIN_LEN = 13 * 5 = 65 configurable inverters (CI).
// The counts follow the published design: 65 CIs, 13 of them CCIs. R_W, the width of
// the random on/off duration R, is this design's own choice.
package ro_cm_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N_CCI         = 13;
  localparam int unsigned SCI_PER_GROUP = 4;
  localparam int unsigned GROUP_LEN     = SCI_PER_GROUP + 1;
  localparam int unsigned CHAIN_LEN     = N_CCI * GROUP_LEN;   // 65
  localparam int unsigned R_W           = 8;

  // Operating mode set by the central control.
  typedef enum logic {
    MODE_DETECT = 1'b0,   // every CI is its own length-one RO
    MODE_CM     = 1'b1    // CIs chained into one ring per chain, noise generation
  } mode_e;

  // Phase of the central control.
  typedef enum logic [1:0] {
    PH_DETECT = 2'd0,     // detection mode, noise off
    PH_ON     = 2'd1,     // countermeasure, rings enabled for R cycles
    PH_OFF    = 2'd2      // countermeasure, rings disabled for R cycles
  } phase_e;

  // Ring length, counted in CIs, for a given c_sel vector: every set c_sel
  // bypasses the SCI_PER_GROUP SCIs in front of its CCI.
  function automatic int unsigned ring_length(input logic [N_CCI-1:0] c_sel);
    int unsigned n;
    n = CHAIN_LEN;
    for (int i = 0; i < N_CCI; i++)
      if (c_sel[i]) n -= SCI_PER_GROUP;
    return n;
  endfunction
endpackage
