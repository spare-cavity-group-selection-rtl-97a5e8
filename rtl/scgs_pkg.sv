// scgs_pkg: sizes and types shared by the Spare Cavity Group Selection logic.
//
// The module serves the ten 10 MHz cavities of the ring (front-panel names
// C36 ... C96). Each cavity has a BCD rotary switch whose low three bits
// (GRCxx[2..0]) carry its frequency group: 1 to 4 name a group, 0 means the
// cavity is in no group. Four groups exist; a group has one pulse input (P),
// one serial harmonic-number input (S) and one pulse output (G).
// Cavity n of the status bus is the n-th switch from the left on the panel:
// bit 0 is C36, bit 9 is C96 (the order of the panel is kept, the bit
// numbering is this design's choice).
package scgs_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned NUM_CAVITIES = 10;
  localparam int unsigned NUM_GROUPS   = 4;
  localparam int unsigned GRC_W        = 3;

  // One rotary switch reading (low three BCD bits).
  typedef logic [GRC_W-1:0] grc_t;

  // Switch value meaning "cavity belongs to no group".
  localparam grc_t GRC_NONE = '0;
endpackage
