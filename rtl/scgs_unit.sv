// scgs_unit: the logic held in the programmable device of the Spare Cavity
// Group Selection module.
//
// It joins the group-extraction block (scgs_radio) with an 8-to-1 data
// selector (mux74151). The selector's data inputs 1 to 4 carry the serial
// harmonic-number lines S1..S4 and its select is the rotary-switch value of
// the replaced cavity, so the serial pulse train of the selected group is
// passed, bit for bit and without a clock, to both serial outputs. Inputs 0
// and 5..7 are tied low, so a cavity in no group gives a silent output.
// In pulses mode the selector is disabled and the selected group's pulse
// input is routed to its START output instead.
//
// The status bus is also copied to the auxiliary output, and the test
// points carry the group selects (TP1..TP4) and the received pulses
// (TP11, TP16, TP17, TP18), as in the described release.
// Everything is combinational: outputs follow inputs after gate delays only.
// The described device also holds a 74175 quad D flip-flop that is unused
// in this release; it is left out.
module scgs_unit
  import scgs_pkg::*;
(
  input  logic [NUM_CAVITIES-1:0] cstatus_n,          // VPS replaced-cavity status, active low
  input  grc_t                    grc [NUM_CAVITIES], // GRC36..GRC96 switch values
  input  logic                    pulses_mode,        // SW1: 1 pulses mode, 0 serial mode
  input  logic [NUM_GROUPS-1:0]   pulse_in,           // P1..P4 after the input buffers
  input  logic [NUM_GROUPS-1:0]   serial_in,          // S1..S4 after the opto-couplers
  output logic [NUM_GROUPS-1:0]   start,              // START1..START4
  output logic [1:0]              serial_out,         // SERIAL OUT1, OUT2 (identical)
  output logic [NUM_GROUPS-1:0]   gr_led,             // GR1..GR4 LED drive
  output logic [NUM_CAVITIES-1:0] aux_out_n,          // copy of cstatus_n
  output logic [NUM_GROUPS-1:0]   tp_grsel,           // test points TP1..TP4
  output logic [NUM_GROUPS-1:0]   tp_pulse            // test points TP11, TP16, TP17, TP18
);
  timeunit 1ns; timeprecision 1ps;

  logic [NUM_GROUPS-1:0] grsel;
  grc_t                  sel_code;
  logic                  serial_g_n;
  logic                  mux_y;
  logic                  mux_w_n;

  scgs_radio u_radio (
    .cstatus_n  (cstatus_n),
    .grc        (grc),
    .pulses_mode(pulses_mode),
    .pulse_in   (pulse_in),
    .grsel      (grsel),
    .sel_code   (sel_code),
    .serial_g_n (serial_g_n),
    .start      (start)
  );

  // D0 = no group, D1..D4 = S1..S4, D5..D7 unused switch codes.
  mux74151 u_mux (
    .d  ({3'b000, serial_in, 1'b0}),
    .a  (sel_code),
    .g_n(serial_g_n),
    .y  (mux_y),
    .w_n(mux_w_n)
  );

  assign serial_out = {2{mux_y}};
  assign gr_led     = grsel;
  assign aux_out_n  = cstatus_n;
  assign tp_grsel   = grsel;
  assign tp_pulse   = pulse_in;

  // The inverted selector output is not used in this release.
  logic unused_ok;
  assign unused_ok = mux_w_n;
endmodule
