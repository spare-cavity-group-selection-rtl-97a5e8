// scgs_module: the Spare Cavity Group Selection NIM module, as far as it
// has a logic function.
//
// When one of the ten accelerating cavities fails, the voltage program
// selector names it (one active-low status line) and a spare cavity takes
// its place. The spare must run at the frequency of the group the failed
// cavity belonged to; the group of every cavity is set on ten front-panel
// BCD rotary switches. The module either routes that group's serial
// harmonic-number train (16-bit, pulse-width coded) to its two serial
// outputs for a multi-harmonic RF source (serial mode), or passes that
// group's timing pulse to its G output as a 1 us pulse (pulses mode).
//
// Contents: scgs_unit (the programmable logic) and four monostable models
// (the 1 us one-shots on START1..START4). The analog front end (input
// buffers, opto-couplers, 50 ohm line drivers, LED drivers) is not modelled:
// its ports here are the logic-level signals on either side of it.
// The replaced-cavity LEDs hang directly on the status bus; cavity_led is
// that bus inverted (1 = LED lit). Timing: the logic is combinational, the
// G outputs rise with the selected pulse input and last PULSE_NS.
// Contains a timed behavioural model, so it is for simulation only.
module scgs_module
  import scgs_pkg::*;
#(
  parameter int unsigned PULSE_NS = 1000  // G output width in ns
) (
  input  logic [NUM_CAVITIES-1:0] cstatus_n,          // replaced cavity status, active low
  input  grc_t                    grc [NUM_CAVITIES], // rotary switches C36..C96
  input  logic                    pulses_mode,        // SW1 fitted: pulses mode
  input  logic [NUM_GROUPS-1:0]   pulse_in,           // PULSE 1..4
  input  logic [NUM_GROUPS-1:0]   serial_in,          // S1..S4
  output logic [NUM_GROUPS-1:0]   g_out,              // G1..G4, 1 us pulses
  output logic [1:0]              serial_out,         // SERIAL OUT1, OUT2
  output logic [NUM_GROUPS-1:0]   gr_led,             // group LEDs 1..4
  output logic [NUM_CAVITIES-1:0] cavity_led,         // replaced-cavity LEDs
  output logic [NUM_CAVITIES-1:0] aux_out_n,          // auxiliary output, copy of status
  output logic [NUM_GROUPS-1:0]   tp_grsel,           // TP1..TP4
  output logic [NUM_GROUPS-1:0]   tp_pulse            // TP11, TP16, TP17, TP18
);
  timeunit 1ns; timeprecision 1ps;

  logic [NUM_GROUPS-1:0] start;

  scgs_unit u_unit (
    .cstatus_n  (cstatus_n),
    .grc        (grc),
    .pulses_mode(pulses_mode),
    .pulse_in   (pulse_in),
    .serial_in  (serial_in),
    .start      (start),
    .serial_out (serial_out),
    .gr_led     (gr_led),
    .aux_out_n  (aux_out_n),
    .tp_grsel   (tp_grsel),
    .tp_pulse   (tp_pulse)
  );

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_mono
    monostable #(.PULSE_NS(PULSE_NS)) u_mono (
      .trig(start[g]),
      .q   (g_out[g])
    );
  end

  assign cavity_led = ~cstatus_n;
endmodule
