// scgs_radio: group extraction and pulse routing of the SCGS logic.
//
// The Voltage Program Selector marks the cavity to be replaced by the spare
// one by pulling its line of cstatus_n low (one line of ten, active low).
// This block finds that cavity, reads the BCD rotary switch of that cavity
// and turns the switch value into:
//   * grsel     - one-hot group select (bit 0 = group 1 ... bit 3 = group 4),
//                 which drives the GR1..GR4 front-panel LEDs and test points;
//   * sel_code  - the switch value itself (1..4, or 0 when no valid group),
//                 used as the select of the 8-to-1 serial-data multiplexer;
//   * serial_g_n- active-low strobe for that multiplexer, low only in serial
//                 mode with a valid group;
//   * start     - in pulses mode, input pulse Pk is passed to STARTk when
//                 group k is the selected one, otherwise all STARTs stay low.
//
// What follows the source description: ten exclusive active-low status
// lines, 3-bit BCD group switches with values 0 to 4, the group LEDs, the
// serial/pulses mode and "pulses at the selected frequency group output".
// This design's own choices: if several status lines are low at once, the
// lowest-numbered cavity wins; switch values 0 and 5..7 give no group; in
// serial mode no START is produced and in pulses mode the multiplexer is
// disabled. Purely combinational; no clock.
module scgs_radio
  import scgs_pkg::*;
(
  input  logic [NUM_CAVITIES-1:0] cstatus_n,        // replaced cavity, active low
  input  grc_t                    grc [NUM_CAVITIES], // group switch per cavity
  input  logic                    pulses_mode,      // 1: pulses mode (SW1 fitted), 0: serial mode
  input  logic [NUM_GROUPS-1:0]   pulse_in,         // received P1..P4 (bit 0 = P1)
  output logic [NUM_GROUPS-1:0]   grsel,            // one-hot selected group (bit 0 = group 1)
  output grc_t                    sel_code,         // selected group number, 0 = none
  output logic                    serial_g_n,       // multiplexer strobe, active low
  output logic [NUM_GROUPS-1:0]   start             // START1..START4 to the monostables
);
  timeunit 1ns; timeprecision 1ps;

  grc_t raw_code;
  logic found;

  // Priority search for the replaced cavity, lowest index first.
  always_comb begin
    found    = 1'b0;
    raw_code = GRC_NONE;
    for (int unsigned c = 0; c < NUM_CAVITIES; c++) begin
      if (!found && !cstatus_n[c]) begin
        found    = 1'b1;
        raw_code = grc[c];
      end
    end
  end

  // Group decode: only switch values 1..NUM_GROUPS name a group.
  always_comb begin
    grsel    = '0;
    sel_code = GRC_NONE;
    for (int unsigned g = 0; g < NUM_GROUPS; g++) begin
      if (found && raw_code == grc_t'(g + 1)) begin
        grsel[g] = 1'b1;
        sel_code = raw_code;
      end
    end
  end

  assign serial_g_n = pulses_mode || (sel_code == GRC_NONE);
  assign start      = pulses_mode ? (pulse_in & grsel) : '0;
endmodule
