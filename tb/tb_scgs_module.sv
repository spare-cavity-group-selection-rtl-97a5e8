// tb_scgs_module: end-to-end test of the whole module at its default sizes,
// following the bench procedure of the module: mark a cavity as replaced,
// check the auxiliary copy and LEDs; in pulses mode pulse each input in turn
// (2 us wide) and check the G outputs; then switch to serial mode and check
// that harmonic-number frames from the selected group reach both serial
// outputs. Done for every cavity and every group. The harmonic numbers used
// are 8 and 16 (the beams named for pulses mode) and random words.
//
// G pulses are timed: a G output must rise with the selected pulse input
// and stay high exactly 1 us; all other G outputs stay low.
// Each mechanism is counted and must occur at least once: serial routing,
// pulse routing, blocking of a non-selected pulse input, a cavity in no
// group, no cavity replaced, and a switch between the two modes.
module tb_scgs_module;
  import scgs_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic [NUM_CAVITIES-1:0] cstatus_n;
  grc_t                    grc [NUM_CAVITIES];
  logic                    pulses_mode;
  logic [NUM_GROUPS-1:0]   pulse_in;
  logic [NUM_GROUPS-1:0]   serial_in;
  logic [NUM_GROUPS-1:0]   g_out, gr_led, tp_grsel, tp_pulse;
  logic [1:0]              serial_out;
  logic [NUM_CAVITIES-1:0] cavity_led, aux_out_n;

  logic                    go;
  logic [15:0]             tx_word [NUM_GROUPS];
  logic [NUM_GROUPS-1:0]   tx_busy;
  logic [15:0]             rx_word [2];
  int unsigned             rx_frames [2], rx_bad [2], rx_pulses [2];

  realtime                 g_rise [NUM_GROUPS], g_fall [NUM_GROUPS];
  int unsigned             g_count [NUM_GROUPS];

  int unsigned checks = 0, failures = 0;
  int unsigned n_serial_routed = 0, n_pulse_routed = 0, n_pulse_blocked = 0;
  int unsigned n_no_group = 0, n_no_cavity = 0, n_mode_switch = 0;
  logic clk = 1'b0;

  scgs_module dut (
    .cstatus_n(cstatus_n), .grc(grc), .pulses_mode(pulses_mode),
    .pulse_in(pulse_in), .serial_in(serial_in), .g_out(g_out),
    .serial_out(serial_out), .gr_led(gr_led), .cavity_led(cavity_led),
    .aux_out_n(aux_out_n), .tp_grsel(tp_grsel), .tp_pulse(tp_pulse)
  );

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_tx
    gfas_tx u_tx (.go(go), .word(tx_word[g]), .s(serial_in[g]), .busy(tx_busy[g]));
    always @(posedge g_out[g]) begin g_rise[g] = $realtime; g_count[g]++; end
    always @(negedge g_out[g]) g_fall[g] = $realtime;
  end
  for (genvar o = 0; o < 2; o++) begin : g_rx
    gfas_rx u_rx (.s(serial_out[o]), .word(rx_word[o]), .frames(rx_frames[o]),
                  .bad_frames(rx_bad[o]), .pulses(rx_pulses[o]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $realtime, what);
    end
  endtask

  task automatic set_mode(input logic m);
    if (m != pulses_mode) n_mode_switch++;
    pulses_mode = m;
    #10;
  endtask

  task automatic replace(input int cav, input int group);
    for (int k = 0; k < NUM_CAVITIES; k++) grc[k] = grc_t'($urandom_range(4));
    grc[cav]  = grc_t'(group);
    cstatus_n = ~(10'(1) << cav);
    #10;
    expect_true(aux_out_n == cstatus_n, "auxiliary output copies the status");
    expect_true(cavity_led == 10'(1) << cav, "replaced-cavity LED");
    expect_true(gr_led == ((group >= 1) ? 4'(1 << (group - 1)) : 4'b0), "group LED");
  endtask

  // Pulse input p for 2 us and check all G outputs.
  task automatic pulse_test(input int p, input int group);
    int unsigned c0 [NUM_GROUPS];
    realtime t0;
    for (int g = 0; g < NUM_GROUPS; g++) c0[g] = g_count[g];
    pulse_in = 4'(1 << p);
    t0 = $realtime;
    #2000;
    pulse_in = '0;
    #1000;
    for (int g = 0; g < NUM_GROUPS; g++) begin
      if (group >= 1 && g == p && g == group - 1) begin
        expect_true(g_count[g] == c0[g] + 1, "one G pulse on the selected output");
        expect_true(g_rise[g] == t0, "G pulse starts with the input pulse");
        expect_true(g_fall[g] - g_rise[g] == 1000.0, "G pulse lasts 1 us");
      end else begin
        expect_true(g_count[g] == c0[g], "no G pulse on other outputs");
      end
    end
    if (group >= 1 && p == group - 1) n_pulse_routed++;
    else n_pulse_blocked++;
  endtask

  // Send a frame on every serial input; the selected one must come out.
  task automatic serial_test(input int group, input logic [15:0] sel_word);
    int unsigned f0 [2], p0 [2];
    for (int g = 0; g < NUM_GROUPS; g++) tx_word[g] = 16'($urandom);
    if (group >= 1) begin
      for (int g = 0; g < NUM_GROUPS; g++)
        if (tx_word[g] == sel_word) tx_word[g] = ~sel_word;
      tx_word[group-1] = sel_word;
    end
    for (int o = 0; o < 2; o++) begin f0[o] = rx_frames[o]; p0[o] = rx_pulses[o]; end
    go = 1'b1; #10; go = 1'b0;
    #5000;
    for (int o = 0; o < 2; o++) begin
      if (group >= 1) begin
        expect_true(rx_frames[o] == f0[o] + 1, "one frame on each serial output");
        expect_true(rx_word[o] == sel_word, "serial output carries the selected harmonic number");
      end else begin
        expect_true(rx_pulses[o] == p0[o], "serial outputs silent without a group");
      end
      expect_true(rx_bad[o] == 0, "no broken frames");
    end
    if (group >= 1) n_serial_routed++;
  endtask

  function automatic logic [15:0] harmonic(input int unsigned h_int, input int unsigned h_frac);
    return {6'(h_int), 10'(h_frac)};
  endfunction

  initial begin
    go = 1'b0; pulse_in = '0; pulses_mode = 1'b0;
    cstatus_n = '1;
    for (int k = 0; k < NUM_CAVITIES; k++) grc[k] = GRC_NONE;
    for (int g = 0; g < NUM_GROUPS; g++) begin tx_word[g] = '0; g_count[g] = 0; end
    #100;

    // No cavity replaced: nothing is routed in either mode.
    set_mode(1'b1);
    for (int p = 0; p < NUM_GROUPS; p++) pulse_test(p, 0);
    set_mode(1'b0);
    serial_test(0, '0);
    expect_true(gr_led == 4'b0 && cavity_led == 10'b0, "no LEDs without a replaced cavity");
    n_no_cavity++;

    for (int c = 0; c < NUM_CAVITIES; c++)
      for (int g = 0; g <= NUM_GROUPS; g++) begin
        replace(c, g);
        if (g == 0) n_no_group++;
        set_mode(1'b1);
        for (int p = 0; p < NUM_GROUPS; p++) pulse_test(p, g);
        set_mode(1'b0);
        serial_test(g, harmonic(8, 0));
        serial_test(g, harmonic(16, 0));
        serial_test(g, 16'($urandom));
      end

    $display("mechanisms: serial_routed=%0d pulse_routed=%0d pulse_blocked=%0d no_group=%0d no_cavity=%0d mode_switch=%0d",
             n_serial_routed, n_pulse_routed, n_pulse_blocked, n_no_group, n_no_cavity, n_mode_switch);
    expect_true(n_serial_routed > 0, "serial routing happened");
    expect_true(n_pulse_routed > 0, "pulse routing happened");
    expect_true(n_pulse_blocked > 0, "pulse blocking happened");
    expect_true(n_no_group > 0, "no-group case happened");
    expect_true(n_no_cavity > 0, "no-cavity case happened");
    expect_true(n_mode_switch > 0, "mode switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
