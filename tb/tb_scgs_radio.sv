// tb_scgs_radio: self-checking test of group extraction and pulse routing.
// Directed cases walk every cavity through every switch value 0..7 in both
// modes, then random status words (including none and several cavities
// replaced) and random switch settings are applied. Expected outputs come
// from a reference written from the rules: lowest-numbered active-low
// status line names the cavity, switch values 1..4 name a group, STARTk
// copies Pk only for the selected group in pulses mode, the multiplexer
// strobe is low only in serial mode with a valid group.
module tb_scgs_radio;
  import scgs_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic [NUM_CAVITIES-1:0] cstatus_n;
  grc_t                    grc [NUM_CAVITIES];
  logic                    pulses_mode;
  logic [NUM_GROUPS-1:0]   pulse_in;
  logic [NUM_GROUPS-1:0]   grsel, start;
  grc_t                    sel_code;
  logic                    serial_g_n;
  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;

  scgs_radio dut (
    .cstatus_n(cstatus_n), .grc(grc), .pulses_mode(pulses_mode),
    .pulse_in(pulse_in), .grsel(grsel), .sel_code(sel_code),
    .serial_g_n(serial_g_n), .start(start)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int cav;
    int code;
    logic [NUM_GROUPS-1:0] e_grsel, e_start;
    logic e_g_n;
    #1;
    cav = -1;
    for (int c = NUM_CAVITIES - 1; c >= 0; c--)
      if (cstatus_n[c] == 1'b0) cav = c;
    code = (cav >= 0) ? int'(grc[cav]) : 0;
    if (code < 1 || code > 4) code = 0;
    e_grsel = (code != 0) ? 4'(1 << (code - 1)) : 4'b0;
    e_start = pulses_mode ? (pulse_in & e_grsel) : 4'b0;
    e_g_n   = pulses_mode || code == 0;
    checks++;
    if (grsel !== e_grsel || start !== e_start || int'(sel_code) != code ||
        serial_g_n !== e_g_n) begin
      failures++;
      if (failures < 10)
        $display("mismatch cstatus_n=%b mode=%b p=%b: grsel=%b start=%b code=%0d g_n=%b exp %b %b %0d %b",
                 cstatus_n, pulses_mode, pulse_in, grsel, start, sel_code, serial_g_n,
                 e_grsel, e_start, code, e_g_n);
    end
  endtask

  initial begin
    // Directed: each cavity alone, each switch value, both modes, all pulses.
    for (int c = 0; c < NUM_CAVITIES; c++)
      for (int v = 0; v < 8; v++)
        for (int m = 0; m < 2; m++)
          for (int p = 0; p < 16; p++) begin
            for (int k = 0; k < NUM_CAVITIES; k++) grc[k] = grc_t'((v + k + 1) % 5);
            grc[c]      = grc_t'(v);
            cstatus_n   = ~(10'(1) << c);
            pulses_mode = 1'(m);
            pulse_in    = 4'(p);
            check();
          end
    // No cavity replaced.
    cstatus_n = '1;
    for (int m = 0; m < 2; m++) begin
      pulses_mode = 1'(m);
      pulse_in    = 4'hF;
      check();
    end
    // Random: any status word, any switch setting.
    for (int n = 0; n < 5000; n++) begin
      for (int k = 0; k < NUM_CAVITIES; k++) grc[k] = grc_t'($urandom_range(7));
      cstatus_n   = 10'($urandom);
      if ($urandom_range(1) != 0) cstatus_n = ~(10'(1) << $urandom_range(NUM_CAVITIES - 1));
      pulses_mode = 1'($urandom);
      pulse_in    = 4'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
