// tb_scgs_unit: self-checking test of the programmable logic on its own.
//
// Serial mode: for every cavity and every group 1..4 the cavity is marked
// replaced and four different 16-bit harmonic-number frames are sent at once
// on S1..S4; both serial outputs must carry exactly the selected group's
// frame, with its pulse widths intact. With switch value 0 the outputs must
// stay silent. Pulses mode: each P input is pulsed in turn; only the selected
// group's START may follow it, the serial outputs stay silent. Also checked:
// the auxiliary copy of the status, the group LEDs and the test points.
module tb_scgs_unit;
  import scgs_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic [NUM_CAVITIES-1:0] cstatus_n;
  grc_t                    grc [NUM_CAVITIES];
  logic                    pulses_mode;
  logic [NUM_GROUPS-1:0]   pulse_in;
  logic [NUM_GROUPS-1:0]   serial_in;
  logic [NUM_GROUPS-1:0]   start, gr_led, tp_grsel, tp_pulse;
  logic [1:0]              serial_out;
  logic [NUM_CAVITIES-1:0] aux_out_n;

  logic                    go;
  logic [15:0]             tx_word [NUM_GROUPS];
  logic [NUM_GROUPS-1:0]   tx_busy;
  logic [15:0]             rx_word [2];
  int unsigned             rx_frames [2], rx_bad [2], rx_pulses [2];

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;

  scgs_unit dut (
    .cstatus_n(cstatus_n), .grc(grc), .pulses_mode(pulses_mode),
    .pulse_in(pulse_in), .serial_in(serial_in), .start(start),
    .serial_out(serial_out), .gr_led(gr_led), .aux_out_n(aux_out_n),
    .tp_grsel(tp_grsel), .tp_pulse(tp_pulse)
  );

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_tx
    gfas_tx u_tx (.go(go), .word(tx_word[g]), .s(serial_in[g]), .busy(tx_busy[g]));
  end
  for (genvar o = 0; o < 2; o++) begin : g_rx
    gfas_rx u_rx (.s(serial_out[o]), .word(rx_word[o]), .frames(rx_frames[o]),
                  .bad_frames(rx_bad[o]), .pulses(rx_pulses[o]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic setup(input int cav, input int group);
    for (int k = 0; k < NUM_CAVITIES; k++) grc[k] = grc_t'($urandom_range(4));
    grc[cav]  = grc_t'(group);
    cstatus_n = ~(10'(1) << cav);
    #10;
    expect_true(aux_out_n == cstatus_n, "auxiliary output copies the status");
    expect_true(gr_led == ((group >= 1 && group <= 4) ? 4'(1 << (group - 1)) : 4'b0),
                "group LED shows the replaced cavity's group");
    expect_true(tp_grsel == gr_led, "TP1..TP4 show the group selects");
  endtask

  // Send one frame on every serial input at once; return the frame count
  // seen on each output before and after.
  task automatic send_all(output int unsigned f0 [2], output int unsigned f1 [2],
                          output int unsigned p0 [2], output int unsigned p1 [2]);
    for (int g = 0; g < NUM_GROUPS; g++) tx_word[g] = 16'($urandom);
    // make the four frames differ
    for (int g = 1; g < NUM_GROUPS; g++)
      if (tx_word[g] == tx_word[0]) tx_word[g] = ~tx_word[0];
    for (int o = 0; o < 2; o++) begin f0[o] = rx_frames[o]; p0[o] = rx_pulses[o]; end
    go = 1'b1; #10; go = 1'b0;
    #5000;
    for (int o = 0; o < 2; o++) begin f1[o] = rx_frames[o]; p1[o] = rx_pulses[o]; end
  endtask

  initial begin
    int unsigned f0 [2], f1 [2], p0 [2], p1 [2];
    go = 1'b0; pulse_in = '0; pulses_mode = 1'b0;
    cstatus_n = '1;
    for (int k = 0; k < NUM_CAVITIES; k++) grc[k] = GRC_NONE;
    for (int g = 0; g < NUM_GROUPS; g++) tx_word[g] = '0;
    #100;

    // Serial mode
    pulses_mode = 1'b0;
    for (int c = 0; c < NUM_CAVITIES; c++)
      for (int g = 0; g <= NUM_GROUPS; g++) begin
        setup(c, g);
        send_all(f0, f1, p0, p1);
        for (int o = 0; o < 2; o++) begin
          if (g == 0) begin
            expect_true(p1[o] == p0[o], "no group: serial output silent");
          end else begin
            expect_true(f1[o] == f0[o] + 1, "exactly one frame on the serial output");
            expect_true(rx_word[o] == tx_word[g-1], "serial output carries the selected group's word");
            expect_true(p1[o] - p0[o] == 16, "16 pulses per frame");
          end
          expect_true(rx_bad[o] == 0, "no broken frames");
        end
        expect_true(start == 4'b0, "no START in serial mode");
      end

    // Pulses mode
    pulses_mode = 1'b1;
    for (int c = 0; c < NUM_CAVITIES; c++)
      for (int g = 1; g <= NUM_GROUPS; g++) begin
        setup(c, g);
        for (int p = 0; p < NUM_GROUPS; p++) begin
          pulse_in = 4'(1 << p);
          #10;
          expect_true(tp_pulse == pulse_in, "received pulse on the test points");
          expect_true(start == ((p == g - 1) ? pulse_in : 4'b0),
                      "START follows only the selected group's pulse");
          #1990;
          pulse_in = '0;
          #10;
          expect_true(start == 4'b0, "START low after the pulse");
        end
        send_all(f0, f1, p0, p1);
        expect_true(p1[0] == p0[0] && p1[1] == p0[1], "serial outputs silent in pulses mode");
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
