// tb_monostable: checks the one-shot model. A short and a long trigger
// each give a pulse of exactly PULSE_NS (1 us); an edge arriving while the
// output is high is ignored (non-retriggerable); no edge gives no pulse.
module tb_monostable;
  timeunit 1ns; timeprecision 1ps;

  logic trig = 1'b0;
  logic q;
  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  realtime t_rise, t_fall;

  monostable dut (.trig(trig), .q(q));

  always #5 clk = ~clk;

  always @(posedge q) t_rise = $realtime;
  always @(negedge q) t_fall = $realtime;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (rise %0t fall %0t)", what, t_rise, t_fall);
    end
  endtask

  task automatic fire(input realtime high_ns);
    realtime t0;
    trig = 1'b1;
    t0   = $realtime;
    #(high_ns);
    trig = 1'b0;
    #(1500.0 - high_ns);
    expect_true(t_rise == t0, "pulse starts on the trigger edge");
    expect_true(t_fall - t_rise == 1000.0, "pulse width is 1 us");
    expect_true(q == 1'b0, "output low after the pulse");
  endtask

  initial begin
    #100;
    expect_true(q == 1'b0, "idle output low");
    fire(1400.0); // trigger longer than the pulse
    fire(20.0);                              // short trigger
    // Second edge inside the pulse must not stretch it.
    trig = 1'b1; #50; trig = 1'b0;
    #400; trig = 1'b1; #50; trig = 1'b0;
    #1600;
    expect_true(t_fall - t_rise == 1000.0, "retrigger ignored, width still 1 us");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
