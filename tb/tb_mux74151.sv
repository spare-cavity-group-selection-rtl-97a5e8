// tb_mux74151: exhaustive self-checking test of the 8-to-1 data selector.
// Every data pattern, select value and strobe level is applied; y must be
// the selected data bit (0 when the strobe is high) and w_n its complement.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_mux74151;
  timeunit 1ns; timeprecision 1ps;

  logic [7:0] d;
  logic [2:0] a;
  logic       g_n;
  logic       y, w_n;
  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;

  mux74151 dut (.d(d), .a(a), .g_n(g_n), .y(y), .w_n(w_n));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_y;
    for (int dv = 0; dv < 256; dv++)
      for (int av = 0; av < 8; av++)
        for (int gv = 0; gv < 2; gv++) begin
          d = 8'(dv); a = 3'(av); g_n = 1'(gv);
          #1;
          exp_y = (gv == 0) ? ((dv >> av) & 1) != 0 : 1'b0;
          checks++;
          if (y !== exp_y || w_n !== !exp_y) begin
            failures++;
            if (failures < 10)
              $display("mismatch d=%h a=%0d g_n=%0d: y=%b w_n=%b expected y=%b",
                       d, a, g_n, y, w_n, exp_y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
