// gfas_tx: testbench source of one serial harmonic-number frame.
// On each rising edge of go it sends word as 16 return-to-zero pulses,
// most significant bit first, one bit every 250 ns. A 1 is a 125 ns pulse,
// a 0 a 62.5 ns pulse. The first 6 bits are the integer part of the
// harmonic number, the last 10 the fraction. busy is high while sending.
module gfas_tx (
  input  logic        go,
  input  logic [15:0] word,
  output logic        s,
  output logic        busy
);
  timeunit 1ns; timeprecision 1ps;

  localparam realtime BIT_NS  = 250.0;
  localparam realtime ONE_NS  = 125.0;
  localparam realtime ZERO_NS = 62.5;

  initial begin
    s    = 1'b0;
    busy = 1'b0;
  end

  always begin
    logic [15:0] w;
    @(posedge go);
    w    = word;
    busy = 1'b1;
    for (int b = 15; b >= 0; b--) begin
      s = 1'b1;
      if (w[b]) begin
        #(ONE_NS);
        s = 1'b0;
        #(BIT_NS - ONE_NS);
      end else begin
        #(ZERO_NS);
        s = 1'b0;
        #(BIT_NS - ZERO_NS);
      end
    end
    busy = 1'b0;
  end
endmodule
