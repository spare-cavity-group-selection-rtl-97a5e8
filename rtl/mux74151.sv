// mux74151: 8-line to 1-line data selector with strobe, the function of the
// classic 74151 TTL part, which the SCGS logic uses as a library macro.
//
// The 3-bit select a picks one of the eight data inputs d. While the strobe
// g_n is low, y follows the selected input and w_n is its complement; while
// g_n is high the part is disabled, y is 0 and w_n is 1. Purely
// combinational: outputs follow the inputs with no clock.
//
// In the SCGS the select is the rotary-switch code of the replaced cavity,
// so data inputs 1 to 4 carry the serial lines S1 to S4; the pin-level
// behaviour is that of the standard part.
module mux74151 (
  input  logic [7:0] d,    // data inputs D0..D7
  input  logic [2:0] a,    // select (C,B,A); a[0] is A, the least significant
  input  logic       g_n,  // strobe, active low
  output logic       y,    // selected data
  output logic       w_n   // complement of y
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    y   = (!g_n) ? d[a] : 1'b0;
    w_n = !y;
  end
endmodule
