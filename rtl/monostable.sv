// monostable: behavioural model (not synthesizable) of the one-shots that
// shape the group output pulses G1..G4.
//
// On each rising edge of trig, q goes high for PULSE_NS nanoseconds. The
// model is non-retriggerable: edges arriving while q is high are ignored,
// and the pulse length does not depend on how long trig stays high. The
// real parts are RC-timed fixed-function one-shots outside the programmable
// device, which is why this is a timed model rather than logic.
// The 1 us width follows the source description; non-retriggering is this
// design's own choice (the part type is not stated).
module monostable #(
  parameter int unsigned PULSE_NS = 1000  // output pulse width in ns
) (
  input  logic trig,  // START line from the logic
  output logic q      // shaped pulse, towards the 50 ohm line driver
);
  timeunit 1ns; timeprecision 1ps;

  initial q = 1'b0;

  always begin
    @(posedge trig);
    q = 1'b1;
    #(PULSE_NS * 1ns);
    q = 1'b0;
  end
endmodule
