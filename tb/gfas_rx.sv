// gfas_rx: testbench decoder of serial harmonic-number frames.
// It times every pulse on s: a pulse longer than 93.75 ns (midway between
// the 62.5 ns and 125 ns widths) is a 1, a shorter one a 0. Bits are
// shifted in MSB first; after 16 bits the word is published and frames
// counts up. A pause longer than 1 us with a partial frame counts in
// bad_frames and restarts the frame; pulses counts every pulse seen.
module gfas_rx (
  input  logic        s,
  output logic [15:0] word,
  output int unsigned frames,
  output int unsigned bad_frames,
  output int unsigned pulses
);
  timeunit 1ns; timeprecision 1ps;

  logic [15:0] shreg;
  int unsigned nbits;
  realtime     t_rise;
  realtime     t_last;

  initial begin
    word       = '0;
    frames     = 0;
    bad_frames = 0;
    pulses     = 0;
    shreg      = '0;
    nbits      = 0;
    t_rise     = 0.0;
    t_last     = 0.0;
  end

  always @(posedge s) begin
    if (nbits != 0 && ($realtime - t_last) > 1000.0) begin
      bad_frames++;
      nbits = 0;
    end
    t_rise = $realtime;
  end

  always @(negedge s) begin
    pulses++;
    t_last = $realtime;
    shreg  = {shreg[14:0], ($realtime - t_rise) > 93.75};
    nbits++;
    if (nbits == 16) begin
      word  = shreg;
      frames++;
      nbits = 0;
    end
  end

  // A frame left unfinished is reported when the line stays quiet.
  always begin
    #(500.0);
    if (nbits != 0 && !s && ($realtime - t_last) > 1000.0) begin
      bad_frames++;
      nbits = 0;
    end
  end
endmodule
