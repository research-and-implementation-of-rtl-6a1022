// digital_phase_detector: turns the phase difference of two square waves
// into a pulse whose duration is that difference.
//
// The output is the exclusive OR of the reference fin and the oscillator
// output fout: it is high from an edge of one input to the matching edge of
// the other, twice per period for 50%-duty inputs, so its pulse width is the
// phase difference in time. It is purely combinational and asynchronous; the
// following time-to-digital converter measures the pulse against the clock.
// The function (phase difference -> signal with a duration) is the design's;
// the choice of an XOR detector is this implementation's.
module digital_phase_detector (
  input  logic fin,
  input  logic fout,
  output logic event_o
);
  always_comb event_o = fin ^ fout;
endmodule
