// p2a_sine_rom: phase-to-amplitude converter of a DDS.
//
// A table of one sine period held in memory, addressed by the phase
// accumulator. Entry i holds
//     round((2^(AMP_BITS-1) - 1) * sin(2*pi*i / 2^PHASE_BITS)) + 2^(AMP_BITS-1)
// (offset binary: mid-scale = zero, ready for a unipolar DAC). The table is
// computed at elaboration by a constant function, so its size follows the
// parameters. The output is registered: the sample for the phase presented
// at one rising edge appears after that edge (one clock of latency).
// The sine table itself is the design's; the widths, the offset-binary
// coding and the output register are this implementation's choices.
module p2a_sine_rom #(
  parameter int unsigned PHASE_BITS = dds_pkg::ACC_WIDTH,
  parameter int unsigned AMP_BITS   = dds_pkg::AMP_WIDTH
) (
  input  logic                  clk,
  input  logic [PHASE_BITS-1:0] phase,
  output logic [AMP_BITS-1:0]   amplitude
);
  localparam int unsigned DEPTH = 2 ** PHASE_BITS;
  typedef logic [AMP_BITS-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    real    scale, mid, ang;
    scale = real'((2 ** (AMP_BITS - 1)) - 1);
    mid   = real'(2 ** (AMP_BITS - 1));
    for (int i = 0; i < DEPTH; i++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(i) / real'(DEPTH);
      t[i] = AMP_BITS'(int'(mid + scale * $sin(ang)));
    end
    return t;
  endfunction

  localparam table_t SINE = build_table();

  always_ff @(posedge clk) amplitude <= SINE[phase];
endmodule
