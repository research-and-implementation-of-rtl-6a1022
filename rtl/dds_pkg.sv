// dds_pkg: constants shared by the DDS / digital-PLL blocks.
//
// ACC_WIDTH is the width k of the phase-accumulator adder and register. The
// 8-bit value is the width of the accumulator built and simulated for the
// design; the frequency relations below follow from it:
//   pulsed-output DDS : fout = N * fclk / 2^k, step fclk / 2^k
//   forced-reset DDS  : fout = fclk / B, B = smallest integer with B*N >= 2^k
// AMP_WIDTH (sine sample width) has no given value and is a design choice.
package dds_pkg;
  localparam int unsigned ACC_WIDTH = 8;
  localparam int unsigned AMP_WIDTH = 8;
endpackage
