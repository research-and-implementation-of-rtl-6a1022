// phase_accumulator: pulsed-output DDS (numerically controlled oscillator).
//
// A frequency register holds the control word N. On every rising clock edge
// the K-bit adder adds N to the phase register and the K-bit sum is written
// back, so the remainder of each overflow is kept. The adder's carry out
// marks an overflow; on average there are N overflows every 2^K clocks, i.e.
// fout = N*fclk/2^K, but each individual period is a whole number of clocks
// (floor or ceil of 2^K/N), which is the phase jitter of this oscillator.
//
// Interface and timing:
//   n_load/n_in : N is captured on the clock edge where n_load is high and is
//                 used by the adder from the next edge on.
//   phase       : phase register (adder feedback).
//   carry       : adder carry, registered together with the sum, so carry is
//                 high exactly while phase holds a value that wrapped (the
//                 "carry output" column next to the accumulator value).
//   msb         : phase[K-1], the alternative pulse output (duty close to 50%).
// Reset (asynchronous, active low) clears N, phase and carry.
//
// The adder/register structure, its width and the two outputs follow the
// 8-bit accumulator built for the design; the frequency register is the
// "Freq register" of the generic DDS phase accumulator. Registering the
// carry and the reset behaviour are this implementation's choices.
module phase_accumulator #(
  parameter int unsigned K = dds_pkg::ACC_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         n_load,
  input  logic [K-1:0] n_in,
  output logic [K-1:0] phase,
  output logic         carry,
  output logic         msb
);
  logic [K-1:0] n_q;
  logic [K:0]   sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      n_q <= '0;
    else if (n_load) n_q <= n_in;
  end

  assign sum = {1'b0, phase} + {1'b0, n_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      carry <= 1'b0;
    end else begin
      phase <= sum[K-1:0];
      carry <= sum[K];
    end
  end

  assign msb = phase[K-1];
endmodule
