// dds_forced_reset: DDS with forced reset of the remainder.
//
// Same adder and registers as the pulsed-output phase accumulator, but when
// the adder carries, the phase register is cleared instead of being loaded
// with the remainder. Every output period therefore starts from zero and has
// exactly the same length
//     B = ceil(2^K / N) clocks  (smallest B with B*N >= 2^K),  fout = fclk/B,
// so there is no phase jitter, but fout can only take the values fclk/B and
// the step between neighbouring values, fclk/(B(B+1)), grows with N.
// N = 0 never overflows: the phase stays at 0 and no pulse is produced.
//
// Interface and timing:
//   n_load/n_in : N is captured on the edge where n_load is high, used from
//                 the next edge on; the running period is not restarted.
//   carry       : registered adder carry; high for the one clock at the start
//                 of each output period (phase = 0 after the forced reset).
//   msb         : phase[K-1]; high for the later part of each period, so its
//                 duty cycle varies with N (a T flip-flop after `carry`
//                 gives a 50% output at fclk/(2B)).
// Reset (asynchronous, active low) clears N, phase and carry.
//
// Clearing on the carry follows the design; the clear is synchronous (the
// register takes 0 on the edge where the adder carries), which gives the
// period of ceil(2^K/N) clocks of the worked N=5, k=4 example (4 clocks).
// Registering the carry and the reset are this implementation's choices.
module dds_forced_reset #(
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
      // forced reset of the remainder on overflow
      phase <= sum[K] ? '0 : sum[K-1:0];
      carry <= sum[K];
    end
  end

  assign msb = phase[K-1];

  // every output period starts from a cleared phase register
  a_reset_on_carry: assert property (@(posedge clk) disable iff (!rst_n) carry |-> phase == '0);
endmodule
