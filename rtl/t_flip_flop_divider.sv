// t_flip_flop_divider: chain of toggle flip-flops driven by a pulse train.
//
// Each one-clock input pulse (for example the carry of a DDS) toggles the
// first stage; each stage toggles the next one when it falls, so the output
// is the input pulse rate divided by 2^STAGES. With evenly spaced input
// pulses (the forced-reset DDS) the output has a 50% duty cycle.
//   STAGES = 1 : the T flip-flop that turns the non-symmetric DDS output into
//                a 50% square wave at half the frequency.
//   STAGES = 2 : the divide-by-4 used to reduce the relative phase jitter of
//                a pulsed-output DDS.
// The stages are implemented as a synchronous STAGES-bit counter (identical
// behaviour to rippling T flip-flops, one clock domain). Output q changes on
// the clock edge after the pulse is sampled. Asynchronous active-low reset
// clears all stages. The counter form and reset are implementation choices.
module t_flip_flop_divider #(
  parameter int unsigned STAGES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse,
  output logic q
);
  logic [STAGES-1:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     stage <= '0;
    else if (pulse) stage <= stage + 1'b1;
  end

  assign q = stage[STAGES-1];
endmodule
