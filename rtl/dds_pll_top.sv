// dds_pll_top: digital PLL whose controlled oscillator is a DDS.
//
//   fin --> phase detector --EVENT--> time-to-digital converter --N-->
//           DCO (DDS + T flip-flop) --> fout --> back to the phase detector
//
// The phase detector turns the phase difference between fin and fout into a
// pulse; the time-to-digital converter (the loop filter) measures that pulse
// in half clock periods and hands the count N to the oscillator, whose
// frequency rises with N. A larger phase lag therefore speeds fout up and a
// smaller one slows it down, pulling fout toward fin.
//
// Two DDS cores take the same N:
//   * dds_forced_reset (dco_sel = 0, the main oscillator): period of exactly
//     ceil(2^K/N) clocks, no phase jitter;
//   * phase_accumulator (dco_sel = 1): the plain pulsed-output DDS, average
//     frequency N*fclk/2^K with one clock of jitter. Its phase also addresses
//     the phase-to-amplitude sine table, whose sample (sine_code) is brought
//     out for an external DAC and reconstruction filter.
// The carry of the selected core drives a T flip-flop, whose 50%-duty output
// is fout. N is loaded into both cores on n_valid.
//
// fin is asynchronous; it reaches the converter's flip-flops only through the
// detector, without a synchronizer. Reset is asynchronous, active low.
// The PLL loop (detector, converter, DDS oscillator) follows the design; the
// dco_sel switch between the two cores, the shared N and bringing the sine
// sample out are this implementation's choices.
module dds_pll_top #(
  parameter int unsigned K        = dds_pkg::ACC_WIDTH,
  parameter int unsigned AMP_BITS = dds_pkg::AMP_WIDTH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                fin,
  input  logic                dco_sel,
  output logic                fout,
  output logic                pd_event,
  output logic [K-1:0]        n_word,
  output logic                n_valid,
  output logic                fr_pulse,
  output logic                fr_msb,
  output logic                pa_carry,
  output logic                pa_msb,
  output logic [AMP_BITS-1:0] sine_code
);
  logic [K-1:0] pa_phase;
  logic         dco_pulse;

  digital_phase_detector u_dpd (
    .fin    (fin),
    .fout   (fout),
    .event_o(pd_event)
  );

  tdc_converter #(.K(K)) u_tdc (
    .clk    (clk),
    .rst_n  (rst_n),
    .event_i(pd_event),
    .n_word (n_word),
    .n_valid(n_valid)
  );

  dds_forced_reset #(.K(K)) u_dds_fr (
    .clk   (clk),
    .rst_n (rst_n),
    .n_load(n_valid),
    .n_in  (n_word),
    .phase (),
    .carry (fr_pulse),
    .msb   (fr_msb)
  );

  phase_accumulator #(.K(K)) u_dds_pa (
    .clk   (clk),
    .rst_n (rst_n),
    .n_load(n_valid),
    .n_in  (n_word),
    .phase (pa_phase),
    .carry (pa_carry),
    .msb   (pa_msb)
  );

  p2a_sine_rom #(.PHASE_BITS(K), .AMP_BITS(AMP_BITS)) u_p2a (
    .clk      (clk),
    .phase    (pa_phase),
    .amplitude(sine_code)
  );

  assign dco_pulse = dco_sel ? pa_carry : fr_pulse;

  t_flip_flop_divider #(.STAGES(1)) u_tff (
    .clk  (clk),
    .rst_n(rst_n),
    .pulse(dco_pulse),
    .q    (fout)
  );
endmodule
