// tb_dds_pll_top: end-to-end test of the DDS-based digital PLL at its
// default size (8-bit accumulator, 8-bit sine samples), clock 10 ns.
//
// A 50%-duty reference fin is applied, asynchronous to the clock, in three
// phases:
//   A. fin period 400 ns, forced-reset DDS as oscillator (dco_sel = 0);
//   B. same fin, plain pulsed-output DDS (dco_sel = 1), a mode switch;
//   C. fin period 480 ns, forced-reset DDS again.
// In each phase, after the loop has settled, the average period of fout
// over 300 fout periods must equal the fin period within 1%.
// Throughout, the testbench checks independently that
//   * every phase-detector pulse is converted to N = number of clock edges
//     (both) that saw it high, delivered with one n_valid strobe;
//   * fout toggles exactly once per carry of the selected DDS core;
//   * successive forced-reset periods are ceil(256/N) clocks whenever N did
//     not change during the period (no phase jitter);
//   * the pulsed-output DDS shows carry intervals of two different lengths
//     for one N (its phase jitter);
//   * the sine sample spans the whole range.
// Each mechanism (converter update, forced reset, jitter, mode switch,
// T flip-flop toggle, sine peak) is counted and must occur.
module tb_dds_pll_top;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       fin = 1'b0;
  logic       dco_sel = 1'b0;
  logic       fout, pd_event, n_valid, fr_pulse, fr_msb, pa_carry, pa_msb;
  logic [7:0] n_word, sine_code;
  int         checks = 0, failures = 0;
  int         fin_half = 200;   // ns

  always #5 clk = ~clk;

  dds_pll_top dut (
    .clk(clk), .rst_n(rst_n), .fin(fin), .dco_sel(dco_sel), .fout(fout),
    .pd_event(pd_event), .n_word(n_word), .n_valid(n_valid),
    .fr_pulse(fr_pulse), .fr_msb(fr_msb), .pa_carry(pa_carry), .pa_msb(pa_msb),
    .sine_code(sine_code));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // reference input, asynchronous to the clock (starts 3 ns off the grid)
  initial begin
    #3;
    forever begin
      #(fin_half) fin = ~fin;
    end
  end

  // ---- mechanism counters ----
  int n_updates = 0, fr_resets = 0, fr_exact = 0, pa_jitter = 0, mode_switches = 0;
  int tff_toggles = 0, sine_peaks = 0, sine_troughs = 0;

  // ---- converter: count edges that see the detector pulse high ----
  int  edges_high = 0;
  int  expected_n = -1;
  logic ev_seen_r = 1'b0, ev_seen_f = 1'b0;
  always @(negedge clk) begin
    if (rst_n && pd_event) edges_high++;
    ev_seen_f <= pd_event;
  end
  always @(posedge clk) begin
    if (rst_n) begin
      // n_valid for the pulse that ended before this edge is visible now
      if (n_valid) begin
        n_updates++;
        check(expected_n >= 0, "n_valid without a pulse");
        check(int'(n_word) == ((expected_n > 255) ? 255 : expected_n),
              $sformatf("N=%0d expected %0d", n_word, expected_n));
        expected_n = -1;
      end
      if ((ev_seen_r || ev_seen_f) && !pd_event) begin
        expected_n = edges_high;
        edges_high = 0;
      end else if (pd_event) begin
        edges_high++;
      end
    end
    ev_seen_r <= pd_event;
  end

  // ---- T flip-flop: fout toggles once per carry of the selected core ----
  logic fout_d = 1'b0, sel_pulse_d = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      check((fout != fout_d) == sel_pulse_d, "fout toggles iff the selected DDS carried");
      if (fout != fout_d) tff_toggles++;
    end
    fout_d      <= fout;
    sel_pulse_d <= dco_sel ? pa_carry : fr_pulse;
  end

  // ---- forced-reset DDS: exact period when N is stable ----
  int   fr_count = 0;
  int   fr_n_start = -1;
  logic n_changed = 1'b0;
  int   n_now;
  // N as held by the DDS cores: loaded from n_word on every n_valid
  int   n_model = 0;
  always @(posedge clk) if (rst_n && n_valid) n_model <= int'(n_word);
  always @(posedge clk) begin
    #1;
    n_now = n_model;
    fr_count++;
    if (fr_pulse) begin
      fr_resets++;
      if (!n_changed && fr_n_start > 0) begin
        check(fr_count == (256 + fr_n_start - 1) / fr_n_start,
              $sformatf("forced-reset period %0d for N=%0d", fr_count, fr_n_start));
        fr_exact++;
      end
      fr_count   = 0;
      fr_n_start = n_now;
      n_changed  = 1'b0;
    end else if (n_now != fr_n_start) begin
      n_changed = 1'b1;
    end
  end

  // ---- pulsed-output DDS: two interval lengths for one N ----
  int pa_count = 0, pa_last = -1, pa_n = -1;
  always @(posedge clk) begin
    #1;
    pa_count++;
    if (pa_carry) begin
      if (n_model == pa_n && pa_last > 0 && pa_count != pa_last) pa_jitter++;
      pa_n     = n_model;
      pa_last  = pa_count;
      pa_count = 0;
    end
  end

  // ---- sine sample range ----
  always @(posedge clk) begin
    if (rst_n && sine_code == 8'd255) sine_peaks++;
    if (rst_n && sine_code == 8'd1) sine_troughs++;
  end

  // average fout period over `periods` rising edges, in ns
  task automatic measure(input int periods, output real avg);
    realtime t0;
    @(posedge fout);
    t0 = $realtime;
    repeat (periods) @(posedge fout);
    avg = ($realtime - t0) / periods;
  endtask

  initial begin
    real avg;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // A: forced-reset oscillator, fin period 400 ns
    #400us;
    measure(300, avg);
    $display("phase A: fin period %0d ns, fout period %0.2f ns", 2 * fin_half, avg);
    check(avg > 0.99 * 2 * fin_half && avg < 1.01 * 2 * fin_half, "phase A lock");

    // B: switch to the pulsed-output DDS
    dco_sel = 1'b1;
    mode_switches++;
    #400us;
    measure(300, avg);
    $display("phase B: fin period %0d ns, fout period %0.2f ns", 2 * fin_half, avg);
    check(avg > 0.99 * 2 * fin_half && avg < 1.01 * 2 * fin_half, "phase B lock");

    // C: back to forced reset, fin period 480 ns
    dco_sel = 1'b0;
    mode_switches++;
    fin_half = 240;
    #800us;
    measure(300, avg);
    $display("phase C: fin period %0d ns, fout period %0.2f ns", 2 * fin_half, avg);
    check(avg > 0.99 * 2 * fin_half && avg < 1.01 * 2 * fin_half, "phase C lock");

    $display("mechanisms: N updates %0d, forced resets %0d (exact periods %0d), pulsed jitter %0d, mode switches %0d, T-FF toggles %0d, sine peaks %0d troughs %0d",
             n_updates, fr_resets, fr_exact, pa_jitter, mode_switches, tff_toggles, sine_peaks, sine_troughs);
    check(n_updates > 0, "converter never updated N");
    check(fr_resets > 0, "forced reset never happened");
    check(fr_exact > 0, "no forced-reset period checked");
    check(pa_jitter > 0, "pulsed DDS jitter never observed");
    check(mode_switches == 2, "mode switches");
    check(tff_toggles > 0, "T flip-flop never toggled");
    check(sine_peaks > 0 && sine_troughs > 0, "sine never reached full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
