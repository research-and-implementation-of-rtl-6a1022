// tb_freq_sweep_16bit: frequency-versus-N sweep of a 16-bit forced-reset DDS.
//
// Runs the 16-bit configuration (k = 16) for control words N from 14 to
// 4700 and measures the output period in clocks. For each N the period
// must be exactly B = ceil(65536/N) on three successive periods, so fout =
// fclk/B; the resulting fout is reported for fclk = 20, 40 and 80 MHz.
// Where B drops by exactly one between N and N+1 the frequency step must be
// fclk/(B(B+1)). For comparison a 16-bit pulsed-output accumulator must
// produce exactly N carries in 2^16 clocks for a few N (fout = N*fclk/2^16).
// The forced-reset frequency must never exceed that linear value, since its
// period is the linear period rounded up to whole clocks.
module tb_freq_sweep_16bit;
  localparam int K = 16;
  localparam int M = 2 ** K;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         ld = 1'b0;
  logic [K-1:0] n = '0;
  logic [K-1:0] ph_fr, ph_pa;
  logic         c_fr, c_pa, m_fr, m_pa;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  dds_forced_reset #(.K(K)) dut_fr (
    .clk(clk), .rst_n(rst_n), .n_load(ld), .n_in(n),
    .phase(ph_fr), .carry(c_fr), .msb(m_fr));
  phase_accumulator #(.K(K)) dut_pa (
    .clk(clk), .rst_n(rst_n), .n_load(ld), .n_in(n),
    .phase(ph_pa), .carry(c_pa), .msb(m_pa));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic load(input int v);
    @(negedge clk);
    ld = 1'b1; n = K'(v);
    @(negedge clk);
    ld = 1'b0;
  endtask

  // period of the forced-reset output in clocks (after aligning to a pulse)
  task automatic period(input int limit, output int p);
    p = 0;
    do begin
      @(negedge clk);
      p++;
    end while (!c_fr && p < limit);
  endtask

  function automatic int ceil_div(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  initial begin
    int  p, b, prev_b, limit, carries;
    real f80, prev_f80, lin80;
    real fclk [3] = '{20.0e6, 40.0e6, 80.0e6};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev_b = 0;
    prev_f80 = 0.0;
    for (int nv = 14; nv <= 4700; nv += (nv < 200) ? 1 : 7) begin
      b = ceil_div(M, nv);
      limit = b + 2;
      load(nv);
      period(M, p);                       // align to a period start
      for (int i = 0; i < 3; i++) begin
        period(limit, p);
        check(p == b, $sformatf("N=%0d period %0d exp %0d", nv, p, b));
      end
      f80   = fclk[2] / real'(p);
      lin80 = fclk[2] * real'(nv) / real'(M);
      // forced reset rounds the period up: fout <= linear, within one step
      check(f80 <= lin80 + 1.0e-6 && (b == 1 || f80 >= fclk[2] / real'(b) - 1.0e-6),
            $sformatf("N=%0d fout %f linear %f", nv, f80, lin80));
      if (prev_b == b + 1)
        check((f80 - prev_f80) > fclk[2] / real'(b * (b + 1)) * 0.999999 &&
              (f80 - prev_f80) < fclk[2] / real'(b * (b + 1)) * 1.000001,
              $sformatf("N=%0d step %f exp %f", nv, f80 - prev_f80, fclk[2] / real'(b * (b + 1))));
      if (nv >= 200 && (nv - 200) % 700 == 0)
        $display("N=%5d B=%4d  fout @20MHz %10.1f Hz  @40MHz %10.1f Hz  @80MHz %10.1f Hz  (linear @80MHz %10.1f Hz)",
                 nv, b, fclk[0] / b, fclk[1] / b, fclk[2] / b, lin80);
      prev_b   = b;
      prev_f80 = f80;
    end
    // pulsed-output accumulator: exactly N carries in 2^k clocks
    foreach (fclk[j]) begin
      int nv = 1000 * (j + 1) + 37;
      load(nv);
      carries = 0;
      repeat (M) begin
        @(negedge clk);
        if (c_pa) carries++;
      end
      check(carries == nv, $sformatf("pulsed N=%0d: %0d carries", nv, carries));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
