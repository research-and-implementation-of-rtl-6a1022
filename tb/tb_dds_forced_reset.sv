// tb_dds_forced_reset: self-checking test of the forced-reset DDS.
//
// 1. k = 4, N = 5: the phase must repeat 0,5,10,15 with a carry on every 0,
//    i.e. a constant period of 4 clocks (no phase jitter).
// 2. k = 8 (default): for every N from 1 to 255 the distance between carry
//    pulses must be exactly B = ceil(256/N) clocks for three periods in a
//    row, and the MSB must be high for B - ceil(128/N) clocks per period.
// 3. N = 0 must produce no pulse; changing N must change the period.
module tb_dds_forced_reset;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic       ld4;
  logic [3:0] n4, ph4;
  logic       c4, m4;
  dds_forced_reset #(.K(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .n_load(ld4), .n_in(n4),
    .phase(ph4), .carry(c4), .msb(m4));

  logic       ld8;
  logic [7:0] n8, ph8;
  logic       c8, m8;
  dds_forced_reset dut8 (
    .clk(clk), .rst_n(rst_n), .n_load(ld8), .n_in(n8),
    .phase(ph8), .carry(c8), .msb(m8));

  task automatic load8(input int n);
    @(negedge clk);
    ld8 = 1'b1; n8 = 8'(n);
    @(negedge clk);
    ld8 = 1'b0;
  endtask

  // wait for the next carry pulse, at most `limit` clocks; returns clocks waited
  task automatic wait_carry(input int limit, output int waited);
    waited = 0;
    do begin
      @(negedge clk);
      waited++;
    end while (!c8 && waited < limit);
  endtask

  initial begin
    int b, w, hi, msb_hi;
    ld4 = 1'b0; n4 = '0; ld8 = 1'b0; n8 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- worked example k = 4, N = 5 ----
    ld4 = 1'b1; n4 = 4'd5;
    @(negedge clk);
    ld4 = 1'b0;
    for (int t = 1; t <= 16; t++) begin
      @(negedge clk);
      check(int'(ph4) == (5 * (t % 4)), $sformatf("k=4 t=%0d phase %0d", t, ph4));
      check(c4 == (t % 4 == 0), $sformatf("k=4 t=%0d carry %0b", t, c4));
      check(m4 == ph4[3], "k=4 msb");
    end

    // ---- N = 0: no output ----
    load8(0);
    wait_carry(600, w);
    check(!c8 && ph8 == 8'd0, "N=0 must give no pulse");

    // ---- sweep of N ----
    for (int n = 1; n < 256; n++) begin
      b  = (256 + n - 1) / n;
      hi = b - (128 + n - 1) / n;
      load8(n);
      wait_carry(300, w);                 // align to a period start
      check(c8 == 1'b1, $sformatf("N=%0d no carry", n));
      for (int p = 0; p < 3; p++) begin
        msb_hi = 0;
        w = 0;
        do begin
          @(negedge clk);
          w++;
          if (m8) msb_hi++;
          check(m8 == ph8[7], "msb");
        end while (!c8 && w < 300);
        check(w == b, $sformatf("N=%0d period %0d exp %0d", n, w, b));
        // the pulse cycle itself has phase 0 (msb low)
        check(msb_hi == hi, $sformatf("N=%0d msb high %0d exp %0d", n, msb_hi, hi));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
