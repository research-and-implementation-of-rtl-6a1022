// tb_phase_accumulator: self-checking test of the pulsed-output DDS.
//
// 1. k = 4, N = 5: the accumulator must walk through the 17-row sequence
//    0,5,10,15,4,9,14,3,8,13,2,7,12,1,6,11,0 with the carry high on the
//    rows that wrapped (4,3,2,1,0), which shows the one-clock phase jitter.
// 2. k = 8 (default), N = 0x13 and N = 0x48: every carry interval must be
//    floor or ceil of 256/N clocks, every phase value must match a reference
//    count kept here, and exactly N carries must occur in 256 clocks
//    (average fout = N*fclk/2^k). The MSB must equal phase[7].
// 3. k = 8, N = 128: carry every 2 clocks and the MSB toggling on every
//    clock, the maximum output frequency fclk/2.
module tb_phase_accumulator;
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

  // ---- k = 4 instance ----
  logic       ld4;
  logic [3:0] n4, ph4;
  logic       c4, m4;
  phase_accumulator #(.K(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .n_load(ld4), .n_in(n4),
    .phase(ph4), .carry(c4), .msb(m4));

  // ---- default (k = 8) instance ----
  logic       ld8;
  logic [7:0] n8, ph8;
  logic       c8, m8;
  phase_accumulator dut8 (
    .clk(clk), .rst_n(rst_n), .n_load(ld8), .n_in(n8),
    .phase(ph8), .carry(c8), .msb(m8));

  localparam int TABLE_ACC [17] = '{0, 5, 10, 15, 4, 9, 14, 3, 8, 13, 2, 7, 12, 1, 6, 11, 0};
  localparam bit TABLE_C   [17] = '{1, 0, 0, 1'b0, 1, 0, 0, 1, 0, 0, 1, 0, 0, 1, 0, 0, 1};

  task automatic run8(input int n);
    int ref_phase, last_carry, carries, lo, hi;
    lo = 256 / n;
    hi = (256 + n - 1) / n;
    @(negedge clk);
    ld8 = 1'b1; n8 = 8'(n);
    @(negedge clk);
    ld8 = 1'b0;
    ref_phase  = int'(ph8);
    last_carry = -1;
    carries    = 0;
    for (int t = 1; t <= 256 * 3; t++) begin
      @(negedge clk);
      ref_phase = ref_phase + n;
      check(c8 == (ref_phase >= 256), $sformatf("N=%0d carry at t=%0d", n, t));
      ref_phase = ref_phase % 256;
      check(int'(ph8) == ref_phase, $sformatf("N=%0d phase %0d exp %0d", n, ph8, ref_phase));
      check(m8 == ph8[7], "msb");
      if (c8) begin
        if (t <= 256) carries++;
        if (last_carry >= 0)
          check((t - last_carry == lo) || (t - last_carry == hi),
                $sformatf("N=%0d carry interval %0d not in {%0d,%0d}", n, t - last_carry, lo, hi));
        last_carry = t;
      end
    end
    check(carries == n, $sformatf("N=%0d: %0d carries in 256 clocks", n, carries));
  endtask

  initial begin
    ld4 = 1'b0; n4 = '0; ld8 = 1'b0; n8 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // load N = 5 on the next rising edge (edge e0)
    ld4 = 1'b1; n4 = 4'd5;
    @(negedge clk);
    ld4 = 1'b0;
    check(ph4 == 4'd0, "k=4 row 0 phase");
    for (int r = 1; r < 17; r++) begin
      @(negedge clk);
      check(int'(ph4) == TABLE_ACC[r], $sformatf("k=4 row %0d phase %0d exp %0d", r, ph4, TABLE_ACC[r]));
      check(c4 == TABLE_C[r], $sformatf("k=4 row %0d carry %0b", r, c4));
      check(m4 == ph4[3], "k=4 msb");
    end
    run8('h13);
    run8('h48);
    // maximum output frequency fclk/2 at N = 2^(k-1): MSB toggles every clock
    run8('h80);
    for (int t = 0; t < 8; t++) begin
      logic prev_msb;
      prev_msb = m8;
      @(negedge clk);
      check(m8 != prev_msb, "N=128: msb must toggle every clock (fout = fclk/2)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
