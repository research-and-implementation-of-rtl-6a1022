// tb_t_flip_flop_divider: self-checking test of the toggle-flip-flop divider.
//
// A default (one-stage) and a two-stage instance get the same train of
// one-clock pulses with random spacing. After the k-th pulse the one-stage
// output must equal bit 0 of k (it toggles on every pulse) and the two-stage
// output bit 1 of k (divide by 4). With evenly spaced pulses (every 7
// clocks) the one-stage output must be high and low for 7 clocks each.
module tb_t_flip_flop_divider;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pulse = 1'b0;
  logic q1, q2;
  int   checks = 0, failures = 0;
  int   count = 0;

  always #5 clk = ~clk;

  t_flip_flop_divider dut1 (.clk(clk), .rst_n(rst_n), .pulse(pulse), .q(q1));
  t_flip_flop_divider #(.STAGES(2)) dut2 (.clk(clk), .rst_n(rst_n), .pulse(pulse), .q(q2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int hi_run, lo_run;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!q1 && !q2, "reset value");
    for (int i = 0; i < 400; i++) begin
      pulse = ($urandom_range(0, 2) == 0);
      @(negedge clk);
      if (pulse) count++;
      check(q1 == count[0], $sformatf("stage1 after %0d pulses", count));
      check(q2 == count[1], $sformatf("stage2 after %0d pulses", count));
    end
    // evenly spaced pulses: 50% duty
    pulse = 1'b0;
    hi_run = 0; lo_run = 0;
    for (int i = 0; i < 7 * 20; i++) begin
      pulse = (i % 7 == 0);
      @(negedge clk);
      if (i >= 14) begin
        if (q1) hi_run++; else lo_run++;
      end
    end
    check(hi_run == lo_run, $sformatf("duty: high %0d low %0d", hi_run, lo_run));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
