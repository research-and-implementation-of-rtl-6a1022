// tb_p2a_sine_rom: self-checking test of the phase-to-amplitude table.
//
// Every phase 0..255 is presented; one clock later the sample must equal
// floor(128 + 127*sin(2*pi*phase/256) + 0.5), computed here. Also checked
// explicitly: the four quarter points (128, 255, 128, 1) and the odd
// symmetry sample(p) + sample(p+128) = 256 (within one LSB of rounding).
module tb_p2a_sine_rom;
  logic       clk = 1'b0;
  logic [7:0] phase = '0;
  logic [7:0] amp;
  int         checks = 0, failures = 0;
  int         samples [256];

  always #5 clk = ~clk;

  p2a_sine_rom dut (.clk(clk), .phase(phase), .amplitude(amp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real ideal;
    int  expv, s;
    for (int p = 0; p < 256; p++) begin
      @(negedge clk);
      phase = 8'(p);
      @(negedge clk);
      ideal = 128.0 + 127.0 * $sin(2.0 * 3.141592653589793 * p / 256.0);
      expv  = int'($floor(ideal + 0.5));
      samples[p] = int'(amp);
      check(int'(amp) == expv, $sformatf("phase %0d: %0d exp %0d", p, amp, expv));
    end
    check(samples[0] == 128 && samples[64] == 255 && samples[128] == 128 && samples[192] == 1,
          "quarter points");
    for (int p = 1; p < 128; p++) begin
      s = samples[p] + samples[p + 128];
      check(s >= 255 && s <= 257, $sformatf("symmetry at %0d: %0d", p, s));
    end
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
