// tb_digital_phase_detector: self-checking test of the phase detector.
//
// Two square waves of the same period (40 time units) are applied with a
// set of phase offsets. For each offset the detector output must be high
// for exactly 2*offset time units per period (two pulses of `offset`
// units each, one per edge pair), sampled every time unit, and every sample
// must match the exclusive OR of the two inputs.
module tb_digital_phase_detector;
  logic fin = 1'b0, fout = 1'b0;
  logic ev;
  int   checks = 0, failures = 0;

  digital_phase_detector dut (.fin(fin), .fout(fout), .event_o(ev));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int high;
    for (int off = 0; off <= 20; off += 4) begin
      high = 0;
      for (int t = 0; t < 40; t++) begin
        fin  = ((t % 40) < 20);
        fout = (((t - off + 40) % 40) < 20);
        #1;
        check(ev == (fin != fout), $sformatf("offset %0d t %0d", off, t));
        if (ev) high++;
      end
      check(high == 2 * off, $sformatf("offset %0d: high %0d units", off, high));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
