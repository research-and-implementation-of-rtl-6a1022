// tb_tdc_converter: self-checking test of the time-to-digital converter.
//
// The clock has a period of 10 ns with edges at every multiple of 5 ns
// (rising at 5, 15, 25 ..., falling at 10, 20, ...). EVENT pulses start
// and end between edges, at random, so the expected code is the number of
// half-period edges inside the pulse, floor(t_end/5) - floor(t_start/5),
// saturated at 255. For each pulse the testbench checks the code, that
// exactly one n_valid strobe is produced, and that it comes on the first
// rising edge after EVENT falls (latency below one clock). A pulse longer
// than 255 half periods must give 255.
module tb_tdc_converter;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       ev = 1'b0;
  logic [7:0] n_word;
  logic       n_valid;
  int         checks = 0, failures = 0;
  int         strobes = 0;
  logic [7:0] last_code;
  longint     last_strobe_time;

  always #5 clk = ~clk;

  tdc_converter dut (.clk(clk), .rst_n(rst_n), .event_i(ev), .n_word(n_word), .n_valid(n_valid));

  always @(posedge clk) begin
    #1;
    if (n_valid) begin
      strobes++;
      last_code = n_word;
      last_strobe_time = longint'($time);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one pulse: start at an absolute time t0 (not a multiple of 5), length len
  task automatic pulse(input longint len);
    longint t0, t1, expv;
    int     s0;
    // move to a time 1..4 ns after an edge
    #($urandom_range(1, 4));
    t0 = longint'($time);
    if (t0 % 5 == 0) begin
      #1;
      t0 = longint'($time);
    end
    t1 = t0 + len;
    if (t1 % 5 == 0) t1 = t1 + 1;
    expv = (t1 / 5) - (t0 / 5);
    if (expv > 255) expv = 255;
    s0 = strobes;
    ev = 1'b1;
    #(t1 - t0);
    ev = 1'b0;
    // wait two clocks for the result
    repeat (2) @(posedge clk);
    #2;
    check(strobes == s0 + 1, $sformatf("len %0d: %0d strobes", len, strobes - s0));
    check(longint'(last_code) == expv, $sformatf("len %0d (t0=%0d): code %0d exp %0d", len, t0, last_code, expv));
    check(last_strobe_time - t1 <= 11, $sformatf("len %0d: latency %0d", len, last_strobe_time - t1));
    repeat ($urandom_range(1, 3)) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(strobes == 0 && n_word == 8'd0, "idle after reset");
    for (int len = 6; len <= 200; len += 3) pulse(longint'(len));
    for (int i = 0; i < 100; i++) pulse(longint'($urandom_range(6, 1200)));
    pulse(3000);
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
