// tb_envelope_thresholder: checks the pause thresholder against a reference.
//
// Samples arrive every 10 cycles: a steady carrier with noise and 32-sample
// pauses (as a reader's on-off keying produces), shallow dips just above and
// below the 20 LSB margin, and random values. A reference keeps its own
// 128-sample history (zero after reset) and classifies each new sample
// against the average of the previous 128; every output is compared.
module tb_envelope_thresholder;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic       sample_valid = 1'b0;
  logic [9:0] sample = '0;
  logic       th_valid, th_out;

  envelope_thresholder #(.ADC_W(10), .AVG_LEN(128), .DELTA(20)) dut (
    .clk, .rst, .sample_valid, .sample, .th_valid, .th_out
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int hist [128];
  int n_low = 0;

  task automatic push(input int v);
    real avg;
    bit exp;
    avg = 0.0;
    for (int i = 0; i < 128; i++) avg += real'(hist[i]) / 128.0;
    exp = !(real'(v) <= avg - 20.0);
    @(negedge clk);
    sample = 10'(v);
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    check(th_valid && th_out == exp, $sformatf("sample %0d avg %f: out %b expected %b", v, avg, th_out, exp));
    if (!exp) n_low++;
    for (int i = 127; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = v;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 128; i++) hist[i] = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      if (t % 128 >= 40 && t % 128 < 72) push(60 + int'($urandom_range(6)));
      else push(800 + int'($urandom_range(6)) - 3);
    end
    for (int t = 0; t < 300; t++) push(((t % 7) == 0) ? 500 - 18 - int'($urandom_range(6)) : 500);
    for (int t = 0; t < 300; t++) push(int'($urandom_range(1023)));
    check(n_low > 100, "pauses detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
