// tb_adc_decoder: checks that the two detector chains find their modulation
// in a raw sample stream, and only there.
//
// Part 1 (reader side): a steady envelope of 520 +/- 3 LSB with 64-sample
// bursts of fc/16 subcarrier (470/520). pcd_mod must rise in every burst,
// 30 to 70 samples after the burst starts, and must not be high more than
// 50 samples after a burst ends. picc_mod must stay low (no deep pause).
// Part 2 (card side): a carrier at 800 with 32-sample pauses to 60. picc_mod
// must rise in every pause, 19 to 32 samples after it starts, and fall
// again before the next pause.
module tb_adc_decoder;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic       tick = 1'b0;
  logic [9:0] adc_data = '0;
  logic       pcd_mod, picc_mod;

  adc_decoder #(.ADC_W(10), .CORR_MIN(10)) dut (.clk, .rst, .tick, .adc_data, .pcd_mod, .picc_mod);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One sample per 10 cycles; flags read just before the next sample.
  task automatic sample(input int v, output bit pm, output bit cm);
    @(negedge clk);
    adc_data = 10'(v);
    tick = 1'b1;
    @(negedge clk);
    tick = 1'b0;
    repeat (8) @(negedge clk);
    pm = pcd_mod;
    cm = picc_mod;
  endtask

  initial begin
    bit pm, cm;
    int rise_at, stray, picc_stray;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 300; t++) sample(520 + int'($urandom_range(6)) - 3, pm, cm);
    // Part 1
    picc_stray = 0;
    for (int b = 0; b < 8; b++) begin
      rise_at = -1; stray = 0;
      for (int t = 0; t < 320; t++) begin
        int v;
        v = (t < 64) ? ((((t + b) % 16) < 8) ? 470 : 520) : 520;
        sample(v + int'($urandom_range(6)) - 3, pm, cm);
        if (pm && rise_at < 0) rise_at = t;
        if (pm && t > 64 + 50) stray++;
        if (cm) picc_stray++;
      end
      check(rise_at >= 30 && rise_at <= 70, $sformatf("burst %0d detected at sample %0d", b, rise_at));
      check(stray == 0, $sformatf("burst %0d: %0d late detections", b, stray));
    end
    check(picc_stray == 0, "no pause seen in subcarrier bursts");
    // Part 2
    for (int t = 0; t < 200; t++) sample(800 + int'($urandom_range(6)) - 3, pm, cm);
    for (int p = 0; p < 8; p++) begin
      int fall_seen;
      rise_at = -1; fall_seen = 0;
      for (int t = 0; t < 128; t++) begin
        sample((t < 32) ? 60 + int'($urandom_range(6)) : 800 + int'($urandom_range(6)) - 3, pm, cm);
        if (cm && rise_at < 0) rise_at = t;
        if (rise_at >= 0 && !cm) fall_seen = 1;
      end
      check(rise_at >= 18 && rise_at <= 32, $sformatf("pause %0d detected at sample %0d", p, rise_at));
      check(fall_seen == 1, $sformatf("pause %0d released", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
