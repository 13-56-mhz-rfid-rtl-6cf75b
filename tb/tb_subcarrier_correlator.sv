// tb_subcarrier_correlator: checks the correlator against a reference model.
//
// Samples arrive every 10 cycles: stretches of constant envelope, of a clean
// fc/16 subcarrier (two levels, 8 samples each) with noise, and of random
// values. A reference in the testbench keeps its own 32-sample history,
// takes the mean, casts each sample to +/-1 and correlates with the square
// wave; every output is compared. It also checks the extremes: 0 for a
// constant input and 32 for a subcarrier aligned with the reference.
module tb_subcarrier_correlator;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic       sample_valid = 1'b0;
  logic [9:0] sample = '0;
  logic       corr_valid;
  logic [5:0] corr;

  subcarrier_correlator #(.ADC_W(10), .WIN(32), .SUBC_PERIOD(16)) dut (
    .clk, .rst, .sample_valid, .sample, .corr_valid, .corr
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int hist [32];
  int seen_max = 0, seen_zero = 0;

  function automatic int ref_corr();
    real mean;
    int dot;
    mean = 0.0;
    for (int i = 0; i < 32; i++) mean += real'(hist[i]) / 32.0;
    dot = 0;
    for (int i = 0; i < 32; i++) begin
      int s, r;
      s = (real'(hist[i]) >= mean) ? 1 : -1;
      r = ((i % 16) < 8) ? 1 : -1;
      dot += s * r;
    end
    return dot < 0 ? -dot : dot;
  endfunction

  task automatic push(input int v);
    @(negedge clk);
    sample = 10'(v);
    sample_valid = 1'b1;
    for (int i = 31; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = v;
    @(negedge clk);
    sample_valid = 1'b0;
    @(negedge clk);
    // corr_valid was high on this cycle's preceding edge; value now stable
    check(int'(corr) == ref_corr(), $sformatf("corr %0d expected %0d", corr, ref_corr()));
    repeat (7) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 32; i++) hist[i] = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    // constant envelope
    for (int t = 0; t < 64; t++) push(500);
    check(ref_corr() == 0 && corr == 0, "constant input gives 0");
    // clean subcarrier, then noisy subcarrier
    for (int t = 0; t < 64; t++) begin
      push(((t % 16) < 8) ? 450 : 520);
      if (corr == 6'd32) seen_max++;
    end
    check(seen_max > 0, "aligned subcarrier reaches 32");
    for (int t = 0; t < 200; t++) push((((t % 16) < 8) ? 450 : 520) + int'($urandom_range(6)) - 3);
    // noise only
    for (int t = 0; t < 200; t++) push(500 + int'($urandom_range(6)) - 3);
    // random
    for (int t = 0; t < 200; t++) push(int'($urandom_range(1023)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
