// tb_mod_detector: checks the 20-of-32 majority filter.
//
// Hit flags arrive every 10 cycles in bursts of random length and density;
// a reference keeps the last 32 flags and expects "modulated" exactly when
// at least 20 are set, checked before the next flag. It also checks that
// the output asserts after exactly 20 consecutive hits from an empty history.
module tb_mod_detector;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic in_valid = 1'b0;
  logic hit = 1'b0;
  logic modulated;

  mod_detector #(.WIN(32), .MIN_HITS(20)) dut (.clk, .rst, .in_valid, .hit, .modulated);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit hist [32];
  int first_on = -1;

  task automatic push(input bit h, input int idx);
    int cnt;
    @(negedge clk);
    hit = h;
    in_valid = 1'b1;
    for (int i = 31; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = h;
    cnt = 0;
    for (int i = 0; i < 32; i++) cnt += int'(hist[i]);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(modulated == (cnt >= 20), $sformatf("count %0d modulated %b", cnt, modulated));
    if (modulated && first_on < 0) first_on = idx;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int idx;
    for (int i = 0; i < 32; i++) hist[i] = 1'b0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    idx = 0;
    for (int t = 0; t < 40; t++) push(1'b1, idx++);
    check(first_on == 19, $sformatf("asserted after %0d hits", first_on + 1));
    for (int t = 0; t < 40; t++) push(1'b0, idx++);
    for (int b = 0; b < 40; b++) begin
      int len, dens;
      len = 10 + int'($urandom_range(60));
      dens = int'($urandom_range(100));
      for (int t = 0; t < len; t++) push(int'($urandom_range(99)) < dens, idx++);
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
