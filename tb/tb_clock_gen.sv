// tb_clock_gen: checks the carrier and subcarrier timing.
//
// Over 2000 main-clock cycles it checks that fc has a period of 10 cycles
// with 5 high and 5 low, that fc_rise/fc_fall pulse in the first cycle after fc
// rises or falls, and that the subcarrier flips every 8 carrier
// periods (80 cycles).
module tb_clock_gen;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic fc, fc_rise, fc_fall, subc;
  clock_gen #(.CLK_PER_FC(10), .SUBC_HALF_FC(8)) dut (.clk, .rst, .fc, .fc_rise, .fc_fall, .subc);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int last_rise, last_subc, n_rise, high_run;
    logic fc_q, subc_q;
    last_rise = -1; last_subc = -1; n_rise = 0; high_run = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    fc_q = fc; subc_q = subc;
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk);
      #0;
      // strobe high in the first cycle after the edge
      if (t >= 10) begin   // fc starts low, so the first fall strobe has no edge
        check((fc && !fc_q) == fc_rise, $sformatf("rise strobe at %0d", t));
        check((!fc && fc_q) == fc_fall, $sformatf("fall strobe at %0d", t));
      end
      if (fc && !fc_q) begin
        if (last_rise >= 0) check(t - last_rise == 10, $sformatf("fc period %0d", t - last_rise));
        last_rise = t;
        n_rise++;
      end
      if (!fc && fc_q) check(high_run == 5, $sformatf("fc high for %0d", high_run));
      high_run = fc ? high_run + 1 : 0;
      if (subc != subc_q) begin
        if (last_subc >= 0) check(t - last_subc == 80, $sformatf("subc half period %0d", t - last_subc));
        last_subc = t;
      end
      fc_q = fc; subc_q = subc;
    end
    check(n_rise >= 199, "carrier running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
