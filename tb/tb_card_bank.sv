// tb_card_bank: checks card selection and the hold rule.
//
// After reset the first card (0x12345678) is presented; selecting card 1
// presents 0x00BC614E one cycle later; while hold is high a change of
// card_sel has no effect, and it takes effect once hold drops. Then 300
// random cycles of selection and hold on this table and on a three-card
// table (whose 2-bit card_sel can point past its end, which must give card
// 0) are compared with a reference.
module tb_card_bank;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic        hold = 1'b0;
  logic        card_sel = 1'b0;
  logic [31:0] uid;

  card_bank dut (.clk, .rst, .hold, .card_sel, .uid);

  // A three-card table: card_sel is 2 bits wide, and 3 lies beyond it.
  localparam logic [2:0][31:0] UIDS3 = {32'hA1B2C3D4, 32'h0BADF00D, 32'hCAFE0001};
  logic        hold3 = 1'b0;
  logic [1:0]  sel3 = 2'd0;
  logic [31:0] uid3;
  card_bank #(.N_CARDS(3), .UIDS(UIDS3)) dut3 (.clk, .rst, .hold(hold3), .card_sel(sel3), .uid(uid3));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(uid == 32'h12345678, $sformatf("reset uid %h", uid));
    card_sel = 1'b1;
    @(negedge clk);
    check(uid == 32'h00BC614E, $sformatf("card 1 uid %h", uid));
    hold = 1'b1;
    card_sel = 1'b0;
    repeat (5) @(negedge clk);
    check(uid == 32'h00BC614E, "held during hold");
    hold = 1'b0;
    @(negedge clk);
    check(uid == 32'h12345678, "follows after hold");
    // Random selection and hold on both tables against a reference: the
    // output takes the selected entry (card 0 beyond the table) one cycle
    // after a cycle with hold low, and keeps its value otherwise.
    begin
      logic [31:0] exp2, exp3;
      exp2 = uid;
      exp3 = uid3;
      for (int i = 0; i < 300; i++) begin
        card_sel = 1'($urandom);
        hold     = ($urandom_range(3) == 0);
        sel3     = 2'($urandom);
        hold3    = ($urandom_range(3) == 0);
        if (!hold) exp2 = card_sel ? 32'h00BC614E : 32'h12345678;
        if (!hold3) exp3 = (sel3 < 2'd3) ? UIDS3[sel3] : UIDS3[0];
        @(negedge clk);
        check(uid == exp2, $sformatf("2-card table: %h, expected %h", uid, exp2));
        check(uid3 == exp3, $sformatf("3-card table: %h, expected %h (sel %0d)", uid3, exp3, sel3));
      end
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
