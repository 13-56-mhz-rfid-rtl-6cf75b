// tb_afe_ctrl: checks the front-end pin settings in all four modes.
//
// With a running carrier and subcarrier from clock_gen, for every
// combination of mode and transmitter state it checks the multiplexer code,
// that signal_in follows the carrier (one cycle later) unless the reader
// transmitter pauses or the card side owns the front-end, that load_mod
// follows the subcarrier only while the card transmitter modulates, and
// that the gain pins follow gain_sel.
module tb_afe_ctrl;
  import rfid_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic fc, fc_rise, fc_fall, subc;
  clock_gen u_clk (.clk, .rst, .fc, .fc_rise, .fc_fall, .subc);

  logic       mode = 1'b0, pcd_tx = 1'b0, pcd_pause = 1'b0, picc_tx = 1'b0, picc_mod = 1'b0;
  logic [1:0] gain_sel = 2'd0;
  logic       signal_in, load_mod;
  mux_sel_t   mux_sel;
  logic [1:0] gain;

  afe_ctrl #(.GAIN_W(2)) dut (.clk, .rst, .mode, .fc, .subc, .pcd_tx, .pcd_pause, .picc_tx,
                              .picc_mod, .gain_sel, .signal_in, .load_mod, .mux_sel, .gain);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 64; c++) begin
      int errs;
      mux_sel_t exp_mux;
      {mode, pcd_tx, pcd_pause, picc_tx, picc_mod} = 5'(c);
      gain_sel = 2'(c);
      errs = 0;
      exp_mux = mode ? (pcd_tx ? MUX_PCD_TX : MUX_PCD_RX) : (picc_tx ? MUX_PICC_TX : MUX_PICC_RX);
      @(negedge clk);
      for (int t = 0; t < 200; t++) begin
        logic fc_q, subc_q;
        fc_q = fc; subc_q = subc;
        @(negedge clk);
        if (mux_sel != exp_mux) errs++;
        if (signal_in != (mode && fc_q && !(pcd_tx && pcd_pause))) errs++;
        if (load_mod != (!mode && picc_tx && picc_mod && subc_q)) errs++;
        if (gain != gain_sel) errs++;
      end
      check(errs == 0, $sformatf("setting %b: %0d mismatches", 5'(c), errs));
    end
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
