// tb_picc_out: checks the card transmitter's Manchester coding.
//
// Frames of 1..5 bytes (ATQA, UID+BCC, SAK+CRC and random) are sent with a
// testbench tick every 10 cycles. The expected modulation is built
// independently from the bit list (start 1, data LSB first, odd parity per
// byte, no end bit): a 1 modulates carrier periods 0..63 of its bit, a 0
// periods 64..127. The output is compared in every carrier period and the
// frame length is checked to be exactly bits*128 carrier periods.
module tb_picc_out;
  import rfid_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic        tick = 1'b0;
  logic        tx_valid = 1'b0;
  picc_frame_t tx_frame = '0;
  logic        mod_en, busy;

  picc_out #(.BIT_FC(128)) dut (.clk, .rst, .tick, .tx_valid, .tx_frame, .mod_en, .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input picc_frame_t f);
    bit bits[$];
    int nb, errs;
    bits.push_back(1'b1);
    for (int b = 0; b < int'(f.nbytes); b++) begin
      for (int j = 0; j < 8; j++) bits.push_back(f.data[8*b+j]);
      bits.push_back(~(^f.data[8*b +: 8]));
    end
    nb = bits.size();
    @(negedge clk);
    tx_frame = f; tx_valid = 1'b1;
    @(negedge clk);
    tx_valid = 1'b0;
    errs = 0;
    for (int k = 0; k < nb * 128; k++) begin
      bit exp;
      exp = bits[k / 128] ? (k % 128 < 64) : (k % 128 >= 64);
      repeat (5) @(negedge clk);
      if (mod_en !== exp || !busy) errs++;
      repeat (4) @(negedge clk);
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
    end
    repeat (2) @(negedge clk);
    check(errs == 0, $sformatf("modulation pattern: %0d wrong carrier periods of %0d bits", errs, nb));
    check(!busy && !mod_en, "busy ends after exactly bits*128 carrier periods");
  endtask

  initial begin
    picc_frame_t f;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    send('{nbytes: 3'd2, data: 40'h0004});
    send('{nbytes: 3'd5, data: 40'h08_7856_3412});
    send('{nbytes: 3'd3, data: 40'hB6DD08});
    for (int i = 0; i < 6; i++) begin
      f.nbytes = 3'(1 + $urandom_range(4));
      f.data = {8'($urandom), $urandom};
      send(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
