// tb_pcd_out: checks the reader transmitter's modified Miller coding.
//
// Frames (short REQA, 2-byte, 9-byte and random standard frames) are sent
// with a testbench tick every 10 cycles. The expected pause pattern is built
// independently from the frame's bit list (start 0, data LSB first, odd
// parity per byte, end 0): a 1 pauses carrier periods 64..95 of its bit, a 0
// after a 0 or the start pauses 0..31, a 0 after a 1 does not pause. The
// output is compared in every carrier period, and the frame length (busy
// time) is checked to be exactly bits*128 carrier periods.
module tb_pcd_out;
  import rfid_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic       tick = 1'b0;
  logic       tx_valid = 1'b0;
  pcd_frame_t tx_frame = '0;
  logic       pause, busy;

  pcd_out #(.BIT_FC(128), .PAUSE_FC(32)) dut (.clk, .rst, .tick, .tx_valid, .tx_frame, .pause, .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input pcd_frame_t f);
    bit bits[$];
    int nb, errs;
    bits.push_back(1'b0);
    if (f.short_frame) begin
      for (int j = 0; j < 7; j++) bits.push_back(f.data[j]);
    end else begin
      for (int b = 0; b < int'(f.nbytes); b++) begin
        for (int j = 0; j < 8; j++) bits.push_back(f.data[8*b+j]);
        bits.push_back(~(^f.data[8*b +: 8]));
      end
    end
    bits.push_back(1'b0);
    nb = bits.size();
    // start right after a tick
    @(negedge clk);
    tx_frame = f; tx_valid = 1'b1;
    @(negedge clk);
    tx_valid = 1'b0;
    errs = 0;
    for (int k = 0; k < nb * 128; k++) begin
      int bi, pos;
      bit exp;
      bi = k / 128; pos = k % 128;
      if (bits[bi]) exp = (pos >= 64 && pos < 96);
      else exp = (bi == 0 || !bits[bi-1]) ? (pos < 32) : 1'b0;
      repeat (5) @(negedge clk);
      if (pause !== exp || !busy) errs++;
      repeat (4) @(negedge clk);
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
    end
    repeat (2) @(negedge clk);
    check(errs == 0, $sformatf("pause pattern: %0d wrong carrier periods of %0d bits", errs, nb));
    check(!busy && !pause, "busy ends after exactly bits*128 carrier periods");
  endtask

  initial begin
    pcd_frame_t f;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    send('{short_frame: 1'b1, nbytes: 4'd0, data: 72'(CMD_REQA)});
    send('{short_frame: 1'b0, nbytes: 4'd2, data: 72'h2093});
    send('{short_frame: 1'b0, nbytes: 4'd9, data: 72'hB2_08D2_1278_5634_7093});
    for (int i = 0; i < 6; i++) begin
      f.short_frame = 1'b0;
      f.nbytes = 4'(1 + $urandom_range(8));
      f.data = {$urandom, $urandom, $urandom};
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
