// tb_picc_ctrl: checks the card control unit at frame level.
//
// The testbench plays the reader, handing frames to the unit as picc_in
// would and collecting its answers from tx_valid (with a short tx_busy).
// Checked, for the emulated UID 0x12345678:
//   REQA -> ATQA 04 00; 93 20 -> 12 34 56 78 08 (UID and BCC)
//   SELECT with another UID, or with a bad CRC -> no answer, back to IDLE
//   SELECT with own UID and good CRC -> SAK 08 + CRC_A, selected high
//   REQA while ACTIVE -> ignored; HLTA -> HALT, no answer; REQA while HALT
//   -> ignored; WUPA while HALT -> ATQA; receive error while READY -> IDLE
// Every answer must start 1172 to 1180 carrier periods after the end of the
// request: after the report, less the frame age that comes with it (0, and
// 192 for one anticollision request).
// The CRC reference is computed in the testbench.
module tb_picc_ctrl;
  import rfid_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic tick, fc, fc_fall, subc;
  clock_gen u_clk (.clk, .rst, .fc, .fc_rise(tick), .fc_fall, .subc);

  logic        rx_valid = 1'b0, rx_error = 1'b0, tx_busy = 1'b0;
  logic [15:0] rx_age = '0;
  int          age_now = 0;
  pcd_frame_t  rx_frame = '0;
  logic        tx_valid, rx_en, selected;
  picc_frame_t tx_frame;

  picc_ctrl dut (.clk, .rst, .tick, .enable(1'b1), .uid(32'h12345678), .rx_valid, .rx_frame, .rx_age,
                 .rx_error, .tx_valid, .tx_frame, .tx_busy, .rx_en, .selected);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [15:0] ref_crc(input logic [71:0] d, input int n);
    logic [15:0] w;
    logic [7:0]  b;
    w = 16'h6363;
    for (int i = 0; i < n; i++) begin
      b = d[8*i +: 8] ^ w[7:0];
      b = b ^ (b << 4);
      w = (w >> 8) ^ (16'(b) << 8) ^ (16'(b) << 3) ^ (16'(b) >> 4);
    end
    return w;
  endfunction

  longint fcn = 0;
  always @(posedge clk) if (tick) fcn <= fcn + 1;

  // Send a frame; wait up to 3000 carrier periods for an answer.
  task automatic xfer(input pcd_frame_t f, input bit err, output bit got, output picc_frame_t a);
    longint t0;
    @(negedge clk);
    check(rx_en, "card listening");
    rx_frame = f; rx_valid = !err; rx_error = err; rx_age = 16'(age_now);
    @(negedge clk);
    rx_valid = 1'b0; rx_error = 1'b0;
    t0 = fcn;
    got = 1'b0;
    while (fcn - t0 < 3000 && !got) begin
      @(posedge clk);
      if (tx_valid) begin
        got = 1'b1;
        a = tx_frame;
        check(fcn - t0 + longint'(age_now) >= 1172 && fcn - t0 + longint'(age_now) <= 1180,
              $sformatf("answer %0d carrier periods after the report, frame age %0d", fcn - t0, age_now));
      end
    end
    if (got) begin
      @(negedge clk);
      tx_busy = 1'b1;
      repeat (300) @(negedge clk);
      tx_busy = 1'b0;
      repeat (5) @(negedge clk);
    end
  endtask

  pcd_frame_t REQA, WUPA, ANTI, HLTA, SEL_OK, SEL_BAD_UID, SEL_BAD_CRC;

  initial begin
    bit got;
    picc_frame_t a;
    logic [55:0] s7;
    REQA = '{short_frame: 1'b1, nbytes: 4'd0, data: 72'h26};
    WUPA = '{short_frame: 1'b1, nbytes: 4'd0, data: 72'h52};
    ANTI = '{short_frame: 1'b0, nbytes: 4'd2, data: 72'h2093};
    HLTA = '{short_frame: 1'b0, nbytes: 4'd4, data: 72'({ref_crc(72'h0050, 2), 16'h0050})};
    s7 = 56'h08_7856_3412_7093;
    SEL_OK = '{short_frame: 1'b0, nbytes: 4'd9, data: {ref_crc(72'(s7), 7), s7}};
    SEL_BAD_CRC = SEL_OK;
    SEL_BAD_CRC.data[70] = ~SEL_BAD_CRC.data[70];
    s7 = 56'h08_7856_3413_7093 ^ 56'h01_0000_0000_0000;
    SEL_BAD_UID = '{short_frame: 1'b0, nbytes: 4'd9, data: {ref_crc(72'(s7), 7), s7}};

    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (20) @(negedge clk);

    xfer(REQA, 1'b0, got, a);
    check(got && a.nbytes == 3'd2 && a.data[15:0] == 16'h0004, "ATQA");
    age_now = 192;                       // request reported 192 periods late
    xfer(ANTI, 1'b0, got, a);
    age_now = 0;
    check(got && a.nbytes == 3'd5 && a.data == 40'h08_7856_3412, $sformatf("UID+BCC %h", a.data));
    xfer(SEL_BAD_UID, 1'b0, got, a);
    check(!got && !selected, "SELECT of another UID ignored");
    xfer(ANTI, 1'b0, got, a);
    check(!got, "back in IDLE after foreign SELECT");
    xfer(REQA, 1'b0, got, a);
    check(got, "ATQA again");
    xfer(SEL_BAD_CRC, 1'b0, got, a);
    check(!got && !selected, "SELECT with bad CRC ignored");
    xfer(REQA, 1'b0, got, a);
    xfer(SEL_OK, 1'b0, got, a);
    check(got && a.nbytes == 3'd3 && a.data[7:0] == 8'h08 && a.data[23:8] == ref_crc(72'h08, 1),
          $sformatf("SAK+CRC %h", a.data));
    check(selected, "selected");
    xfer(REQA, 1'b0, got, a);
    check(!got && selected, "REQA ignored while ACTIVE");
    xfer(HLTA, 1'b0, got, a);
    check(!got && !selected, "halted");
    xfer(REQA, 1'b0, got, a);
    check(!got, "REQA ignored while HALT");
    xfer(WUPA, 1'b0, got, a);
    check(got && a.data[15:0] == 16'h0004, "WUPA wakes the card");
    xfer(ANTI, 1'b1, got, a);
    check(!got, "receive error: no answer");
    xfer(ANTI, 1'b0, got, a);
    check(!got, "back in IDLE after receive error");
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
