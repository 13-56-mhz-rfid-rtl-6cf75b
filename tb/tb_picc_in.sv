// tb_picc_in: checks the card receiver's modified Miller decoding and frame
// checks.
//
// The testbench builds each reader command's carrier pauses (start 0, data
// LSB first, odd parity per byte for standard frames, end 0; a 1 pauses at
// half bit, a 0 after a 0 or the start at the bit start, a 0 after a 1 not at
// all) and turns them into the detector's view: each 32-period pause is
// reported from 20 periods after it starts until 8 after it ends. Checked:
// REQA and WUPA short frames, random standard frames of 1..9 bytes (so all
// onset spacings of 128, 192 and 256 occur, and end bits with and without a
// pause), a parity error and a frame with a missing bit give rx_error, and a
// frame sent while rx_en is low is ignored. The age reported with each
// frame must lie at most 40 carrier periods below the true time since the
// frame's last bit ended, and never above it.
module tb_picc_in;
  import rfid_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic       tick = 1'b0;
  logic       rx_en = 1'b1;
  logic       modulated = 1'b0;
  logic       rx_valid, rx_error;
  pcd_frame_t rx_frame;

  logic [15:0] rx_age;
  picc_in dut (.clk, .rst, .tick, .rx_en, .modulated, .rx_valid, .rx_frame, .rx_error, .rx_age);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int n_valid = 0, n_error = 0;
  pcd_frame_t last;
  int tk = 0;                 // ticks played in the current frame
  int valid_tk, last_age;
  always @(posedge clk) begin
    if (rx_valid) begin
      n_valid++;
      last     = rx_frame;
      valid_tk = tk;
      last_age = int'(rx_age);
    end
    if (rx_error) n_error++;
  end

  task automatic play(input bit lvl[$]);
    foreach (lvl[k]) begin
      @(negedge clk);
      modulated = lvl[k];
      repeat (8) @(negedge clk);
      tick = 1'b1;
      tk++;
      @(negedge clk);
      tick = 1'b0;
    end
  endtask

  function automatic void build(input pcd_frame_t f, input int bad_parity_byte,
                                input bit drop_bit, output bit lvl[$], output int end_tk);
    bit bits[$];
    bit raw[$];
    bits.push_back(1'b0);
    if (f.short_frame) begin
      for (int j = 0; j < 7; j++) bits.push_back(f.data[j]);
    end else begin
      for (int b = 0; b < int'(f.nbytes); b++) begin
        for (int j = 0; j < 8; j++) bits.push_back(f.data[8*b+j]);
        bits.push_back((~(^f.data[8*b +: 8])) ^ (b == bad_parity_byte));
      end
    end
    bits.push_back(1'b0);
    if (drop_bit) bits.delete(3);
    for (int i = 0; i < 100; i++) raw.push_back(1'b0);
    foreach (bits[i])
      for (int k = 0; k < 128; k++)
        raw.push_back(bits[i] ? (k >= 64 && k < 96)
                              : ((i == 0 || !bits[i-1]) ? (k < 32) : 1'b0));
    end_tk = raw.size();
    for (int i = 0; i < 600; i++) raw.push_back(1'b0);
    lvl = {};
    foreach (raw[t]) lvl.push_back((t >= 20) && raw[t-20] && raw[t-8]);
  endfunction

  task automatic frame_test(input pcd_frame_t f, input int bad, input bit drop, input bit en);
    bit lvl[$];
    int v0, e0, end_tk, real_age;
    build(f, bad, drop, lvl, end_tk);
    tk = 0;
    v0 = n_valid; e0 = n_error;
    rx_en = en;
    play(lvl);
    if (!en) begin
      check(n_valid == v0 && n_error == e0, "ignored while rx_en low");
    end else if (bad >= 0 || drop) begin
      check(n_valid == v0 && n_error == e0 + 1, "bad frame reported as error");
    end else begin
      check(n_valid == v0 + 1 && n_error == e0, $sformatf("frame received (short %b, %0d bytes)",
                                                         f.short_frame, f.nbytes));
      check(last.short_frame == f.short_frame && last.nbytes == f.nbytes, "frame kind and length");
      check(last.data == f.data, $sformatf("data %h vs %h", last.data, f.data));
      // The reported age may fall short of the true time since the frame's
      // end by the detection delay (28 periods here), never exceed it.
      real_age = valid_tk - end_tk;
      check(last_age <= real_age && real_age - last_age <= 40,
            $sformatf("age %0d, true time since frame end %0d", last_age, real_age));
    end
  endtask

  initial begin
    pcd_frame_t f;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    frame_test('{short_frame: 1'b1, nbytes: 4'd0, data: 72'(CMD_REQA)}, -1, 1'b0, 1'b1);
    frame_test('{short_frame: 1'b1, nbytes: 4'd0, data: 72'(CMD_WUPA)}, -1, 1'b0, 1'b1);
    frame_test('{short_frame: 1'b0, nbytes: 4'd2, data: 72'h2093}, -1, 1'b0, 1'b1);
    frame_test('{short_frame: 1'b0, nbytes: 4'd9, data: 72'hB2_08D2_1278_5634_7093}, -1, 1'b0, 1'b1);
    for (int i = 0; i < 12; i++) begin
      f.short_frame = 1'b0;
      f.nbytes = 4'(1 + $urandom_range(8));
      f.data = 72'({$urandom, $urandom, $urandom});
      for (int b = 0; b < 9; b++) if (b >= int'(f.nbytes)) f.data[8*b +: 8] = 8'h00;
      frame_test(f, -1, 1'b0, 1'b1);
    end
    frame_test('{short_frame: 1'b0, nbytes: 4'd9, data: 72'hB2_08D2_1278_5634_7093}, 4, 1'b0, 1'b1);
    frame_test('{short_frame: 1'b0, nbytes: 4'd4, data: 72'h1234_0050}, -1, 1'b1, 1'b1);
    frame_test('{short_frame: 1'b1, nbytes: 4'd0, data: 72'(CMD_REQA)}, -1, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
