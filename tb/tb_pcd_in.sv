// tb_pcd_in: checks the reader receiver's Manchester decoding and frame
// checks.
//
// The testbench builds each card answer's modulation (start 1, bytes LSB
// first with odd parity; a 1 modulated in the first half bit, a 0 in the
// second) and turns it into what the detector chain reports: every
// modulated run is seen 40 carrier periods late and ends 4 periods late, so
// a half-bit run reads as 28 periods and a merged 0->1 run as 92. Some runs
// get a 2-period dropout in the middle, which the glitch filter must bridge.
// Checked: random 1..5-byte frames arrive intact with the right length; a
// frame with a wrong parity bit gives rx_error and no rx_valid; a frame sent
// while rx_en is low is ignored; the result arrives within 400 carrier
// periods of the last modulation; the frame age reported with it lies at
// most 70 carrier periods below the true time since the frame's end, and
// never above it.
module tb_pcd_in;
  import rfid_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic        tick = 1'b0;
  logic        rx_en = 1'b1;
  logic        modulated = 1'b0;
  logic        rx_valid, rx_error;
  picc_frame_t rx_frame;

  logic [15:0] rx_age;
  pcd_in dut (.clk, .rst, .tick, .rx_en, .modulated, .rx_valid, .rx_frame, .rx_error, .rx_age);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Results seen by the monitor.
  int n_valid = 0, n_error = 0;
  picc_frame_t last;
  longint t_last_valid;
  int     last_age;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rx_valid) begin
      n_valid++;
      last = rx_frame;
      t_last_valid = cyc;
      last_age     = int'(rx_age);
    end
    if (rx_error) n_error++;
  end

  // Play one carrier period per 10 cycles.
  task automatic play(input bit lvl[$]);
    foreach (lvl[k]) begin
      @(negedge clk);
      modulated = lvl[k];
      repeat (8) @(negedge clk);
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
    end
  endtask

  // Returns the detector view of a frame followed by 600 quiet periods.
  function automatic void build(input picc_frame_t f, input int bad_parity_byte,
                                input bit dropouts, output bit lvl[$]);
    bit bits[$];
    bit raw[$];
    bits.push_back(1'b1);
    for (int b = 0; b < int'(f.nbytes); b++) begin
      for (int j = 0; j < 8; j++) bits.push_back(f.data[8*b+j]);
      bits.push_back((~(^f.data[8*b +: 8])) ^ (b == bad_parity_byte));
    end
    for (int i = 0; i < 100; i++) raw.push_back(1'b0);
    foreach (bits[i])
      for (int k = 0; k < 128; k++) raw.push_back(bits[i] ? (k < 64) : (k >= 64));
    for (int i = 0; i < 600; i++) raw.push_back(1'b0);
    lvl = {};
    foreach (raw[t]) begin
      bit v;
      v = (t >= 40) && raw[t-40] && raw[t-4];
      if (dropouts && v && (t % 97 == 0)) v = 1'b0;
      lvl.push_back(v);
    end
  endfunction

  task automatic frame_test(input picc_frame_t f, input int bad, input bit en, input bit drop);
    bit lvl[$];
    int v0, e0;
    longint t_end;
    build(f, bad, drop, lvl);
    v0 = n_valid; e0 = n_error;
    rx_en = en;
    play(lvl);
    t_end = cyc - 600 * 10;
    if (!en) begin
      check(n_valid == v0 && n_error == e0, "ignored while rx_en low");
    end else if (bad >= 0) begin
      check(n_valid == v0 && n_error == e0 + 1, "parity error reported");
    end else begin
      check(n_valid == v0 + 1 && n_error == e0, $sformatf("frame of %0d bytes received", f.nbytes));
      check(last.nbytes == f.nbytes, $sformatf("length %0d vs %0d", last.nbytes, f.nbytes));
      check((last.data & ((40'd1 << (8 * f.nbytes)) - 1)) == f.data,
            $sformatf("data %h vs %h", last.data, f.data));
      check(t_last_valid - t_end < 400 * 10, "result within 400 carrier periods");
      // The reported age may fall short of the true time since the frame's
      // end by the detection delay (about 56 periods here), never exceed it.
      check(longint'(last_age) * 10 <= t_last_valid - t_end + 10 &&
            t_last_valid - t_end - longint'(last_age) * 10 <= 70 * 10,
            $sformatf("age %0d, true time since frame end %0d cycles", last_age, t_last_valid - t_end));
    end
  endtask

  initial begin
    picc_frame_t f;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    frame_test('{nbytes: 3'd2, data: 40'h0004}, -1, 1'b1, 1'b0);
    frame_test('{nbytes: 3'd5, data: 40'h08_7856_3412}, -1, 1'b1, 1'b1);
    frame_test('{nbytes: 3'd3, data: 40'hB6DD08}, -1, 1'b1, 1'b0);
    for (int i = 0; i < 12; i++) begin
      f.nbytes = 3'(1 + $urandom_range(4));
      f.data = {8'($urandom), $urandom};
      f.data = f.data & ((40'd1 << (8 * f.nbytes)) - 1);
      frame_test(f, -1, 1'b1, i[0]);
    end
    frame_test('{nbytes: 3'd5, data: 40'h08_7856_3412}, 2, 1'b1, 1'b0);
    frame_test('{nbytes: 3'd2, data: 40'h0004}, 0, 1'b1, 1'b0);
    frame_test('{nbytes: 3'd2, data: 40'h0004}, -1, 1'b0, 1'b0);
    frame_test('{nbytes: 3'd2, data: 40'h0044}, -1, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
