// tb_pcd_ctrl: checks the reader control unit at frame level.
//
// The testbench plays the card: it takes each command from tx_valid, holds
// tx_busy for a short transmission, and answers on rx_valid/rx_frame 300
// carrier periods later (ATQA 04 00; UID bytes and BCC; SAK 08 with its
// CRC_A, computed by a reference in the testbench). It checks that the
// reader sends REQA, 93 20, and 93 70 + UID + BCC + correct CRC in that
// order, and reports the UID. Each command after an answer must start
// 1172 to 1180 carrier periods after that answer's end (a REQA: at least
// 1172), where the end is the report time less the reported frame age
// (192 in one round). REQAs must be at least 7000 periods apart. Faults
// the card injects, one per round: no answer (timeout, REQA repeated), a wrong BCC, a wrong SAK CRC
// and a receive error; none of them may produce uid_valid, and each must
// lead back to REQA.
module tb_pcd_ctrl;
  import rfid_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic        tick;
  logic        fc, fc_fall, subc;
  clock_gen u_clk (.clk, .rst, .fc, .fc_rise(tick), .fc_fall, .subc);

  logic        rx_valid = 1'b0, rx_error = 1'b0, tx_busy = 1'b0;
  picc_frame_t rx_frame = '0;
  logic [15:0] rx_age = '0;
  int          age_now = 0;     // frame age the "receiver" reports
  logic        tx_valid, rx_en, uid_valid;
  pcd_frame_t  tx_frame;
  logic [31:0] uid;

  pcd_ctrl dut (.clk, .rst, .tick, .enable(1'b1), .rx_valid, .rx_frame, .rx_error, .rx_age, .tx_valid,
                .tx_frame, .tx_busy, .rx_en, .uid, .uid_valid);

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

  // carrier-period counter
  longint fcn = 0;
  always @(posedge clk) if (tick) fcn <= fcn + 1;

  int n_uid = 0;
  logic [31:0] got_uid;
  always @(posedge clk) if (uid_valid) begin
    n_uid++;
    got_uid = uid;
  end

  localparam logic [31:0] CARD = 32'h12345678;
  localparam logic [39:0] UIDB = {8'h08, 8'h78, 8'h56, 8'h34, 8'h12}; // 12 34 56 78, BCC 08

  pcd_frame_t cmd;
  longint t_cmd, t_answer = -1, t_reqa = -1;

  task automatic get_cmd(input int max_fc);
    longint t0;
    t0 = fcn;
    while (!tx_valid && fcn - t0 < longint'(max_fc)) @(posedge clk);
    check(tx_valid, "command sent");
    cmd = tx_frame;
    t_cmd = fcn;
    if (t_answer >= 0) check(t_cmd - t_answer >= 1172 &&
                             (cmd.short_frame || t_cmd - t_answer <= 1180),
                             $sformatf("frame delay %0d carrier periods", t_cmd - t_answer));
    if (cmd.short_frame) begin
      if (t_reqa >= 0) check(t_cmd - t_reqa >= 7000, $sformatf("REQA spacing %0d", t_cmd - t_reqa));
      t_reqa = t_cmd;
    end
    // transmission
    @(negedge clk);
    tx_busy = 1'b1;
    repeat (500) @(negedge clk);
    tx_busy = 1'b0;
  endtask

  task automatic answer(input picc_frame_t f, input bit err);
    repeat (3000) @(negedge clk);
    check(rx_en, "receiver enabled while answer expected");
    rx_frame = f;
    rx_age   = 16'(age_now);
    rx_valid = !err;
    rx_error = err;
    @(negedge clk);
    rx_valid = 1'b0;
    rx_error = 1'b0;
    t_answer = err ? -1 : fcn - longint'(age_now);   // end of the answer
  endtask

  // One handshake; fault: 0 none, 1 no ATQA, 2 bad BCC, 3 bad SAK CRC, 4 rx error
  task automatic round(input int fault);
    logic [15:0] c;
    int n0;
    n0 = n_uid;
    get_cmd(20000);
    check(cmd.short_frame && cmd.data[6:0] == 7'h26, "REQA");
    if (fault == 1) begin
      t_answer = -1;
      return;
    end
    answer('{nbytes: 3'd2, data: 40'h0004}, fault == 4);
    if (fault == 4) return;
    get_cmd(5000);
    check(!cmd.short_frame && cmd.nbytes == 4'd2 && cmd.data[15:0] == 16'h2093, "ANTICOLLISION 93 20");
    answer('{nbytes: 3'd5, data: (fault == 2) ? UIDB ^ 40'h01_0000_0000 : UIDB}, 1'b0);
    if (fault == 2) return;
    get_cmd(5000);
    c = ref_crc(cmd.data, 7);
    check(!cmd.short_frame && cmd.nbytes == 4'd9 && cmd.data[15:0] == 16'h7093 &&
          cmd.data[55:16] == UIDB && cmd.data[71:56] == c,
          $sformatf("SELECT frame %h (crc %h)", cmd.data, c));
    c = ref_crc(72'h08, 1);
    answer('{nbytes: 3'd3, data: {16'h0, (fault == 3) ? c ^ 16'h0100 : c, 8'h08}}, 1'b0);
    repeat (200) @(negedge clk);
    if (fault == 0) check(n_uid == n0 + 1 && got_uid == CARD, $sformatf("UID reported %h", got_uid));
    else            check(n_uid == n0, "no UID after bad SAK CRC");
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst = 1'b0;
    round(0);
    round(1);   // timeout, next REQA must come
    round(2);
    age_now = 192;              // answers reported 192 periods after their end
    round(0);
    age_now = 0;
    round(3);
    round(4);
    round(0);
    check(n_uid == 3, $sformatf("%0d UIDs reported", n_uid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
