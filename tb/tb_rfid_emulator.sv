// tb_rfid_emulator: end-to-end test of the emulator, reader against card.
//
// Two emulators run side by side, one as reader (PCD) and one as card
// (PICC), with every parameter at its default. They are linked the way the
// digital side can be tested without the analog board: the reader's carrier
// output is turned into an envelope (present while signal_in keeps toggling)
// and fed to the card's ADC, and the card's load-modulation pin lowers the
// envelope seen by the reader's ADC. Both ADCs are modelled with a 3-sample
// pipeline and a few LSB of noise.
//
// Sequence and checks:
//   1. the reader selects card 0 and reports UID 0x12345678; the card is
//      ACTIVE; every answer starts 1172 to 1232 carrier periods after the
//      end of the command; the reader's anticollision and SELECT commands
//      start 1172 to 1272 periods after the end of the card's answer; REQA
//      commands are at least 7000 periods apart
//   2. the selected card ignores the next REQA, so the reader times out
//   3. the card side switches mode away and back (restart) with card 1
//      chosen; the reader then reads UID 0x00BC614E
//   4. a false pause is forced into the card's envelope during a command:
//      the card reports a receive error, stays silent, and the reader
//      recovers on a later REQA and reads the UID again
// Counted mechanisms (each must occur): successful selections, reader
// timeouts, card receive errors, mode switches, 0->1 double-length runs in
// the reader's receiver, and pause spacings of 2, 3 and 4 half bits in the
// card's receiver.
module tb_rfid_emulator;
  import rfid_pkg::*;

  localparam int CLK_PER_FC = 10;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  // Reader side.
  logic [9:0] r_adc;
  logic       r_adc_clk, r_signal_in, r_load_mod, r_uid_valid, r_selected;
  mux_sel_t   r_mux;
  logic [1:0] r_gain;
  logic [31:0] r_uid;

  rfid_emulator u_reader (
    .clk, .rst, .mode(1'b1), .card_sel(1'b0), .gain_sel(2'd1), .adc_data(r_adc),
    .adc_clk(r_adc_clk), .signal_in(r_signal_in), .load_mod(r_load_mod),
    .mux_sel(r_mux), .gain(r_gain), .pcd_uid(r_uid), .pcd_uid_valid(r_uid_valid),
    .picc_selected(r_selected)
  );

  // Card side.
  logic       c_mode = 1'b0;
  logic       c_sel = 1'b0;
  logic [9:0] c_adc;
  logic       c_adc_clk, c_signal_in, c_load_mod, c_uid_valid, c_selected;
  mux_sel_t   c_mux;
  logic [1:0] c_gain;
  logic [31:0] c_uid;

  rfid_emulator u_card (
    .clk, .rst, .mode(c_mode), .card_sel(c_sel), .gain_sel(2'd2), .adc_data(c_adc),
    .adc_clk(c_adc_clk), .signal_in(c_signal_in), .load_mod(c_load_mod),
    .mux_sel(c_mux), .gain(c_gain), .pcd_uid(c_uid), .pcd_uid_valid(c_uid_valid),
    .picc_selected(c_selected)
  );

  // Channel: reader carrier -> card envelope.
  int   since_edge = 100;
  logic sig_q = 1'b0;
  logic glitch = 1'b0;
  always_ff @(posedge clk) begin
    sig_q      <= r_signal_in;
    since_edge <= (r_signal_in && !sig_q) ? 0 : since_edge + 1;
  end
  logic carrier_on;
  assign carrier_on = (since_edge <= CLK_PER_FC) && !glitch;

  adc_model #(.NOISE(3)) u_card_adc (
    .clk, .adc_clk(c_adc_clk), .level(carrier_on ? 10'd800 : 10'd60), .adc_data(c_adc)
  );

  // Channel: card load modulation -> reader envelope.
  adc_model #(.NOISE(3)) u_reader_adc (
    .clk, .adc_clk(r_adc_clk), .level(c_load_mod ? 10'd470 : 10'd520), .adc_data(r_adc)
  );

  // Scoreboard.
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters.
  int n_uid = 0, n_timeout = 0, n_card_err = 0, n_mode_sw = 0;
  int n_double = 0, n_gap2 = 0, n_gap3 = 0, n_gap4 = 0;
  logic [31:0] uids [4];

  always_ff @(posedge clk) begin
    if (!rst) begin
      if (r_uid_valid) begin
        $display("UID %h read, %0d cycles after the REQA", r_uid, cyc - last_reqa);
        if (n_uid < 4) uids[n_uid] <= r_uid;
        n_uid <= n_uid + 1;
      end
      if (u_reader.u_pcd_ctrl.state == u_reader.u_pcd_ctrl.S_WAIT &&
          u_reader.u_pcd_ctrl.tcnt >= 16'(9000) && !u_reader.u_pcd_ctrl.rx_valid &&
          !u_reader.u_pcd_ctrl.rx_error)
        n_timeout <= n_timeout + 1;
      if (u_card.picc_rx_error) n_card_err <= n_card_err + 1;
      if (u_reader.u_pcd_in.tick && u_reader.u_pcd_in.state == u_reader.u_pcd_in.S_RX &&
          u_reader.u_pcd_in.mod_f && !u_reader.u_pcd_in.rise &&
          u_reader.u_pcd_in.run_len == 60 && !u_reader.u_pcd_in.merged)
        n_double <= n_double + 1;
      if (u_card.u_picc_in.tick && u_card.u_picc_in.state == u_card.u_picc_in.S_RX &&
          u_card.u_picc_in.rise) begin
        if (u_card.u_picc_in.halves == 2) n_gap2 <= n_gap2 + 1;
        if (u_card.u_picc_in.halves == 3) n_gap3 <= n_gap3 + 1;
        if (u_card.u_picc_in.halves == 4) n_gap4 <= n_gap4 + 1;
      end
    end
  end

  // Timing checks: frame delay and request spacing, in main-clock cycles.
  longint cyc = 0;
  longint reader_tx_end = -1, last_reqa = -1;
  mux_sel_t r_mux_q, c_mux_q;
  int fdt_checked = 0;
  longint fdt_min = -1, fdt_max = 0;
  longint card_tx_end = -1, rdt_min = -1, rdt_max = 0;
  int     rdt_checked = 0;
  always @(posedge clk) begin
    cyc     <= cyc + 1;
    r_mux_q <= r_mux;
    c_mux_q <= c_mux;
    if (!rst) begin
      if (r_mux_q == MUX_PCD_TX && r_mux != MUX_PCD_TX) reader_tx_end <= cyc;
      if (c_mux_q == MUX_PICC_TX && c_mux != MUX_PICC_TX) card_tx_end <= cyc;
      // the reader's next command (anticollision, SELECT) after a card answer
      if (r_mux_q != MUX_PCD_TX && r_mux == MUX_PCD_TX && card_tx_end > reader_tx_end &&
          !u_reader.u_pcd_ctrl.tx_frame.short_frame) begin
        check(cyc - card_tx_end >= longint'(1172 * CLK_PER_FC) &&
              cyc - card_tx_end <= longint'((1172 + 100) * CLK_PER_FC),
              $sformatf("reader sent %0d cycles after answer end", cyc - card_tx_end));
        rdt_checked <= rdt_checked + 1;
        if (cyc - card_tx_end > rdt_max) rdt_max <= cyc - card_tx_end;
        if (rdt_min < 0 || cyc - card_tx_end < rdt_min) rdt_min <= cyc - card_tx_end;
      end
      if (c_mux_q != MUX_PICC_TX && c_mux == MUX_PICC_TX && reader_tx_end >= 0) begin
        check(cyc - reader_tx_end >= longint'(1172 * CLK_PER_FC) &&
              cyc - reader_tx_end <= longint'((1172 + 60) * CLK_PER_FC),
              $sformatf("card answered %0d cycles after command end", cyc - reader_tx_end));
        if (cyc - reader_tx_end > fdt_max) fdt_max <= cyc - reader_tx_end;
        if (fdt_min < 0 || cyc - reader_tx_end < fdt_min) fdt_min <= cyc - reader_tx_end;
        fdt_checked <= fdt_checked + 1;
      end
      if (u_reader.u_pcd_ctrl.tx_valid && u_reader.u_pcd_ctrl.tx_frame.short_frame) begin
        if (last_reqa >= 0)
          check(cyc - last_reqa >= longint'(7000 * CLK_PER_FC),
                $sformatf("REQA spacing %0d cycles", cyc - last_reqa));
        last_reqa <= cyc;
      end
    end
  end

  task automatic wait_uid(input int n, input int max_cycles);
    int k = 0;
    while (n_uid < n && k < max_cycles) begin
      @(posedge clk);
      k++;
    end
  endtask

  int err_before;

  initial begin
    repeat (20) @(posedge clk);
    rst = 1'b0;

    // 1. read card 0
    wait_uid(1, 2_000_000);
    repeat (2) @(posedge clk);
    check(n_uid >= 1, "first UID read");
    check(uids[0] == 32'h12345678, $sformatf("first UID %h", uids[0]));
    check(c_selected, "card ACTIVE after select");
    check(r_gain == 2'd1 && c_gain == 2'd2, "gain pins");

    // 2. selected card ignores REQA -> reader times out
    while (n_timeout < 1) @(posedge clk);
    check(c_selected, "card stays ACTIVE through REQA");

    // 3. switch to card 1 with a mode switch on the card side
    c_sel = 1'b1;
    c_mode = 1'b1;
    repeat (50) @(posedge clk);
    c_mode = 1'b0;
    n_mode_sw++;
    wait_uid(2, 2_000_000);
    repeat (2) @(posedge clk);
    check(n_uid >= 2 && uids[1] == 32'h00BC614E, $sformatf("second UID %h", uids[1]));

    // 4. restart card, then corrupt the next command with a false pause
    c_mode = 1'b1;
    repeat (50) @(posedge clk);
    c_mode = 1'b0;
    n_mode_sw++;
    // wait for the reader to start transmitting the next command
    while (!(r_mux == MUX_PCD_TX)) @(posedge clk);
    // REQA has pauses at 0 and 128 carrier periods; a false pause at 198 is
    // only 70 periods after the previous one, which no bit pattern allows
    err_before = n_card_err;
    repeat (198 * CLK_PER_FC) @(posedge clk);
    glitch = 1'b1;
    repeat (32 * CLK_PER_FC) @(posedge clk);
    glitch = 1'b0;
    repeat (2000 * CLK_PER_FC) @(posedge clk);
    check(n_card_err > err_before, "false pause reported as receive error");
    wait_uid(3, 3_000_000);
    repeat (2) @(posedge clk);
    check(n_uid >= 3 && uids[2] == 32'h00BC614E, $sformatf("UID after error %h", uids[2]));

    // mechanisms
    $display("mechanisms: selections=%0d timeouts=%0d card_rx_errors=%0d mode_switches=%0d",
             n_uid, n_timeout, n_card_err, n_mode_sw);
    $display("            double_runs=%0d gap2=%0d gap3=%0d gap4=%0d fdt_checks=%0d",
             n_double, n_gap2, n_gap3, n_gap4, fdt_checked);
    $display("            card answer delay %0d..%0d cycles after command end", fdt_min, fdt_max);
    $display("            reader command delay %0d..%0d cycles after answer end (%0d checked)",
             rdt_min, rdt_max, rdt_checked);
    check(n_uid >= 3, "selections");
    check(n_timeout >= 1, "reader timeout occurred");
    check(n_card_err >= 1, "card receive error occurred");
    check(n_mode_sw >= 1, "mode switch occurred");
    check(n_double >= 1, "double-length run occurred");
    check(n_gap2 >= 1 && n_gap3 >= 1 && n_gap4 >= 1, "all pause spacings occurred");
    check(fdt_checked >= 6, "frame delays checked");
    check(rdt_checked >= 4, "reader frame delays checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
