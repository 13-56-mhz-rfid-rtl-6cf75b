// rfid_emulator: 13.56 MHz ISO 14443-A RFID emulator, reader and card in one.
//
// Two emulation sides share one analog front-end:
//   PCD (reader): pcd_ctrl -> pcd_out (modified Miller, carrier pauses) and
//                 adc_decoder (subcarrier correlator) -> pcd_in (Manchester)
//                 -> pcd_ctrl. It polls with REQA and reports the UID of the
//                 card it selects on pcd_uid / pcd_uid_valid.
//   PICC (card):  adc_decoder (pause thresholder) -> picc_in (modified
//                 Miller) -> picc_ctrl -> picc_out (Manchester, subcarrier
//                 load modulation). It answers with the UID that card_bank
//                 picks with card_sel.
// mode selects the side (0 = card, 1 = reader); the other side is held in
// reset-like idle. clock_gen derives the 13.56 MHz carrier (also the ADC
// sample clock), the per-carrier tick that paces all protocol timing, and the
// 847.5 kHz subcarrier from the 135.6 MHz main clock. afe_ctrl turns the
// transmitter outputs into the front-end pins. The analog parts (filters,
// envelope detector, variable-gain amplifier, ADC, load switch, antenna
// multiplexer) are outside: their digital pins are this module's ports.
// The block structure, data-path widths (72-bit PCD commands, 40-bit PICC
// answers, single-cycle valid strobes) and timing constants follow the design
// description; the port-level details are this implementation's. Both
// controllers count their FDT_FC frame delay from the end of the received
// frame, which their receiver reports as an age with the frame; the delay
// of the detector chain (about 34 carrier periods on the card side) comes
// on top.
//
// Clock and reset: clk is the 135.6 MHz main clock, rst is synchronous and
// active high. adc_data is sampled once per carrier period, at the falling
// edge of adc_clk, half a period after the ADC updates its output.
module rfid_emulator
  import rfid_pkg::*;
#(
  parameter int unsigned CLK_PER_FC = 10,
  parameter int unsigned FDT_FC     = 1172,
  parameter int unsigned REQ_GAP_FC = 7000,
  parameter int unsigned N_CARDS    = 2,
  parameter logic [N_CARDS-1:0][31:0] UIDS = {32'h00BC614E, 32'h12345678}
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        mode,
  input  logic [(N_CARDS > 1 ? $clog2(N_CARDS) : 1)-1:0] card_sel,
  input  logic [1:0]  gain_sel,
  input  logic [9:0]  adc_data,
  output logic        adc_clk,
  output logic        signal_in,
  output logic        load_mod,
  output mux_sel_t    mux_sel,
  output logic [1:0]  gain,
  output logic [31:0] pcd_uid,
  output logic        pcd_uid_valid,
  output logic        picc_selected
);
  // Timing.
  logic fc, tick, fc_fall, subc;

  clock_gen #(.CLK_PER_FC(CLK_PER_FC), .SUBC_HALF_FC(8)) u_clk (
    .clk, .rst, .fc, .fc_rise(tick), .fc_fall, .subc
  );
  assign adc_clk = fc;

  // Mode changes restart both sides.
  logic mode_q, side_rst;
  always_ff @(posedge clk) mode_q <= rst ? 1'b0 : mode;
  assign side_rst = rst || (mode != mode_q);

  // Shared ADC decoding.
  logic pcd_mod_det, picc_mod_det;

  adc_decoder #(.ADC_W(10), .CORR_MIN(10)) u_adc (
    .clk, .rst(side_rst), .tick(fc_fall), .adc_data, .pcd_mod(pcd_mod_det), .picc_mod(picc_mod_det)
  );

  // PCD side.
  logic        pcd_tx_valid, pcd_tx_busy, pcd_pause, pcd_rx_en;
  pcd_frame_t  pcd_tx_frame;
  logic        pcd_rx_valid, pcd_rx_error;
  logic [15:0] pcd_rx_age;
  picc_frame_t pcd_rx_frame;

  pcd_ctrl #(.FDT_FC(FDT_FC), .REQ_GAP_FC(REQ_GAP_FC), .RESP_TIMEOUT_FC(9000)) u_pcd_ctrl (
    .clk, .rst(side_rst), .tick, .enable(mode),
    .rx_valid(pcd_rx_valid), .rx_frame(pcd_rx_frame), .rx_error(pcd_rx_error),
    .rx_age(pcd_rx_age), .tx_valid(pcd_tx_valid), .tx_frame(pcd_tx_frame), .tx_busy(pcd_tx_busy),
    .rx_en(pcd_rx_en), .uid(pcd_uid), .uid_valid(pcd_uid_valid)
  );

  pcd_out #(.BIT_FC(128), .PAUSE_FC(32)) u_pcd_out (
    .clk, .rst(side_rst), .tick, .tx_valid(pcd_tx_valid), .tx_frame(pcd_tx_frame),
    .pause(pcd_pause), .busy(pcd_tx_busy)
  );

  pcd_in #(.BIT_FC(128), .DOUBLE_MIN_FC(60), .END_FC(320)) u_pcd_in (
    .clk, .rst(side_rst), .tick, .rx_en(pcd_rx_en), .modulated(pcd_mod_det),
    .rx_valid(pcd_rx_valid), .rx_frame(pcd_rx_frame), .rx_error(pcd_rx_error),
    .rx_age(pcd_rx_age)
  );

  // PICC side.
  logic        picc_tx_valid, picc_tx_busy, picc_mod_en, picc_rx_en;
  picc_frame_t picc_tx_frame;
  logic        picc_rx_valid, picc_rx_error;
  logic [15:0] picc_rx_age;
  pcd_frame_t  picc_rx_frame;
  logic [31:0] card_uid;

  card_bank #(.N_CARDS(N_CARDS), .UIDS(UIDS)) u_cards (
    .clk, .rst, .hold(picc_selected || !picc_rx_en), .card_sel, .uid(card_uid)
  );

  picc_in #(.BIT_FC(128), .END_FC(320)) u_picc_in (
    .clk, .rst(side_rst), .tick, .rx_en(picc_rx_en), .modulated(picc_mod_det),
    .rx_valid(picc_rx_valid), .rx_frame(picc_rx_frame), .rx_error(picc_rx_error),
    .rx_age(picc_rx_age)
  );

  picc_ctrl #(.FDT_FC(FDT_FC), .ATQA(16'h0004), .SAK(8'h08)) u_picc_ctrl (
    .clk, .rst(side_rst), .tick, .enable(!mode), .uid(card_uid),
    .rx_valid(picc_rx_valid), .rx_frame(picc_rx_frame), .rx_error(picc_rx_error),
    .rx_age(picc_rx_age), .tx_valid(picc_tx_valid), .tx_frame(picc_tx_frame), .tx_busy(picc_tx_busy),
    .rx_en(picc_rx_en), .selected(picc_selected)
  );

  picc_out #(.BIT_FC(128)) u_picc_out (
    .clk, .rst(side_rst), .tick, .tx_valid(picc_tx_valid), .tx_frame(picc_tx_frame),
    .mod_en(picc_mod_en), .busy(picc_tx_busy)
  );

  // Front-end pins.
  afe_ctrl #(.GAIN_W(2)) u_afe (
    .clk, .rst, .mode, .fc, .subc,
    .pcd_tx(pcd_tx_busy), .pcd_pause, .picc_tx(picc_tx_busy), .picc_mod(picc_mod_en),
    .gain_sel, .signal_in, .load_mod, .mux_sel, .gain
  );
endmodule
