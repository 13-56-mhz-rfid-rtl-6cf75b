// adc_decoder: turns the raw ADC stream into the two "modulation present"
// flags used by the receivers.
//
// The 10-bit ADC runs on the 13.56 MHz carrier clock produced by the FPGA, so
// one new sample is registered per carrier period, on the strobe tick (the
// top level uses the carrier's falling edge, when the ADC output is stable). Every sample goes to two
// detector chains:
//   PCD side:  subcarrier_correlator, hit when |correlation| >= CORR_MIN (10),
//              then a 20-of-32 majority filter  -> pcd_mod (subcarrier seen)
//   PICC side: envelope_thresholder (128-sample average, 20 LSB margin),
//              hit when the sample is below threshold, then a 20-of-32
//              majority filter                   -> picc_mod (carrier paused)
// The detector algorithms and thresholds follow the design description. How
// the work is split between this unit and the receivers (here: detection in
// this unit, bit parsing in pcd_in/picc_in) is this implementation's reading.
// The ADC's 3-sample pipeline delay is not compensated: it shifts every event
// by the same amount and the receivers only use spacings between events.
//
// Timing: flags are updated a few main-clock cycles after each tick, well
// before the next tick ten cycles later.
module adc_decoder #(
  parameter int unsigned ADC_W    = 10,
  parameter int unsigned CORR_MIN = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic [ADC_W-1:0] adc_data,
  output logic             pcd_mod,
  output logic             picc_mod
);
  logic [ADC_W-1:0] sample;
  logic             sample_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= tick;
      if (tick) sample <= adc_data;
    end
  end

  // PCD side: subcarrier correlation.
  logic       corr_valid;
  logic [5:0] corr;

  subcarrier_correlator #(.ADC_W(ADC_W), .WIN(32), .SUBC_PERIOD(16)) u_corr (
    .clk, .rst, .sample_valid, .sample, .corr_valid, .corr
  );

  mod_detector #(.WIN(32), .MIN_HITS(20)) u_pcd_det (
    .clk, .rst, .in_valid(corr_valid), .hit(corr >= 6'(CORR_MIN)), .modulated(pcd_mod)
  );

  // PICC side: carrier pause threshold.
  logic th_valid;
  logic th_out;

  envelope_thresholder #(.ADC_W(ADC_W), .AVG_LEN(128), .DELTA(20)) u_thr (
    .clk, .rst, .sample_valid, .sample, .th_valid, .th_out
  );

  mod_detector #(.WIN(32), .MIN_HITS(20)) u_picc_det (
    .clk, .rst, .in_valid(th_valid), .hit(!th_out), .modulated(picc_mod)
  );
endmodule
