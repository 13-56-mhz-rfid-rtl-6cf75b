// envelope_thresholder: detects carrier pauses in the envelope samples seen
// by the PICC (card) side.
//
// A running average of the last AVG_LEN = 128 samples is kept as a shift
// register plus running sum. A new sample is classed 0 when it lies DELTA =
// 20 LSB or more below that average (carrier paused) and 1 otherwise; then it
// enters the window. The comparison is done on sums (sample*128 + 20*128 <=
// sum) so no division is needed. Window length, margin and output sense
// follow the design description; the history starts at zero after reset, so
// the first 128 samples see a low average and read as 1.
//
// Timing: th_out is valid with th_valid one cycle after sample_valid.
module envelope_thresholder #(
  parameter int unsigned ADC_W   = 10,
  parameter int unsigned AVG_LEN = 128,
  parameter int unsigned DELTA   = 20
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sample_valid,
  input  logic [ADC_W-1:0] sample,
  output logic             th_valid,
  output logic             th_out
);
  localparam int unsigned LW   = $clog2(AVG_LEN);
  localparam int unsigned SUMW = ADC_W + LW + 1;

  logic [ADC_W-1:0] hist [AVG_LEN];
  logic [SUMW-1:0]  sum;
  logic [SUMW-1:0]  scaled;

  assign scaled = (SUMW'(sample) << LW) + SUMW'(DELTA * AVG_LEN);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < AVG_LEN; i++) hist[i] <= '0;
      sum      <= '0;
      th_valid <= 1'b0;
      th_out   <= 1'b1;
    end else begin
      th_valid <= sample_valid;
      if (sample_valid) begin
        th_out  <= !(scaled <= sum);
        hist[0] <= sample;
        for (int i = 1; i < AVG_LEN; i++) hist[i] <= hist[i-1];
        sum <= sum + SUMW'(sample) - SUMW'(hist[AVG_LEN-1]);
      end
    end
  end
endmodule
