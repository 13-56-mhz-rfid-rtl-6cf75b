// subcarrier_correlator: detects the fc/16 load-modulation subcarrier in the
// envelope samples seen by the PCD (reader) side.
//
// The last WIN = 32 samples are kept in a shift register with their running
// sum. Each sample is cast to +1 if it is at or above the window mean and -1
// if below (compared as sample*WIN >= sum, so no division is needed). The
// resulting +/-1 vector is multiplied with a square wave of period
// SUBC_PERIOD = 16 samples (8 of +1, 8 of -1) and the absolute value of the
// dot product is the output: 0 for an input unrelated to the subcarrier, up
// to 32 for a subcarrier in phase or in antiphase. With a clean subcarrier
// the output follows a triangle as the window slides, and is at least 10 for
// 20 of every 32 samples; the majority filter that follows relies on this.
// The algorithm and its sizes follow the design description; treating a
// sample equal to the mean as +1 is this implementation's choice.
//
// Timing: a sample is taken when sample_valid is high; corr is valid with
// corr_valid two cycles later (window update, then dot product), which fits
// inside one carrier period of ten main-clock cycles.
module subcarrier_correlator #(
  parameter int unsigned ADC_W       = 10,
  parameter int unsigned WIN         = 32,
  parameter int unsigned SUBC_PERIOD = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      sample_valid,
  input  logic [ADC_W-1:0]          sample,
  output logic                      corr_valid,
  output logic [$clog2(WIN+1)-1:0]  corr
);
  localparam int unsigned LW = $clog2(WIN);
  localparam int unsigned SUMW = ADC_W + LW;
  localparam int unsigned CW = $clog2(WIN + 1);

  logic [ADC_W-1:0] win [WIN];
  logic [SUMW-1:0]  sum;
  logic             win_upd;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < WIN; i++) win[i] <= '0;
      sum     <= '0;
      win_upd <= 1'b0;
    end else begin
      win_upd <= sample_valid;
      if (sample_valid) begin
        win[0] <= sample;
        for (int i = 1; i < WIN; i++) win[i] <= win[i-1];
        sum <= sum + SUMW'(sample) - SUMW'(win[WIN-1]);
      end
    end
  end

  // Signed dot product with the reference square wave.
  logic signed [CW:0] dot;
  always_comb begin
    dot = '0;
    for (int i = 0; i < WIN; i++) begin
      logic pos;
      logic ref_pos;
      pos     = ({win[i], LW'(0)} >= sum);
      ref_pos = ((i / (SUBC_PERIOD / 2)) % 2) == 0;
      if (pos == ref_pos) dot = dot + (CW+1)'(1);
      else                dot = dot - (CW+1)'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      corr_valid <= 1'b0;
      corr       <= '0;
    end else begin
      corr_valid <= win_upd;
      if (win_upd) corr <= dot[CW] ? CW'(-dot) : CW'(dot);
    end
  end
endmodule
