// clock_gen: carrier and subcarrier timing from the 135.6 MHz main clock.
//
// The main clock is ten times the 13.56 MHz carrier. The carrier square wave
// fc flips every CLK_PER_FC/2 = 5 cycles; fc_rise and fc_fall are one-cycle
// strobes marking its edges. fc_rise is the "tick" that paces every timed
// unit of the design (one per carrier period) and also clocks the ADC. The
// PICC load-modulation subcarrier subc (fc/16, 847.5 kHz) flips on every
// eighth carrier rising edge. This follows the clocking scheme of the design
// description; the edge strobes being registered one-cycle pulses is this
// implementation's choice.
//
// Timing: fc_rise is high during the first main-clock cycle in which fc is
// high, fc_fall during the first cycle in which it is low.
module clock_gen #(
  parameter int unsigned CLK_PER_FC   = 10,  // must be even
  parameter int unsigned SUBC_HALF_FC = 8
) (
  input  logic clk,
  input  logic rst,
  output logic fc,
  output logic fc_rise,
  output logic fc_fall,
  output logic subc
);
  localparam int unsigned HALF = CLK_PER_FC / 2;
  localparam int unsigned CW = $clog2(CLK_PER_FC);
  localparam int unsigned SW = $clog2(SUBC_HALF_FC);

  logic [CW-1:0] phase;
  logic [SW-1:0] subc_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase    <= '0;
      fc       <= 1'b0;
      fc_rise  <= 1'b0;
      fc_fall  <= 1'b0;
      subc     <= 1'b0;
      subc_cnt <= '0;
    end else begin
      phase   <= (phase == CW'(CLK_PER_FC - 1)) ? '0 : phase + 1'b1;
      fc_rise <= (phase == CW'(CLK_PER_FC - 1));
      fc_fall <= (phase == CW'(HALF - 1));
      if (phase == CW'(CLK_PER_FC - 1)) fc <= 1'b1;
      else if (phase == CW'(HALF - 1))  fc <= 1'b0;
      if (phase == CW'(CLK_PER_FC - 1)) begin
        if (subc_cnt == SW'(SUBC_HALF_FC - 1)) begin
          subc_cnt <= '0;
          subc     <= ~subc;
        end else begin
          subc_cnt <= subc_cnt + 1'b1;
        end
      end
    end
  end
endmodule
