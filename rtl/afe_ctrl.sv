// afe_ctrl: drives the control pins of the analog front-end.
//
// The PCD and PICC sides share one front-end; mode (0 = card, 1 = reader)
// picks which side owns it, and the transmitter busy flags pick between the
// transmit and receive setting of that side:
//   PCD transmit  signal_in carries the carrier, switched off while pcd_out
//                 asks for a pause (on-off keying); the multiplexer passes
//                 the filtered carrier to the antenna.
//   PCD receive   signal_in carries the unbroken carrier; the multiplexer
//                 connects the carrier and the envelope detector.
//   PICC transmit load_mod carries the fc/16 subcarrier while picc_out asks
//                 for load modulation; the multiplexer connects the load.
//   PICC receive  the multiplexer connects the antenna to the envelope
//                 detector; signal_in and load_mod stay low.
// Load modulation has a pin of its own rather than sharing signal_in. The
// mode set follows the design description; the multiplexer codes (see
// rfid_pkg::mux_sel_t) and the 2-bit gain field are this implementation's.
//
// Timing: all outputs are registered, one main-clock cycle after the inputs.
module afe_ctrl
  import rfid_pkg::*;
#(
  parameter int unsigned GAIN_W = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              mode,
  input  logic              fc,
  input  logic              subc,
  input  logic              pcd_tx,
  input  logic              pcd_pause,
  input  logic              picc_tx,
  input  logic              picc_mod,
  input  logic [GAIN_W-1:0] gain_sel,
  output logic              signal_in,
  output logic              load_mod,
  output mux_sel_t          mux_sel,
  output logic [GAIN_W-1:0] gain
);
  always_ff @(posedge clk) begin
    if (rst) begin
      signal_in <= 1'b0;
      load_mod  <= 1'b0;
      mux_sel   <= MUX_PICC_RX;
      gain      <= '0;
    end else begin
      gain <= gain_sel;
      if (mode) begin
        signal_in <= fc && !(pcd_tx && pcd_pause);
        load_mod  <= 1'b0;
        mux_sel   <= pcd_tx ? MUX_PCD_TX : MUX_PCD_RX;
      end else begin
        signal_in <= 1'b0;
        load_mod  <= picc_tx && picc_mod && subc;
        mux_sel   <= picc_tx ? MUX_PICC_TX : MUX_PICC_RX;
      end
    end
  end
endmodule
