// pcd_in: PCD (reader) receiver, decodes the Manchester-coded PICC answer.
//
// Input is the "subcarrier present" level from the detector chain, sampled
// once per carrier tick and passed through an up/down-counting glitch filter
// of depth GLITCH_FC (this filter is this implementation's addition: the
// detector alone flickers at the edges of a modulated stretch and can report
// short false runs). In Manchester code a 1 is modulated in the first
// half of its bit and a 0 in the second half, so the onsets of modulation
// are spaced, in carrier periods:
//   1 -> 1 and 0 -> 0 : 128      1 -> 0 : 192
//   0 -> 1            : no new onset, the run simply lasts twice as long
// The receiver keeps a reference at the (possibly virtual) onset of the last
// decoded bit, rounds each new onset's distance from it to half bits (64)
// and emits bits accordingly; a run longer than DOUBLE_MIN_FC appends a 1 and
// moves the reference half a bit later. The first onset is the start bit 1.
// When no onset has come for END_FC periods the frame is closed: it must
// hold 1 + 9*n bits (n = 1..5), every byte's odd parity must hold, and then
// the start and parity bits are stripped and the bytes handed on. This is
// the decoding scheme of the design description; the rounding, the
// double-run limit and the end timeout are this implementation's values.
// With the frame the receiver reports its age, the carrier periods passed
// since the frame's last bit ended: the reference was END_FC periods ago,
// and the last bit ended 128 periods after it for a 1 (modulated from the
// bit's start) or 64 periods after it for a 0 (modulated from its middle).
// The detection delay is not included, so the age errs on the short side.
// Reporting the age is this implementation's addition; it lets the reader
// count its frame delay from the end of the card's answer.
//
// Interface: rx_en enables reception (the controller raises it only while an
// answer is expected). rx_valid pulses one cycle with rx_frame, or rx_error
// pulses for a frame with bad timing, length or parity. Latency from the end
// of the last modulated half bit to rx_valid is about END_FC carrier periods.
// rx_age, valid with rx_valid, is END_FC - 128 or END_FC - 64.
module pcd_in
  import rfid_pkg::*;
#(
  parameter int unsigned BIT_FC        = 128,
  parameter int unsigned DOUBLE_MIN_FC = 60,
  parameter int unsigned GLITCH_FC     = 16,
  parameter int unsigned END_FC        = 320
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        rx_en,
  input  logic        modulated,
  output logic        rx_valid,
  output picc_frame_t rx_frame,
  output logic [15:0] rx_age,
  output logic        rx_error
);
  localparam int unsigned MAXBITS = 1 + 9 * 5;
  localparam int unsigned HALF = BIT_FC / 2;
  localparam int unsigned TW = $clog2(END_FC + BIT_FC + 1) + 1;

  typedef enum logic [1:0] {S_IDLE, S_RX, S_QUIET} state_t;

  state_t             state;
  logic               m_prev;
  logic [TW-1:0]      since_ref;   // carrier periods since last bit's onset
  logic [TW-1:0]      run_len;     // length of the current modulated run
  logic               merged;      // current run already counted as double
  logic               last;        // last decoded bit
  logic [MAXBITS-1:0] bits;
  logic [5:0]         nbits;
  logic [TW-1:0]      quiet;

  // Glitch filter: an integrator counts up (to GLITCH_FC) while the
  // detector reports modulation and down (to 0) while it does not; the
  // filtered level turns on at the top and off at the bottom. Short dropouts
  // inside a run and short false runs are absorbed, and both edges are
  // delayed by about GLITCH_FC, so onset spacings are preserved.
  logic       mod_f;
  logic [4:0] integ;
  always_ff @(posedge clk) begin
    if (rst) begin
      mod_f <= 1'b0;
      integ <= '0;
    end else if (tick) begin
      if (modulated && integ != 5'(GLITCH_FC)) begin
        integ <= integ + 1'b1;
        if (integ == 5'(GLITCH_FC - 1)) mod_f <= 1'b1;
      end else if (!modulated && integ != 5'd0) begin
        integ <= integ - 1'b1;
        if (integ == 5'd1) mod_f <= 1'b0;
      end
    end
  end

  logic rise;
  assign rise = mod_f && !m_prev;

  // Distance to the new onset in half bits, rounded.
  logic [TW-1:0] halves;
  assign halves = (since_ref + TW'(HALF / 2)) / TW'(HALF);

  // Frame check and extraction at frame end.
  logic       len_ok;
  logic       par_ok;
  logic [2:0] nbytes_c;
  logic [39:0] data_c;
  always_comb begin
    len_ok   = 1'b0;
    nbytes_c = '0;
    for (int n = 1; n <= 5; n++)
      if (nbits == 6'(1 + 9 * n)) begin
        len_ok   = 1'b1;
        nbytes_c = 3'(n);
      end
    par_ok = 1'b1;
    data_c = '0;
    for (int b = 0; b < 5; b++) begin
      for (int j = 0; j < 8; j++) data_c[8*b+j] = bits[1 + 9*b + j];
      if (3'(b) < nbytes_c && (^bits[1 + 9*b +: 9]) != 1'b1) par_ok = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      m_prev    <= 1'b0;
      since_ref <= '0;
      run_len   <= '0;
      merged    <= 1'b0;
      last      <= 1'b0;
      bits      <= '0;
      nbits     <= '0;
      quiet     <= '0;
      rx_valid  <= 1'b0;
      rx_error  <= 1'b0;
      rx_frame  <= '0;
      rx_age    <= '0;
    end else begin
      rx_valid <= 1'b0;
      rx_error <= 1'b0;
      if (tick) begin
        m_prev <= mod_f;
        unique case (state)
          S_IDLE: begin
            if (rx_en && rise) begin
              state     <= S_RX;
              bits      <= MAXBITS'(1);      // start bit 1
              nbits     <= 6'd1;
              last      <= 1'b1;
              since_ref <= '0;
              run_len   <= TW'(1);
              merged    <= 1'b0;
            end
          end
          S_RX: begin
            since_ref <= since_ref + 1'b1;
            if (rise) begin
              since_ref <= '0;
              run_len   <= TW'(1);
              merged    <= 1'b0;
              if (nbits >= 6'(MAXBITS)) begin
                state <= S_QUIET;
              end else if (halves == TW'(2)) begin
                bits[nbits] <= last;          // same bit repeated
                nbits       <= nbits + 1'b1;
              end else if (last && halves == TW'(3)) begin
                bits[nbits] <= 1'b0;          // 1 -> 0
                nbits       <= nbits + 1'b1;
                last        <= 1'b0;
              end else begin
                state <= S_QUIET;
              end
            end else if (mod_f) begin
              run_len <= run_len + 1'b1;
              if (run_len == TW'(DOUBLE_MIN_FC) && !merged) begin
                // 0 -> 1: the run continues into the first half of a 1
                if (last || nbits >= 6'(MAXBITS)) begin
                  state <= S_QUIET;
                end else begin
                  bits[nbits] <= 1'b1;
                  nbits       <= nbits + 1'b1;
                  last        <= 1'b1;
                  merged      <= 1'b1;
                  since_ref   <= since_ref + 1'b1 - TW'(HALF);
                end
              end else if (run_len == TW'(DOUBLE_MIN_FC + BIT_FC / 2)) begin
                state <= S_QUIET;           // run far too long
              end
            end else if (since_ref >= TW'(END_FC)) begin
              state <= S_IDLE;
              if (len_ok && par_ok) begin
                rx_valid <= 1'b1;
                // since_ref is END_FC here; END_FC must exceed BIT_FC.
                rx_age   <= 16'(since_ref) - (last ? 16'(BIT_FC) : 16'(HALF));
                rx_frame <= '{nbytes: nbytes_c, data: data_c};
              end else begin
                rx_error <= 1'b1;
              end
            end
          end
          S_QUIET: begin
            // bad timing: wait for the channel to stay quiet, then report
            quiet <= mod_f ? '0 : quiet + 1'b1;
            if (!mod_f && quiet >= TW'(END_FC)) begin
              state    <= S_IDLE;
              quiet    <= '0;
              rx_error <= 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
