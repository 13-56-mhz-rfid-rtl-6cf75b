// picc_in: PICC (card) receiver, decodes the modified-Miller-coded PCD
// command.
//
// Input is the "carrier paused" level from the detector chain, sampled once
// per carrier tick. A 1 pauses the carrier in the middle of its bit, a 0
// after a 0 (or the start bit) pauses at its beginning and a 0 after a 1 has
// no pause. The onsets of pauses are therefore spaced, in carrier periods:
//   1 -> 1, 0 -> 0          : 128
//   1 -> 0 -> 0, 0 -> 1     : 192
//   1 -> 0 -> 1             : 256
// Each onset's distance from the previous one is rounded to half bits (64)
// and mapped to one or two bits; the first pause is the start bit 0. When no
// pause has come for END_FC periods the frame is closed; if the last decoded
// bit is a 1 the end bit 0 (which then has no pause) is appended. A 9-bit
// frame is a short frame (7 data bits); a frame of 2 + 9*n bits (n = 1..9)
// is a standard frame whose odd parity bits must hold. Start, parity and end
// bits are stripped before the data is handed on. The decoding scheme is the
// design description's; the rounding and end timeout are this
// implementation's values, and the inferred end bit follows ISO 14443-2.
// With the frame the receiver reports its age: how many carrier periods
// have passed since the end of the frame's last bit. The last (filtered)
// pause onset was END_FC periods ago; the frame ended 128 periods after it
// if the last pause belonged to the end bit, or 192 periods after it if the
// last pause was a 1 followed by the silent end bit. The detection delay
// of the pause (about 30 periods) is not known here, so the age errs on the
// short side and an answer timed from it is never early. Reporting the age
// is this implementation's own addition, so that the card's frame delay can
// be counted from the end of the command, as the standard counts it.
//
// Interface: rx_en enables reception. rx_valid pulses one cycle with
// rx_frame (data, byte count, short flag); rx_error pulses for a frame with
// bad timing, length or parity. rx_valid comes about END_FC carrier periods
// after the last pause; rx_age (valid with rx_valid) is END_FC - 128 or
// END_FC - 192 carrier periods, the time since the end of the frame.
module picc_in
  import rfid_pkg::*;
#(
  parameter int unsigned BIT_FC = 128,
  parameter int unsigned GLITCH_FC = 8,
  parameter int unsigned END_FC = 320
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       rx_en,
  input  logic       modulated,
  output logic       rx_valid,
  output pcd_frame_t rx_frame,
  output logic       rx_error,
  output logic [15:0] rx_age
);
  localparam int unsigned MAXBITS = 2 + 9 * 9;
  localparam int unsigned HALF = BIT_FC / 2;
  localparam int unsigned TW = $clog2(END_FC + 2 * BIT_FC + 1) + 1;

  typedef enum logic [1:0] {S_IDLE, S_RX, S_QUIET} state_t;

  state_t               state;
  logic                 m_prev;
  logic [TW-1:0]        since_ref;
  logic                 last;
  logic [MAXBITS+1:0]   bits;     // two spare bits for a double emit
  logic [6:0]           nbits;
  logic [TW-1:0]        quiet;

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

  logic [TW-1:0] halves;
  assign halves = (since_ref + TW'(HALF / 2)) / TW'(HALF);

  // Frame with the implied end bit, checked at frame end.
  logic [6:0]  nb_f;
  logic        short_ok;
  logic        std_ok;
  logic        par_ok;
  logic [3:0]  nbytes_c;
  logic [71:0] data_c;
  logic [15:0] age_c;
  always_comb begin
    // since_ref is END_FC here; END_FC must exceed 3*HALF.
    age_c = 16'(since_ref) - (last ? 16'(3 * HALF) : 16'(2 * HALF));
    nb_f     = last ? nbits + 1'b1 : nbits;   // end bit after a 1 is silent
    short_ok = (nb_f == 7'd9) && !bits[0];
    std_ok   = 1'b0;
    nbytes_c = '0;
    for (int n = 1; n <= 9; n++)
      if (nb_f == 7'(2 + 9 * n)) begin
        std_ok   = !bits[0];
        nbytes_c = 4'(n);
      end
    par_ok = 1'b1;
    data_c = '0;
    if (short_ok) begin
      for (int j = 0; j < 7; j++) data_c[j] = bits[1 + j];
    end else begin
      for (int b = 0; b < 9; b++) begin
        for (int j = 0; j < 8; j++) data_c[8*b+j] = bits[1 + 9*b + j];
        if (4'(b) < nbytes_c && (^bits[1 + 9*b +: 9]) != 1'b1) par_ok = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      m_prev    <= 1'b0;
      since_ref <= '0;
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
              bits      <= '0;                 // start bit 0
              nbits     <= 7'd1;
              last      <= 1'b0;
              since_ref <= '0;
            end
          end
          S_RX: begin
            since_ref <= since_ref + 1'b1;
            if (rise) begin
              since_ref <= '0;
              if (nbits >= 7'(MAXBITS)) begin
                state <= S_QUIET;
              end else if (halves == TW'(2)) begin
                bits[nbits] <= last;           // 1 -> 1 or 0 -> 0
                nbits       <= nbits + 1'b1;
              end else if (halves == TW'(3)) begin
                if (last) begin                // 1 -> 0 -> 0
                  bits[nbits]     <= 1'b0;
                  bits[nbits + 1] <= 1'b0;
                  nbits           <= nbits + 7'd2;
                  last            <= 1'b0;
                end else begin                 // 0 -> 1
                  bits[nbits] <= 1'b1;
                  nbits       <= nbits + 1'b1;
                  last        <= 1'b1;
                end
              end else if (last && halves == TW'(4)) begin  // 1 -> 0 -> 1
                bits[nbits]     <= 1'b0;
                bits[nbits + 1] <= 1'b1;
                nbits           <= nbits + 7'd2;
              end else begin
                state <= S_QUIET;
              end
            end else if (!mod_f && since_ref >= TW'(END_FC)) begin
              state <= S_IDLE;
              if (short_ok || (std_ok && par_ok)) begin
                rx_valid <= 1'b1;
                rx_age   <= age_c;
                rx_frame <= '{short_frame: short_ok, nbytes: short_ok ? 4'd0 : nbytes_c,
                              data: data_c};
              end else begin
                rx_error <= 1'b1;
              end
            end
          end
          S_QUIET: begin
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
