// pcd_out: PCD (reader) transmitter, modified Miller coding at fc/128.
//
// A frame is sent as: start bit 0, then either 7 data bits (short frame) or
// 1..9 bytes each followed by its odd parity bit (standard frame), then an
// end bit 0. Bytes go out byte 0 first, LSB first; the parity bit is formed
// in flight from the bits already sent, so no pre-processing of the frame is
// needed. Each bit lasts BIT_FC = 128 carrier periods and is coded by where
// the carrier is paused for PAUSE_FC = 32 periods:
//   1                      pause from 1/2 to 3/4 of the bit
//   0 after a 1            no pause
//   0 first or after a 0   pause during the first 1/4 of the bit
// The unit does not switch the carrier itself: its output pause says when the
// carrier must be off, and the front-end control gates the carrier with it.
// The coding rules, frame format and parity come from the design description;
// the bit order (ISO 14443) and the exact sequencing registers are this
// implementation's.
//
// Interface: pulse tx_valid for one cycle with tx_frame valid while busy is
// low. busy rises the next cycle and falls after the end bit. Timing is paced
// by tick (one per carrier period): the frame lasts (bits * BIT_FC) ticks.
module pcd_out
  import rfid_pkg::*;
#(
  parameter int unsigned BIT_FC   = 128,
  parameter int unsigned PAUSE_FC = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       tx_valid,
  input  pcd_frame_t tx_frame,
  output logic       pause,
  output logic       busy
);
  typedef enum logic [1:0] {SQ_START, SQ_DATA, SQ_END} seq_t;

  localparam int unsigned TW = $clog2(BIT_FC);

  seq_t        seq;
  logic [TW-1:0] tcnt;       // carrier periods into the current bit
  logic        cur_bit;      // bit being sent
  logic        prev_bit;     // bit sent before it (0 before the start bit)
  logic [71:0] shreg;        // data still to send, next bit in [0]
  logic [3:0]  bit_idx;      // 0..7 data bits, 8 = parity
  logic [3:0]  bytes_left;   // bytes after the current one
  logic        short_f;
  logic        par_acc;      // XOR of data bits of the current byte

  // Next bit to send and the state it leads to, decided at the end of a bit.
  logic        nxt_bit;
  seq_t        nxt_seq;
  logic        nxt_done;
  logic        shift_data;

  always_comb begin
    nxt_bit    = 1'b0;
    nxt_seq    = seq;
    nxt_done   = 1'b0;
    shift_data = 1'b0;
    unique case (seq)
      SQ_START: begin
        nxt_seq    = SQ_DATA;
        nxt_bit    = shreg[0];
        shift_data = 1'b1;
      end
      SQ_DATA: begin
        if (short_f) begin
          if (bit_idx == 4'd6) begin
            nxt_seq = SQ_END;
            nxt_bit = 1'b0;
          end else begin
            nxt_bit    = shreg[0];
            shift_data = 1'b1;
          end
        end else if (bit_idx == 4'd7) begin
          nxt_bit = ~(par_acc ^ cur_bit);           // odd parity
        end else if (bit_idx == 4'd8) begin
          if (bytes_left == 4'd0) begin
            nxt_seq = SQ_END;
            nxt_bit = 1'b0;
          end else begin
            nxt_bit    = shreg[0];
            shift_data = 1'b1;
          end
        end else begin
          nxt_bit    = shreg[0];
          shift_data = 1'b1;
        end
      end
      SQ_END: nxt_done = 1'b1;
      default: nxt_done = 1'b1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      seq        <= SQ_START;
      tcnt       <= '0;
      cur_bit    <= 1'b0;
      prev_bit   <= 1'b0;
      shreg      <= '0;
      bit_idx    <= '0;
      bytes_left <= '0;
      short_f    <= 1'b0;
      par_acc    <= 1'b0;
    end else if (!busy) begin
      if (tx_valid) begin
        busy       <= 1'b1;
        seq        <= SQ_START;
        tcnt       <= '0;
        cur_bit    <= 1'b0;
        prev_bit   <= 1'b0;
        shreg      <= tx_frame.data;
        bit_idx    <= '0;
        bytes_left <= (tx_frame.nbytes == 4'd0) ? 4'd0 : tx_frame.nbytes - 1'b1;
        short_f    <= tx_frame.short_frame;
        par_acc    <= 1'b0;
      end
    end else if (tick) begin
      if (tcnt == TW'(BIT_FC - 1)) begin
        tcnt <= '0;
        if (nxt_done) begin
          busy <= 1'b0;
        end else begin
          prev_bit <= cur_bit;
          cur_bit  <= nxt_bit;
          seq      <= nxt_seq;
          if (shift_data) shreg <= shreg >> 1;
          // bit counter within the byte; parity accumulator
          if (seq == SQ_START) begin
            bit_idx <= '0;
            par_acc <= 1'b0;
          end else if (seq == SQ_DATA) begin
            if (!short_f && bit_idx == 4'd8) begin
              bit_idx    <= '0;
              par_acc    <= 1'b0;
              bytes_left <= bytes_left - 1'b1;
            end else begin
              bit_idx <= bit_idx + 1'b1;
              par_acc <= par_acc ^ cur_bit;
            end
          end
        end
      end else begin
        tcnt <= tcnt + 1'b1;
      end
    end
  end

  always_comb begin
    pause = 1'b0;
    if (busy) begin
      if (cur_bit)
        pause = (tcnt >= TW'(BIT_FC / 2)) && (tcnt < TW'(BIT_FC / 2 + PAUSE_FC));
      else if (!prev_bit)
        pause = (tcnt < TW'(PAUSE_FC));
    end
  end
endmodule
