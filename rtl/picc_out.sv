// picc_out: PICC (card) transmitter, Manchester coding at fc/128.
//
// A frame is sent as a start bit 1 followed by 1..5 bytes, each followed by
// its odd parity bit formed in flight; there is no end bit, transmission just
// stops after the last parity bit. Bytes go out byte 0 first, LSB first. Each
// bit lasts BIT_FC = 128 carrier periods: a 1 is load-modulated in its first
// half, a 0 in its second half. The output mod_en says when the load must be
// modulated; the front-end control multiplies it with the fc/16 subcarrier
// (8 periods low impedance, 8 high). Coding, framing and parity follow the
// design description; the bit order is ISO 14443's.
//
// Interface: pulse tx_valid for one cycle with tx_frame valid while busy is
// low; busy rises next cycle and falls after the last parity bit. Paced by
// tick, one per carrier period.
module picc_out
  import rfid_pkg::*;
#(
  parameter int unsigned BIT_FC = 128
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        tx_valid,
  input  picc_frame_t tx_frame,
  output logic        mod_en,
  output logic        busy
);
  localparam int unsigned TW = $clog2(BIT_FC);

  logic [TW-1:0] tcnt;
  logic          cur_bit;
  logic          in_start;    // sending the start bit
  logic [39:0]   shreg;
  logic [3:0]    bit_idx;     // 0..7 data, 8 parity
  logic [2:0]    bytes_left;
  logic          par_acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      tcnt       <= '0;
      cur_bit    <= 1'b0;
      in_start   <= 1'b0;
      shreg      <= '0;
      bit_idx    <= '0;
      bytes_left <= '0;
      par_acc    <= 1'b0;
    end else if (!busy) begin
      if (tx_valid) begin
        busy       <= 1'b1;
        tcnt       <= '0;
        cur_bit    <= 1'b1;
        in_start   <= 1'b1;
        shreg      <= tx_frame.data;
        bit_idx    <= '0;
        bytes_left <= (tx_frame.nbytes == 3'd0) ? 3'd0 : tx_frame.nbytes - 1'b1;
        par_acc    <= 1'b0;
      end
    end else if (tick) begin
      if (tcnt == TW'(BIT_FC - 1)) begin
        tcnt <= '0;
        if (in_start) begin
          in_start <= 1'b0;
          cur_bit  <= shreg[0];
          shreg    <= shreg >> 1;
          bit_idx  <= '0;
          par_acc  <= 1'b0;
        end else if (bit_idx == 4'd7) begin
          cur_bit <= ~(par_acc ^ cur_bit);
          bit_idx <= 4'd8;
        end else if (bit_idx == 4'd8) begin
          if (bytes_left == 3'd0) begin
            busy <= 1'b0;
          end else begin
            bytes_left <= bytes_left - 1'b1;
            cur_bit    <= shreg[0];
            shreg      <= shreg >> 1;
            bit_idx    <= '0;
            par_acc    <= 1'b0;
          end
        end else begin
          par_acc <= par_acc ^ cur_bit;
          cur_bit <= shreg[0];
          shreg   <= shreg >> 1;
          bit_idx <= bit_idx + 1'b1;
        end
      end else begin
        tcnt <= tcnt + 1'b1;
      end
    end
  end

  assign mod_en = busy && (cur_bit ? (tcnt < TW'(BIT_FC / 2)) : (tcnt >= TW'(BIT_FC / 2)));
endmodule
