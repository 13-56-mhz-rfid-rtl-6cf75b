// picc_ctrl: control unit of the card (PICC) emulation.
//
// Implements the card side of the ISO 14443-3 type A start-up handshake for
// a 4-byte UID (cascade level 1 only). The card state follows the standard:
//   IDLE   --REQA or WUPA-------------------------> READY  (answer ATQA)
//   HALT   --WUPA---------------------------------> READY  (answer ATQA)
//   READY  --SEL 93 NVB 20 (anticollision)--------> READY  (answer UID0..3, BCC)
//   READY  --SEL 93 NVB 70, own UID, BCC, CRC ok--> ACTIVE (answer SAK, CRC)
//   ACTIVE --HLTA 50 00 with good CRC-------------> HALT   (no answer)
//   READY or ACTIVE, any other frame or an error -> IDLE
// The BCC is the XOR of the four UID bytes; the SELECT CRC is checked by
// running the CRC_A LFSR over all nine bytes and testing for zero, and the
// CRC of the SAK is generated by the same LFSR. Each answer is started
// FDT_FC carrier periods after the end of the request: the frame delay
// counter starts at the age the receiver reports with the frame (the time
// already passed since the request's last bit). The
// handshake sequence, BCC, CRC use and 4-byte limit are those of the design
// description; ATQA (0x0004) and SAK (0x08) values, the UID byte order (most
// significant byte sent first) and the error handling are this
// implementation's choices, after ISO 14443-3.
//
// Interface: rx_valid/rx_frame/rx_age from picc_in, tx_valid/tx_frame to picc_out
// (tx_busy back from it). rx_en is high while the card listens. selected is
// high in the ACTIVE state. enable low holds the unit in IDLE.
module picc_ctrl
  import rfid_pkg::*;
#(
  parameter int unsigned FDT_FC = 1172,
  parameter logic [15:0] ATQA   = 16'h0004,
  parameter logic [7:0]  SAK    = 8'h08
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        enable,
  input  logic [31:0] uid,
  input  logic        rx_valid,
  input  pcd_frame_t  rx_frame,
  input  logic        rx_error,
  input  logic [15:0] rx_age,
  output logic        tx_valid,
  output picc_frame_t tx_frame,
  input  logic        tx_busy,
  output logic        rx_en,
  output logic        selected
);
  typedef enum logic [1:0] {C_IDLE, C_READY, C_ACTIVE, C_HALT} card_t;
  typedef enum logic [2:0] {P_LISTEN, P_CRC_CHK, P_CRC_GEN, P_WAIT_FDT, P_SEND, P_TXING} phase_t;

  card_t       card, card_next_ok;
  phase_t      phase;
  logic [15:0] fdt_cnt;
  logic        sent;

  // UID bytes in transmission order and their BCC.
  logic [39:0] uid_bcc;
  assign uid_bcc = {bcc4(uid), uid[7:0], uid[15:8], uid[23:16], uid[31:24]};

  // Request decoding.
  logic is_reqa, is_wupa, is_anticol, is_select, is_hlta;
  always_comb begin
    is_reqa    = rx_frame.short_frame && rx_frame.data[6:0] == CMD_REQA[6:0];
    is_wupa    = rx_frame.short_frame && rx_frame.data[6:0] == CMD_WUPA[6:0];
    is_anticol = !rx_frame.short_frame && rx_frame.nbytes == 4'd2 &&
                 rx_frame.data[7:0] == CMD_SEL_CL1 && rx_frame.data[15:8] == NVB_ANTICOL;
    is_select  = !rx_frame.short_frame && rx_frame.nbytes == 4'd9 &&
                 rx_frame.data[7:0] == CMD_SEL_CL1 && rx_frame.data[15:8] == NVB_SELECT &&
                 rx_frame.data[55:16] == uid_bcc;
    is_hlta    = !rx_frame.short_frame && rx_frame.nbytes == 4'd4 &&
                 rx_frame.data[7:0] == CMD_HLTA && rx_frame.data[15:8] == 8'h00;
  end

  // CRC engine, shared between checking a request and protecting the SAK.
  logic        crc_start;
  logic [71:0] crc_data;
  logic [3:0]  crc_n;
  logic        crc_busy, crc_done;
  logic [15:0] crc;

  crc_a #(.MAX_BYTES(9)) u_crc (
    .clk, .rst, .start(crc_start), .data(crc_data), .nbytes(crc_n),
    .busy(crc_busy), .done(crc_done), .crc
  );

  always_comb begin
    crc_start = 1'b0;
    crc_data  = rx_frame.data;
    crc_n     = rx_frame.nbytes;
    if (phase == P_LISTEN && enable && rx_valid && ((card == C_READY && is_select) ||
                                                   (card == C_ACTIVE && is_hlta))) begin
      crc_start = 1'b1;
      crc_data  = rx_frame.data;
      crc_n     = rx_frame.nbytes;
    end else if (phase == P_CRC_CHK && crc_done && crc == 16'h0000 && card_next_ok == C_ACTIVE) begin
      crc_start = 1'b1;
      crc_data  = 72'(SAK);
      crc_n     = 4'd1;
    end
  end

  // The CRC engine is only started when idle.
  a_crc_idle: assert property (@(posedge clk) disable iff (rst) crc_start |-> !crc_busy);

  assign rx_en    = enable && phase == P_LISTEN;
  assign selected = card == C_ACTIVE;

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      card         <= C_IDLE;
      card_next_ok <= C_IDLE;
      phase        <= P_LISTEN;
      fdt_cnt      <= '0;
      tx_valid     <= 1'b0;
      tx_frame     <= '0;
      sent         <= 1'b0;
    end else begin
      tx_valid <= 1'b0;
      if (tick && fdt_cnt != 16'hFFFF) fdt_cnt <= fdt_cnt + 1'b1;
      unique case (phase)
        P_LISTEN: begin
          if (rx_error) begin
            if (card == C_READY || card == C_ACTIVE) card <= C_IDLE;
          end else if (rx_valid) begin
            fdt_cnt <= rx_age;
            unique case (card)
              C_IDLE, C_HALT: begin
                if (is_wupa || (is_reqa && card == C_IDLE)) begin
                  card     <= C_READY;
                  tx_frame <= '{nbytes: 3'd2, data: 40'(ATQA)};
                  phase    <= P_WAIT_FDT;
                end
              end
              C_READY: begin
                if (is_anticol) begin
                  tx_frame <= '{nbytes: 3'd5, data: uid_bcc};
                  phase    <= P_WAIT_FDT;
                end else if (is_select) begin
                  card_next_ok <= C_ACTIVE;
                  phase        <= P_CRC_CHK;
                end else begin
                  card <= C_IDLE;
                end
              end
              C_ACTIVE: begin
                if (is_hlta) begin
                  card_next_ok <= C_HALT;
                  phase        <= P_CRC_CHK;
                end
              end
              default: card <= C_IDLE;
            endcase
          end
        end
        P_CRC_CHK: begin
          if (crc_done) begin
            if (crc != 16'h0000) begin
              card  <= C_IDLE;
              phase <= P_LISTEN;
            end else if (card_next_ok == C_HALT) begin
              card  <= C_HALT;
              phase <= P_LISTEN;
            end else begin
              phase <= P_CRC_GEN;
            end
          end
        end
        P_CRC_GEN: begin
          if (crc_done) begin
            card     <= C_ACTIVE;
            tx_frame <= '{nbytes: 3'd3, data: {16'h0000, crc, SAK}};
            phase    <= P_WAIT_FDT;
          end
        end
        P_WAIT_FDT: begin
          if (fdt_cnt > 16'(FDT_FC)) phase <= P_SEND;
        end
        P_SEND: begin
          tx_valid <= 1'b1;
          sent     <= 1'b0;
          phase    <= P_TXING;
        end
        P_TXING: begin
          if (tx_busy) sent <= 1'b1;
          if (sent && !tx_busy) phase <= P_LISTEN;
        end
        default: phase <= P_LISTEN;
      endcase
    end
  end
endmodule
