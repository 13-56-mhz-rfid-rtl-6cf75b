// pcd_ctrl: control unit of the reader (PCD) emulation.
//
// Runs the reader side of the ISO 14443-3 type A start-up handshake for a
// card with a 4-byte UID, over and over:
//   GAP      wait REQ_GAP_FC carrier periods since the last request
//   REQA     send the 7-bit short frame 0x26, expect a 2-byte ATQA
//   ANTICOL  send 93 20, expect UID0..UID3 + BCC; the BCC (XOR of the UID
//            bytes) must match
//   SELECT   send 93 70 UID0..3 BCC CRC (CRC_A over the first 7 bytes),
//            expect SAK + 2 CRC bytes; the CRC must check
//   DONE     pulse uid_valid with the UID, then start again at GAP
// Each command after the first is sent FDT_FC carrier periods after the
// end of the previous answer: the wait starts at the age the receiver
// reports with the answer. No answer within RESP_TIMEOUT_FC
// (counted from the start of a REQA, from the end of other commands),
// a receive error, or a wrong length, BCC or CRC sends the unit back to GAP.
// The sequence, the BCC and CRC checks, the 1172-period frame delay and the
// 7000-period gap between requests follow the design description; the
// command codes are ISO 14443-3's, and the timeout and error handling are
// this implementation's.
//
// Interface: tx_valid/tx_frame to pcd_out (tx_busy back), rx_valid/rx_frame/
// rx_age/rx_error from pcd_in. rx_en is high while an answer is expected. uid holds
// the last UID read (UID0 in bits 31:24); uid_valid pulses when a card has
// been selected. enable low holds the unit at the start of GAP.
module pcd_ctrl
  import rfid_pkg::*;
#(
  parameter int unsigned FDT_FC          = 1172,
  parameter int unsigned REQ_GAP_FC      = 7000,
  parameter int unsigned RESP_TIMEOUT_FC = 9000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        enable,
  input  logic        rx_valid,
  input  picc_frame_t rx_frame,
  input  logic        rx_error,
  input  logic [15:0] rx_age,
  output logic        tx_valid,
  output pcd_frame_t  tx_frame,
  input  logic        tx_busy,
  output logic        rx_en,
  output logic [31:0] uid,
  output logic        uid_valid
);
  typedef enum logic [2:0] {S_GAP, S_SEND, S_TXING, S_WAIT, S_CRC_GEN, S_CRC_CHK, S_FDT} state_t;
  typedef enum logic [1:0] {K_REQA, K_ANTICOL, K_SELECT} step_t;

  state_t      state;
  step_t       step;
  logic [15:0] tcnt;       // carrier periods in the current wait
  logic        sent;
  logic [39:0] uid_bcc;    // UID0..3 and BCC as received

  // CRC engine: generates the SELECT CRC, checks the SAK CRC.
  logic        crc_start;
  logic [71:0] crc_data;
  logic [3:0]  crc_n;
  logic        crc_busy, crc_done;
  logic [15:0] crc;

  crc_a #(.MAX_BYTES(9)) u_crc (
    .clk, .rst, .start(crc_start), .data(crc_data), .nbytes(crc_n),
    .busy(crc_busy), .done(crc_done), .crc
  );

  // Answer checks.
  logic atqa_ok, uid_ok, sak_len_ok;
  always_comb begin
    atqa_ok    = rx_frame.nbytes == 3'd2 && rx_frame.data[7:6] == 2'b00;  // single-size UID
    uid_ok     = rx_frame.nbytes == 3'd5 && bcc4(rx_frame.data[31:0]) == rx_frame.data[39:32];
    sak_len_ok = rx_frame.nbytes == 3'd3;
  end

  always_comb begin
    crc_start = 1'b0;
    crc_data  = '0;
    crc_n     = '0;
    if (state == S_WAIT && rx_valid && step == K_ANTICOL && uid_ok) begin
      crc_start = 1'b1;
      crc_data  = 72'({rx_frame.data, NVB_SELECT, CMD_SEL_CL1});
      crc_n     = 4'd7;
    end else if (state == S_WAIT && rx_valid && step == K_SELECT && sak_len_ok) begin
      crc_start = 1'b1;
      crc_data  = 72'(rx_frame.data[23:0]);
      crc_n     = 4'd3;
    end
  end

  a_crc_idle: assert property (@(posedge clk) disable iff (rst) crc_start |-> !crc_busy);

  assign rx_en = enable && state == S_WAIT;

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      state     <= S_GAP;
      step      <= K_REQA;
      tcnt      <= '0;
      sent      <= 1'b0;
      uid_bcc   <= '0;
      tx_valid  <= 1'b0;
      tx_frame  <= '0;
      uid       <= '0;
      uid_valid <= 1'b0;
    end else begin
      tx_valid  <= 1'b0;
      uid_valid <= 1'b0;
      if (tick && tcnt != 16'hFFFF) tcnt <= tcnt + 1'b1;
      unique case (state)
        S_GAP: begin
          if (tcnt > 16'(REQ_GAP_FC)) begin
            step     <= K_REQA;
            tx_frame <= '{short_frame: 1'b1, nbytes: 4'd0, data: 72'(CMD_REQA)};
            state    <= S_SEND;
          end
        end
        S_SEND: begin
          tx_valid <= 1'b1;
          sent     <= 1'b0;
          state    <= S_TXING;
          if (step == K_REQA) tcnt <= '0;    // gap runs from request to request
        end
        S_TXING: begin
          if (tx_busy) sent <= 1'b1;
          if (sent && !tx_busy) begin
            state <= S_WAIT;
            if (step != K_REQA) tcnt <= '0;
          end
        end
        S_WAIT: begin
          if (rx_error) begin
            state <= S_GAP;
          end else if (rx_valid) begin
            unique case (step)
              K_REQA: begin
                if (atqa_ok) begin
                  tcnt     <= rx_age;
                  step     <= K_ANTICOL;
                  tx_frame <= '{short_frame: 1'b0, nbytes: 4'd2,
                                data: 72'({NVB_ANTICOL, CMD_SEL_CL1})};
                  state    <= S_FDT;
                end else begin
                  state <= S_GAP;
                end
              end
              K_ANTICOL: begin
                if (uid_ok) begin
                  tcnt    <= rx_age;
                  uid_bcc <= rx_frame.data;
                  state   <= S_CRC_GEN;
                end else begin
                  state <= S_GAP;
                end
              end
              default: begin
                state <= sak_len_ok ? S_CRC_CHK : S_GAP;
              end
            endcase
          end else if (tcnt >= 16'(RESP_TIMEOUT_FC)) begin
            state <= S_GAP;                  // no answer
          end
        end
        S_CRC_GEN: begin
          if (crc_done) begin
            step     <= K_SELECT;
            tx_frame <= '{short_frame: 1'b0, nbytes: 4'd9,
                          data: {crc, uid_bcc, NVB_SELECT, CMD_SEL_CL1}};
            state    <= S_FDT;
          end
        end
        S_CRC_CHK: begin
          if (crc_done) begin
            if (crc == 16'h0000) begin
              uid       <= {uid_bcc[7:0], uid_bcc[15:8], uid_bcc[23:16], uid_bcc[31:24]};
              uid_valid <= 1'b1;
            end
            state <= S_GAP;
          end
        end
        S_FDT: begin
          if (tcnt > 16'(FDT_FC)) state <= S_SEND;
        end
        default: state <= S_GAP;
      endcase
    end
  end
endmodule
