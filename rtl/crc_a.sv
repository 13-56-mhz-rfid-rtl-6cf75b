// crc_a: bit-serial LFSR for the ISO 14443-A frame CRC (CRC_A).
//
// The design appends two CRC bytes to the SELECT command and to the SAK
// answer. The CRC is the 16-bit CCITT polynomial x^16 + x^12 + x^5 + 1,
// processed least significant bit first (reflected form, feedback mask
// 0x8408), preset to 0x6363, with no final inversion. The document only calls
// it "a common variant of CRC_16" built from an LFSR; the CRC_A parameters
// come from ISO 14443-3.
//
// Interface: pulse start with data (byte 0 in bits 7:0) and nbytes held
// stable; the LFSR shifts one bit per clock, LSB of byte 0 first. done pulses
// for one cycle 8*nbytes+1 cycles after start, with crc valid from then until
// the next start. The low CRC byte (crc[7:0]) is transmitted first. Running
// the LFSR over data followed by its CRC leaves zero, which is how a received
// CRC is checked.
module crc_a #(
  parameter int unsigned MAX_BYTES = 9,
  parameter logic [15:0] INIT      = 16'h6363
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [8*MAX_BYTES-1:0] data,
  input  logic [3:0]             nbytes,
  output logic                   busy,
  output logic                   done,
  output logic [15:0]            crc
);
  localparam int unsigned IW = $clog2(8 * MAX_BYTES + 1);

  logic [8*MAX_BYTES-1:0] shreg;
  logic [IW-1:0]          left;
  logic                   fb;

  assign fb = crc[0] ^ shreg[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      crc   <= INIT;
      shreg <= '0;
      left  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= (nbytes != 4'd0);
        done  <= (nbytes == 4'd0);
        crc   <= INIT;
        shreg <= data;
        left  <= IW'(8 * nbytes);
      end else if (busy) begin
        crc   <= (crc >> 1) ^ (fb ? 16'h8408 : 16'h0000);
        shreg <= shreg >> 1;
        left  <= left - 1'b1;
        if (left == IW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
