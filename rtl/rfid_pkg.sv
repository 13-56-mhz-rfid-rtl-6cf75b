// rfid_pkg: constants and frame types shared by the 13.56 MHz RFID emulator.
//
// All protocol timing is counted in carrier periods (1/13.56 MHz). The main
// clock runs at ten times the carrier, and every timed unit advances on a
// one-cycle "tick" strobe issued once per carrier period. The bit rate is
// fc/128, the slowest ISO 14443-A rate and the only one built here.
//
// Frames between the controllers and the serial units are carried as packed
// structs: byte 0 sits in bits 7:0 and is sent first, each byte LSB first.
// The PCD-to-PICC path is 72 bits wide (longest command, SELECT, is 9 bytes)
// and the PICC-to-PCD path is 40 bits (at most 5 bytes per answer), as the
// design's block description states. Command codes are those of ISO 14443-3.
package rfid_pkg;

  // PCD-to-PICC frame: short frame (7 bits) or 1..9 bytes with parity.
  typedef struct packed {
    logic        short_frame;
    logic [3:0]  nbytes;
    logic [71:0] data;
  } pcd_frame_t;

  // PICC-to-PCD frame: 1..5 bytes with parity.
  typedef struct packed {
    logic [2:0]  nbytes;
    logic [39:0] data;
  } picc_frame_t;

  // ISO 14443-3 command codes.
  localparam logic [7:0] CMD_REQA    = 8'h26;  // short frame, 7 bits
  localparam logic [7:0] CMD_WUPA    = 8'h52;  // short frame, 7 bits
  localparam logic [7:0] CMD_SEL_CL1 = 8'h93;
  localparam logic [7:0] NVB_ANTICOL = 8'h20;  // SEL + NVB only
  localparam logic [7:0] NVB_SELECT  = 8'h70;  // SEL + NVB + UID + BCC + CRC
  localparam logic [7:0] CMD_HLTA    = 8'h50;

  // Front-end multiplexer settings.
  typedef enum logic [1:0] {
    MUX_PICC_RX = 2'd0,
    MUX_PICC_TX = 2'd1,
    MUX_PCD_RX  = 2'd2,
    MUX_PCD_TX  = 2'd3
  } mux_sel_t;

  // Odd parity bit for one byte: makes the count of ones in byte+parity odd.
  function automatic logic odd_parity(input logic [7:0] b);
    return ~(^b);
  endfunction

  // Block check character of a 4-byte UID: XOR of its bytes.
  function automatic logic [7:0] bcc4(input logic [31:0] u);
    return u[7:0] ^ u[15:8] ^ u[23:16] ^ u[31:24];
  endfunction

endpackage
