// rfid_pkg: constants, types and the CRC function shared by the ISO15693
// tag digital core.
//
// All timing in the core is counted in cycles of the 13.56 MHz carrier clock
// (fc). The reader-to-tag 1-out-of-4 code uses 256-cycle slots and 128-cycle
// pauses; the tag-to-reader response uses a 32-cycle subcarrier period, a
// 256-cycle half-bit and a 512-cycle bit. The CRC is the ISO/IEC 13239
// CRC-16 (polynomial x^16 + x^12 + x^5 + 1, preset FFFF, processed LSB
// first, transmitted complemented; residue F0B8 over data plus CRC).
package rfid_pkg;

  // ---- carrier-cycle timing ----
  localparam int unsigned SLOT_CYCLES  = 256;  // 18.88 us, one 1-of-4 slot / half bit
  localparam int unsigned PAUSE_CYCLES = 128;  // 9.44 us reader pause

  // ---- protocol constants ----
  localparam logic [7:0]  CMD_READ_SINGLE  = 8'h20;
  localparam logic [7:0]  CMD_WRITE_SINGLE = 8'h21;
  localparam logic [7:0]  RESP_FLAGS_OK    = 8'h00;
  localparam int unsigned READ_REQ_BYTES   = 5;   // flags, cmd, block, crc(2)
  localparam int unsigned WRITE_REQ_BYTES  = 9;   // flags, cmd, block, data(4), crc(2)
  localparam int unsigned MAX_REQ_BYTES    = 9;

  localparam logic [15:0] CRC_PRESET  = 16'hFFFF;
  localparam logic [15:0] CRC_RESIDUE = 16'hF0B8;
  localparam logic [15:0] CRC_POLY_REFLECTED = 16'h8408;

  // Response SOF and EOF envelopes, one character per 256-cycle half bit,
  // sent left to right.
  localparam logic [7:0] SOF_PATTERN = 8'b0001_1101;
  localparam logic [7:0] EOF_PATTERN = 8'b1011_1000;

  // One byte into the (uncomplemented) reflected CRC register, LSB first.
  function automatic logic [15:0] crc16_byte(input logic [15:0] crc, input logic [7:0] b);
    logic [15:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ b[i]) c = (c >> 1) ^ CRC_POLY_REFLECTED;
      else             c = c >> 1;
    end
    return c;
  endfunction

  // Controller states.
  typedef enum logic [1:0] {
    CTL_IDLE     = 2'd0,
    CTL_COMPARE  = 2'd1,
    CTL_TRANSMIT = 2'd2,
    CTL_WAIT     = 2'd3
  } ctl_state_e;

  // Decoded request, as handed from the frame decoder to the controller.
  typedef struct packed {
    logic [7:0]  flags;
    logic [7:0]  cmd;
    logic [7:0]  block;
    logic [31:0] data;
    logic [3:0]  nbytes;   // bytes received between SOF and EOF, CRC included
    logic        crc_ok;   // CRC residue matched
  } request_t;

endpackage
