// cloudbus_pkg: types, constants and the checksum shared by the CloudBus end module.
//
// A CloudBus frame is 128 bits, 16 bytes, sent first byte first:
//   CNT  (8)  frame length in bytes, the whole frame included (16)
//   FUNC (8)  command code: a question about a condition, or an answer
//   VARS (24) which variables the frame is about (one bit per variable)
//   DATA (80) states of the variables: 16 digital bits, then 4 analog words of 16 bits
//   CRC  (8)  checksum over the 15 bytes before it
// The field names, their order, the one-byte CNT and CRC and the widths of FUNC (8), VARS (24),
// digital (16) and analog (64) state follow the document's module symbols. The bit layout
// inside VARS and DATA, the command codes and the CRC polynomial are this design's own choices:
// VARS bit i (i < 16) selects digital variable i, bit 16+j selects analog channel j, bits
// 23:20 are reserved; CRC-8 with polynomial x^8+x^2+x+1 (0x07), initial value 0, MSB first.
package cloudbus_pkg;

  localparam int unsigned FRAME_BYTES   = 16;
  localparam int unsigned FRAME_W       = 8 * FRAME_BYTES;  // 128
  localparam int unsigned PAYLOAD_W     = FRAME_W - 16;     // 112: FUNC, VARS, DATA
  localparam int unsigned FUNC_W        = 8;
  localparam int unsigned VARS_W        = 24;
  localparam int unsigned DIG_W         = 16;
  localparam int unsigned ANA_CH        = 4;
  localparam int unsigned ANA_BITS      = 16;
  localparam int unsigned ANA_W         = ANA_CH * ANA_BITS; // 64
  localparam int unsigned IO_PORT_W     = VARS_W + DIG_W + ANA_W; // 104

  localparam logic [7:0] CRC_POLY = 8'h07;

  typedef enum logic [FUNC_W-1:0] {
    FUNC_NONE     = 8'h00,
    FUNC_QUESTION = 8'h01,  // "tell me when these variables reach these states"
    FUNC_ANSWER   = 8'h02   // "these variables are now in these states"
  } func_e;

  // Payload handed from the controller to the transmitter buffer (dataOut, 112 bits).
  typedef struct packed {
    logic [FUNC_W-1:0] func;
    logic [VARS_W-1:0] vars;
    logic [DIG_W-1:0]  digital;
    logic [ANA_W-1:0]  analog;   // channel 3 in the top word, channel 0 in the bottom word
  } payload_t;

  // Whole frame as it sits in the receiver buffer (128 bits, CNT in the top byte).
  typedef struct packed {
    logic [7:0] cnt;
    payload_t   payload;
    logic [7:0] crc;
  } frame_t;

  // One byte step of the CRC-8.
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] data);
    logic [7:0] c;
    c = crc ^ data;
    for (int b = 0; b < 8; b++) begin
      c = c[7] ? ((c << 1) ^ CRC_POLY) : (c << 1);
    end
    return c;
  endfunction

  // CRC-8 over the first 15 bytes of a frame (CNT, FUNC, VARS, DATA).
  function automatic logic [7:0] frame_crc(input logic [FRAME_W-1:0] f);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 0; i < FRAME_BYTES - 1; i++) begin
      c = crc8_byte(c, f[FRAME_W-1-8*i -: 8]);
    end
    return c;
  endfunction

endpackage
