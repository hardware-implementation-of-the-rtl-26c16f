// transmitter_buffer: turns a 112-bit payload into a CloudBus frame and feeds it to the sender.
//
// A one-cycle pulse on send, while the buffer is idle, captures the payload on data (FUNC, VARS,
// DATA) and completes the frame: CNT = 16 in front and the CRC-8 of the first 15 bytes behind.
// The buffer then hands the 16 bytes to the serial sender one at a time, CNT first: it puts the
// byte on byteForTransmit, pulses readyToSend for one cycle and waits until the sender's busy
// goes low again before the next byte. busy is high from the cycle after send until the last
// byte has left the sender. reset abandons a frame being sent.
//
// Interface and timing: the sender must raise txBusy the cycle after readyToSend (as the txd
// module does). Each byte costs the sender's byte time plus two cycles.
//
// From the document: the ports clk, data(111:0), reset, byteForTransmit(7:0) and readyToSend,
// preparing the frame for the sender and counting its length and CRC. This design's own
// choices: the send strobe (the document's symbol has none), the txBusy and busy handshake
// signals, and the CRC-8 of cloudbus_pkg.
module transmitter_buffer
  import cloudbus_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,
  input  logic [PAYLOAD_W-1:0] data,
  input  logic                 send,
  input  logic                 txBusy,
  output logic [7:0]           byteForTransmit,
  output logic                 readyToSend,
  output logic                 busy
);
  localparam int unsigned IW = $clog2(FRAME_BYTES);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;

  state_e             state;
  logic [FRAME_W-1:0] frame;
  logic [FRAME_W-1:0] newFrame;
  logic [IW-1:0]      index;

  always_comb begin
    newFrame = {8'(FRAME_BYTES), data, 8'h00};
    newFrame[7:0] = frame_crc(newFrame);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (reset) begin
      state           <= S_IDLE;
      frame           <= '0;
      index           <= '0;
      byteForTransmit <= '0;
      readyToSend     <= 1'b0;
    end else begin
      readyToSend <= 1'b0;
      unique case (state)
        S_IDLE: if (send) begin
          frame <= newFrame;
          index <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: if (!txBusy) begin
          byteForTransmit <= frame[FRAME_W-1-8*index -: 8];
          readyToSend     <= 1'b1;
          state           <= S_WAIT;
        end
        S_WAIT: if (!readyToSend && !txBusy) begin
          if (index == IW'(FRAME_BYTES - 1)) begin
            state <= S_IDLE;
          end else begin
            index <= index + 1'b1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rule: a byte is offered to the sender only while the sender is idle.
  a_offer_when_idle: assert property (@(posedge clk) disable iff (reset) readyToSend |-> !txBusy);

endmodule
