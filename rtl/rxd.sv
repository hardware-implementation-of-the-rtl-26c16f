// rxd: receiver for the serial RxD line, one byte at a time.
//
// The line idles high. Each byte is a start bit (low), eight data bits, least significant bit
// first, and a stop bit (high). RxD first passes through two flip-flops to bring it into the
// clock domain. While idle the receiver holds loRst high, so the bit timer is stopped, and looks
// at the line on every clkHi tick. When it sees the line low it releases loRst; the bit timer
// then ticks clkLo in the middle of the start bit and of every following bit. At the first tick
// the line must still be low, otherwise the edge was a glitch and the receiver goes back to idle.
// The next eight ticks shift in the data bits. At the stop bit tick a high line completes the
// byte: data is updated and received pulses for one cycle. A low line there is a framing error:
// error pulses for one cycle and data keeps its old value. Either way loRst goes high again.
//
// Interface and timing: clk is the main clock that also runs the timer; clkHi and clkLo are its
// one-cycle ticks. received and error are one-cycle pulses; data holds the last good byte.
//
// From the document: the ports clkHi, clkLo, RxD, loRst, error, data(7:0), received, sampling
// with clkHi to detect incoming data and starting the clkLo counter to read the bits. This
// design's own choices: the 8N1 character format, LSB first, the two-flop synchroniser, the
// glitch check on the start bit, the clk and rst ports, and what counts as an error (a low stop
// bit); the document says only "received data corruption".
module rxd (
  input  logic       clk,
  input  logic       rst,
  input  logic       clkHi,
  input  logic       clkLo,
  input  logic       RxD,
  output logic       loRst,
  output logic       error,
  output logic [7:0] data,
  output logic       received
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  state_e     state;
  logic [1:0] sync;
  logic [2:0] bitCnt;
  logic [7:0] shift;
  logic       line;

  assign line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync     <= 2'b11;
      state    <= S_IDLE;
      bitCnt   <= '0;
      shift    <= '0;
      data     <= '0;
      loRst    <= 1'b1;
      error    <= 1'b0;
      received <= 1'b0;
    end else begin
      sync     <= {sync[0], RxD};
      error    <= 1'b0;
      received <= 1'b0;
      unique case (state)
        S_IDLE: if (clkHi && !line) begin
          loRst <= 1'b0;
          state <= S_START;
        end
        S_START: if (clkLo) begin
          if (!line) begin
            bitCnt <= '0;
            state  <= S_DATA;
          end else begin
            loRst <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_DATA: if (clkLo) begin
          shift  <= {line, shift[7:1]};
          bitCnt <= bitCnt + 1'b1;
          if (bitCnt == 3'd7) state <= S_STOP;
        end
        S_STOP: if (clkLo) begin
          if (line) begin
            data     <= shift;
            received <= 1'b1;
          end else begin
            error    <= 1'b1;
          end
          loRst <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A byte ends either received or in error, never both.
  a_one_outcome: assert property (@(posedge clk) disable iff (rst) !(received && error));

endmodule
