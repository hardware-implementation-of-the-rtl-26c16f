// receiver_buffer: gathers received bytes into one 128-bit CloudBus frame.
//
// Bytes from the receiver arrive with a one-cycle inValid strobe. The first byte of a frame is
// CNT, the frame length in bytes; the buffer keeps collecting until it holds CNT bytes (a CNT of
// 0 or above 16 is taken as 16, the full frame). Byte k of the frame goes to bits 127-8k down to
// 120-8k of the assembly register, so the first byte ends up in the top byte; bytes a short frame
// does not send are zero. When the last byte arrives the whole frame is copied to out and ready
// pulses for one cycle; out then holds that frame while the next one is assembled in the
// assembly register. A high reset empties the buffer, so the next byte is taken as a new CNT.
//
// Interface and timing: one cycle from the inValid of the last byte to ready. out is stable
// from ready until the next ready.
//
// From the document: a 128-bit buffer with ports clk, in(7:0), reset, out(127:0) and ready that
// merges single bytes into a whole frame, CNT being the frame length. This design's own
// choices: the inValid strobe (the document's symbol has no strobe input), ending the frame on
// CNT, the byte order in out, the separate output register, and ready as a pulse.
module receiver_buffer
  import cloudbus_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  logic [7:0]         in,
  input  logic               inValid,
  output logic [FRAME_W-1:0] out,
  output logic               ready
);
  localparam int unsigned IW = $clog2(FRAME_BYTES);  // 4: byte index 0..15

  logic [FRAME_W-1:0] assembly;
  logic [IW-1:0]      index;     // position of the next byte
  logic [IW-1:0]      lastIndex; // position of the last byte of this frame
  logic [FRAME_W-1:0] withByte;
  logic [IW-1:0]      lastOfThis;

  // The frame with the incoming byte placed at its position.
  always_comb begin
    withByte = (index == 0) ? '0 : assembly;
    withByte[FRAME_W-1-8*index -: 8] = in;
  end

  // For the first byte the length comes from the byte itself.
  always_comb begin
    if (index != 0)                                 lastOfThis = lastIndex;
    else if (in == 8'd0 || in > 8'(FRAME_BYTES))    lastOfThis = IW'(FRAME_BYTES - 1);
    else                                            lastOfThis = IW'(in - 8'd1);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      assembly  <= '0;
      index     <= '0;
      lastIndex <= '0;
      out       <= '0;
      ready     <= 1'b0;
    end else begin
      ready <= 1'b0;
      if (inValid) begin
        assembly  <= withByte;
        lastIndex <= lastOfThis;
        if (index == lastOfThis) begin
          out   <= withByte;
          ready <= 1'b1;
          index <= '0;
        end else begin
          index <= index + 1'b1;
        end
      end
    end
  end

endmodule
