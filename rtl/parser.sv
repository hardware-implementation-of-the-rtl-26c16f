// parser: checks a received CloudBus frame and splits it into its fields.
//
// When inValid pulses, the 128-bit frame on in is checked: CNT must be 16 (the full frame) and
// the CRC byte must equal the CRC-8 of the 15 bytes before it. A good frame is copied to the
// registered outputs func, vars, digitalIO and analogIO and valid pulses for one cycle. A bad
// frame leaves those outputs as they were and pulses error instead.
//
// Interface and timing: one cycle from inValid to valid or error. Outputs hold the fields of
// the last good frame.
//
// From the document: the ports clk, in(127:0), func(7:0), vars(23:0), digitalIO(15:0),
// analogIO(63:0) and error, setting the outputs only for a valid frame and raising error
// otherwise. This design's own choices: the inValid strobe (the document lists a third input
// whose name is not given), the valid pulse, the rst port, and the checks themselves (CNT and
// CRC-8 as defined in cloudbus_pkg).
module parser
  import cloudbus_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [FRAME_W-1:0] in,
  input  logic               inValid,
  output logic [FUNC_W-1:0]  func,
  output logic [VARS_W-1:0]  vars,
  output logic [DIG_W-1:0]   digitalIO,
  output logic [ANA_W-1:0]   analogIO,
  output logic               valid,
  output logic               error
);
  frame_t frame;
  logic   good;

  assign frame = frame_t'(in);
  assign good  = (frame.cnt == 8'(FRAME_BYTES)) && (frame.crc == frame_crc(in));

  always_ff @(posedge clk) begin
    if (rst) begin
      func      <= '0;
      vars      <= '0;
      digitalIO <= '0;
      analogIO  <= '0;
      valid     <= 1'b0;
      error     <= 1'b0;
    end else begin
      valid <= inValid && good;
      error <= inValid && !good;
      if (inValid && good) begin
        func      <= frame.payload.func;
        vars      <= frame.payload.vars;
        digitalIO <= frame.payload.digital;
        analogIO  <= frame.payload.analog;
      end
    end
  end

  // A frame is either accepted or rejected, never both.
  a_one_verdict: assert property (@(posedge clk) disable iff (rst) !(valid && error));

endmodule
