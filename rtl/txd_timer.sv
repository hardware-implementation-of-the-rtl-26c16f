// txd_timer: bit clock generator for the transmitter.
//
// A down-counter on the main clock clkMain gives a one-cycle tick on clkLo every LO_DIV cycles.
// While loRst is high the counter is held at its load value and clkLo stays low. When the
// transmitter releases loRst together with driving the start bit, the first tick comes LO_DIV
// cycles later, at the end of the start bit, and one every LO_DIV cycles after that, so each
// bit on the line lasts exactly LO_DIV cycles.
//
// Interface and timing: clkLo is a clock-enable tick in the clkMain domain, decoded from the
// counter state.
//
// From the document: inputs clkMain and loRst, output clkLo, a transmit clock made from the
// external clock. This design's own choices: the tick is an enable rather than a derived clock,
// and the default divisor (50 MHz clock, 115200 bit/s); the document gives no rate.
module txd_timer #(
  parameter int unsigned LO_DIV = 434   // clkMain cycles per bit
) (
  input  logic clkMain,
  input  logic loRst,
  output logic clkLo
);
  localparam int unsigned LW = (LO_DIV > 1) ? $clog2(LO_DIV) : 1;
  localparam logic [LW-1:0] LO_LOAD = LW'(LO_DIV - 1);

  logic [LW-1:0] loCnt;

  always_ff @(posedge clkMain) begin
    if (loRst)           loCnt <= LO_LOAD;
    else if (loCnt == 0) loCnt <= LO_LOAD;
    else                 loCnt <= loCnt - 1'b1;
  end

  assign clkLo = !loRst && (loCnt == 0);

endmodule
