// rxd_timer: the receiver's double timer/counter.
//
// Two independent down-counters run from the main clock clkMain. The high-rate counter gives a
// one-cycle tick on clkHi every HI_DIV cycles; the receiver samples the RxD line on these ticks
// to find the falling edge of a start bit. The low-rate counter gives a one-cycle tick on clkLo
// every LO_DIV cycles (one bit time); the receiver reads a data bit on each. hiRst and loRst hold
// their counter in reset. When loRst is released the first clkLo tick comes after LO_DIV/2
// cycles, in the middle of the start bit, and every LO_DIV cycles after that, in the middle of
// each following bit.
//
// Interface and timing: clkHi and clkLo are clock-enable ticks, high for one clkMain cycle and
// decoded from the counter state (no register between counter and tick). They are never high
// while their reset is high.
//
// From the document: a double timer/counter with inputs clkMain, hiRst, loRst and outputs clkHi
// (sampling) and clkLo (bit read). This design's own choices: the ticks are enables in the
// clkMain domain rather than derived clocks, the half-bit first period of clkLo, and the default
// divisors (50 MHz clock, 115200 bit/s, about 16 samples per bit); the document gives no rates.
module rxd_timer #(
  parameter int unsigned HI_DIV = 27,   // clkMain cycles between clkHi ticks
  parameter int unsigned LO_DIV = 434   // clkMain cycles per bit
) (
  input  logic clkMain,
  input  logic hiRst,
  input  logic loRst,
  output logic clkHi,
  output logic clkLo
);
  localparam int unsigned HW = (HI_DIV > 1) ? $clog2(HI_DIV) : 1;
  localparam int unsigned LW = (LO_DIV > 1) ? $clog2(LO_DIV) : 1;
  localparam logic [HW-1:0] HI_LOAD    = HW'(HI_DIV - 1);
  localparam logic [LW-1:0] LO_LOAD    = LW'(LO_DIV - 1);
  localparam logic [LW-1:0] LO_FIRST   = LW'((LO_DIV / 2 > 0) ? LO_DIV / 2 - 1 : 0);

  logic [HW-1:0] hiCnt;
  logic [LW-1:0] loCnt;

  always_ff @(posedge clkMain) begin
    if (hiRst)           hiCnt <= HI_LOAD;
    else if (hiCnt == 0) hiCnt <= HI_LOAD;
    else                 hiCnt <= hiCnt - 1'b1;
  end

  always_ff @(posedge clkMain) begin
    if (loRst)           loCnt <= LO_FIRST;
    else if (loCnt == 0) loCnt <= LO_LOAD;
    else                 loCnt <= loCnt - 1'b1;
  end

  assign clkHi = !hiRst && (hiCnt == 0);
  assign clkLo = !loRst && (loCnt == 0);

endmodule
