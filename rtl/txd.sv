// txd: sender for the serial TxD line, one byte at a time.
//
// The line idles high with loRst high, which holds the bit timer stopped. A one-cycle pulse on
// send loads the byte on data: the next cycle TxD goes low for the start bit and loRst is
// released, so the timer ticks clkLo every bit time from then on. Each tick moves the line to
// the next bit: eight data bits, least significant first, then a high stop bit. The tick that
// ends the stop bit raises loRst again and drops busy. A byte takes exactly 10 bit times from
// the cycle after send to the cycle busy falls.
//
// Interface and timing: clk is the main clock that also runs the timer; clkLo is its one-cycle
// tick. busy is high from the cycle after send until the stop bit has been sent; send is ignored
// while busy is high.
//
// From the document: the ports clkLo, send, data(7:0), TxD and loRst, and send starting the
// transmission of the byte on data. This design's own choices: the 8N1 format, LSB first, the
// clk, rst and busy ports (busy tells the transmitter buffer when the next byte may go).
module txd (
  input  logic       clk,
  input  logic       rst,
  input  logic       clkLo,
  input  logic       send,
  input  logic [7:0] data,
  output logic       TxD,
  output logic       loRst,
  output logic       busy
);
  logic [8:0] shift;   // data bits then the stop bit, shifted out from bit 0
  logic [3:0] bitCnt;  // bits still to be ended by a tick (start + 8 data + stop)

  always_ff @(posedge clk) begin
    if (rst) begin
      shift  <= '1;
      bitCnt <= '0;
      TxD    <= 1'b1;
      loRst  <= 1'b1;
      busy   <= 1'b0;
    end else if (!busy) begin
      if (send) begin
        shift  <= {1'b1, data};
        bitCnt <= 4'd10;
        TxD    <= 1'b0;
        loRst  <= 1'b0;
        busy   <= 1'b1;
      end
    end else if (clkLo) begin
      if (bitCnt == 4'd1) begin
        TxD   <= 1'b1;
        loRst <= 1'b1;
        busy  <= 1'b0;
      end else begin
        TxD   <= shift[0];
        shift <= {1'b1, shift[8:1]};
      end
      bitCnt <= bitCnt - 1'b1;
    end
  end

  // The bit timer runs exactly while a byte is being sent, and the line is idle high otherwise.
  a_timer_follows_busy: assert property (@(posedge clk) disable iff (rst) busy == !loRst);
  a_idle_high:          assert property (@(posedge clk) disable iff (rst) !busy |-> TxD);

endmodule
