// cloudbus_end_module: one CloudBus end module, receiver to transmitter.
//
// Receive path: rxd_timer gives the sampling and bit ticks, rxd turns the RxD line into bytes,
// receiver_buffer gathers 16 bytes into a frame, parser checks CNT and CRC and splits the frame
// into FUNC, VARS and the variable states. Control: controller stores questions about the
// variables this module owns (ownVars) and answers when they reach the asked states, sends the
// questions of the local control algorithm (ask*), and keeps the states of the last answer on
// IO_Port. io_ports connects it to 16 digital and 4 x 16-bit analog inputs and outputs. Transmit
// path: transmitter_buffer adds CNT and CRC and hands the frame byte by byte to txd, which sends
// it on TxD using the ticks of txd_timer.
//
// Interface and timing: one clock, clk (the document's CLK / clkMain), and a synchronous
// active-high reset rst. Serial format 8N1 at clk/LO_DIV bit/s, idle high. A byte with a bad
// stop bit empties the receiver buffer so the next byte starts a new frame.
//
// From the document: the blocks and their connections (receiver chain, parser, controller,
// I/O ports, transmitter chain, both timers) and the I/O counts. This design's own choices:
// the reset, the strobes between blocks, the ask interface, ownVars and the status outputs.
module cloudbus_end_module
  import cloudbus_pkg::*;
#(
  parameter int unsigned HI_DIV = 27,   // clk cycles between receiver sampling ticks
  parameter int unsigned LO_DIV = 434   // clk cycles per bit
) (
  input  logic              clk,
  input  logic              rst,
  // serial line
  input  logic              RxD,
  output logic              TxD,
  // I/O pins (analog words come from / go to external converters)
  input  logic [DIG_W-1:0]  digitalIn,
  input  logic [ANA_W-1:0]  analogIn,
  output logic [DIG_W-1:0]  digitalOut,
  output logic [ANA_W-1:0]  analogOut,
  // configuration and the local control algorithm
  input  logic [VARS_W-1:0] ownVars,
  input  logic              askValid,
  input  logic [VARS_W-1:0] askVars,
  input  logic [DIG_W-1:0]  askDigital,
  input  logic [ANA_W-1:0]  askAnalog,
  output logic              askReady,
  output logic              askPending,
  output logic              askDone,
  // status
  output logic              answerSeen,
  output logic              rxByteError,
  output logic              frameError,
  output logic [7:0]        errorCount
);
  // receive chain
  logic               clkHi, rxClkLo, rxLoRst;
  logic [7:0]         rxData;
  logic               rxReceived;
  logic [FRAME_W-1:0] rxFrame;
  logic               rxFrameReady;
  // parsed fields
  logic [FUNC_W-1:0]  pFunc;
  logic [VARS_W-1:0]  pVars;
  logic [DIG_W-1:0]   pDigital;
  logic [ANA_W-1:0]   pAnalog;
  logic               pValid;
  // controller and I/O
  logic [PAYLOAD_W-1:0] txPayload;
  logic                 txSend;
  logic [IO_PORT_W-1:0] ioPort;
  logic [DIG_W-1:0]     localDigital;
  logic [ANA_W-1:0]     localAnalog;
  // transmit chain
  logic       txBufBusy;
  logic [7:0] txByte;
  logic       txByteSend;
  logic       txdBusy;
  logic       txClkLo, txLoRst;

  rxd_timer #(.HI_DIV(HI_DIV), .LO_DIV(LO_DIV)) u_rxd_timer (
    .clkMain(clk), .hiRst(rst), .loRst(rxLoRst), .clkHi(clkHi), .clkLo(rxClkLo)
  );

  rxd u_rxd (
    .clk(clk), .rst(rst), .clkHi(clkHi), .clkLo(rxClkLo), .RxD(RxD),
    .loRst(rxLoRst), .error(rxByteError), .data(rxData), .received(rxReceived)
  );

  receiver_buffer u_receiver_buffer (
    .clk(clk), .reset(rst || rxByteError), .in(rxData), .inValid(rxReceived),
    .out(rxFrame), .ready(rxFrameReady)
  );

  parser u_parser (
    .clk(clk), .rst(rst), .in(rxFrame), .inValid(rxFrameReady),
    .func(pFunc), .vars(pVars), .digitalIO(pDigital), .analogIO(pAnalog),
    .valid(pValid), .error(frameError)
  );

  controller u_controller (
    .clk(clk), .rst(rst),
    .func(pFunc), .vars(pVars), .digitalIO(pDigital), .analogIO(pAnalog),
    .frameValid(pValid), .error(frameError),
    .localDigital(localDigital), .localAnalog(localAnalog), .ownVars(ownVars),
    .askValid(askValid), .askVars(askVars), .askDigital(askDigital), .askAnalog(askAnalog),
    .askReady(askReady), .askPending(askPending), .askDone(askDone),
    .txBusy(txBufBusy), .dataOut(txPayload), .sendData(txSend),
    .IO_Port(ioPort), .answerSeen(answerSeen), .errorCount(errorCount)
  );

  io_ports u_io_ports (
    .clk(clk), .rst(rst),
    .digitalIn(digitalIn), .analogIn(analogIn),
    .digitalOut(digitalOut), .analogOut(analogOut),
    .localDigital(localDigital), .localAnalog(localAnalog), .IO_Port(ioPort)
  );

  transmitter_buffer u_transmitter_buffer (
    .clk(clk), .reset(rst), .data(txPayload), .send(txSend), .txBusy(txdBusy),
    .byteForTransmit(txByte), .readyToSend(txByteSend), .busy(txBufBusy)
  );

  txd_timer #(.LO_DIV(LO_DIV)) u_txd_timer (
    .clkMain(clk), .loRst(txLoRst), .clkLo(txClkLo)
  );

  txd u_txd (
    .clk(clk), .rst(rst), .clkLo(txClkLo), .send(txByteSend), .data(txByte),
    .TxD(TxD), .loRst(txLoRst), .busy(txdBusy)
  );

endmodule
