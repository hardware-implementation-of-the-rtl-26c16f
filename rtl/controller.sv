// controller: the CloudBus question/answer logic of an end module.
//
// CloudBus has no master. A module that needs to know whether some variables have reached a
// given state broadcasts a QUESTION frame naming the variables (VARS) and the states it waits
// for (DATA). The module responsible for those variables does not answer at once: it keeps the
// question and sends an ANSWER frame, carrying its current states, in the cycle its variables
// reach the asked states. The asking module then learns the states from that answer.
//
// Answering. ownVars marks the variables this module is responsible for: VARS bit i (i < 16)
// is digital line i, bit 16+j analog channel j (j < 4), bits 23:20 are reserved. A valid
// QUESTION whose selected variables are all owned (and at least one) is stored in a single
// question register; a later question replaces it. While a question is stored, each cycle
// compares the selected local digital bits and analog words with the asked ones; when all are
// equal and the transmitter is free, an ANSWER with the question's VARS and all local states is
// sent and the question is dropped.
//
// Asking. A one-cycle askValid (accepted when askReady is high) queues a QUESTION with askVars,
// askDigital and askAnalog, sent when the transmitter is free. Until an ANSWER naming all of
// askVars arrives, askPending stays high; that answer pulses askDone.
//
// Answers received. Every valid ANSWER frame is stored on IO_Port as {vars, digital, analog}
// and pulses answerSeen. Corrupt frames (error) are counted in errorCount, which saturates.
//
// Interface and timing: sendData is a one-cycle strobe with dataOut (FUNC, VARS, DATA) valid in
// the same cycle; it is given only when txBusy is low and is not repeated until txBusy has been
// seen high. An answer that is due has priority over a queued question.
//
// From the document: the ports clk, func(7:0), vars(23:0), digitalIO(15:0), analogIO(63:0),
// error, dataOut(111:0), sendData and IO_Port(103:0), and the protocol rule that the module
// responsible for a variable answers when the variable reaches the asked state. This design's
// own choices: the command codes, the VARS bit map, the single question register, the ask
// interface, ownVars, the local state inputs, the frame valid strobe, the transmitter handshake,
// the layout of IO_Port and the error counter. The document's control algorithm itself is
// application specific and not given; this block carries out only the protocol side.
module controller
  import cloudbus_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // parsed frames
  input  logic [FUNC_W-1:0]    func,
  input  logic [VARS_W-1:0]    vars,
  input  logic [DIG_W-1:0]     digitalIO,
  input  logic [ANA_W-1:0]     analogIO,
  input  logic                 frameValid,
  input  logic                 error,
  // local variables and configuration
  input  logic [DIG_W-1:0]     localDigital,
  input  logic [ANA_W-1:0]     localAnalog,
  input  logic [VARS_W-1:0]    ownVars,
  // questions from the local control algorithm
  input  logic                 askValid,
  input  logic [VARS_W-1:0]    askVars,
  input  logic [DIG_W-1:0]     askDigital,
  input  logic [ANA_W-1:0]     askAnalog,
  output logic                 askReady,
  output logic                 askPending,
  output logic                 askDone,
  // transmitter
  input  logic                 txBusy,
  output logic [PAYLOAD_W-1:0] dataOut,
  output logic                 sendData,
  // received states and status
  output logic [IO_PORT_W-1:0] IO_Port,
  output logic                 answerSeen,
  output logic [7:0]           errorCount
);
  localparam logic [VARS_W-1:0] VALID_VARS = VARS_W'((1 << (DIG_W + ANA_CH)) - 1);

  // stored question from another module
  logic              qValid;
  logic [VARS_W-1:0] qVars;
  logic [DIG_W-1:0]  qDigital;
  logic [ANA_W-1:0]  qAnalog;
  // local question waiting to be sent, and the one waiting for an answer
  logic              askQueued;
  payload_t          askFrame;
  logic [VARS_W-1:0] waitVars;
  // the transmitter took the last strobe once it has been seen busy
  logic              sentWait;

  logic conditionMet;
  logic questionOk;
  logic txFree;

  // Do the selected local variables hold the asked states?
  always_comb begin
    conditionMet = 1'b1;
    for (int i = 0; i < DIG_W; i++) begin
      if (qVars[i] && (localDigital[i] != qDigital[i])) conditionMet = 1'b0;
    end
    for (int j = 0; j < ANA_CH; j++) begin
      if (qVars[DIG_W + j] &&
          (localAnalog[ANA_BITS*j +: ANA_BITS] != qAnalog[ANA_BITS*j +: ANA_BITS]))
        conditionMet = 1'b0;
    end
  end

  assign questionOk = ((vars & VALID_VARS) != '0) && ((vars & ~(ownVars & VALID_VARS)) == '0);
  assign txFree     = !txBusy && !sentWait && !sendData;
  assign askReady   = !askQueued;

  always_ff @(posedge clk) begin
    if (rst) begin
      qValid     <= 1'b0;
      qVars      <= '0;
      qDigital   <= '0;
      qAnalog    <= '0;
      askQueued  <= 1'b0;
      askFrame   <= '0;
      askPending <= 1'b0;
      askDone    <= 1'b0;
      waitVars   <= '0;
      sentWait   <= 1'b0;
      dataOut    <= '0;
      sendData   <= 1'b0;
      IO_Port    <= '0;
      answerSeen <= 1'b0;
      errorCount <= '0;
    end else begin
      sendData   <= 1'b0;
      askDone    <= 1'b0;
      answerSeen <= 1'b0;
      if (sendData)    sentWait <= 1'b1;
      else if (txBusy) sentWait <= 1'b0;

      if (error && errorCount != 8'hFF) errorCount <= errorCount + 1'b1;

      if (frameValid && func == FUNC_ANSWER) begin
        IO_Port    <= {vars, digitalIO, analogIO};
        answerSeen <= 1'b1;
        if (askPending && ((waitVars & ~vars) == '0)) begin
          askPending <= 1'b0;
          askDone    <= 1'b1;
        end
      end

      if (askValid && askReady) begin
        askQueued <= 1'b1;
        askFrame  <= payload_t'({FUNC_QUESTION, askVars, askDigital, askAnalog});
      end

      if (txFree && qValid && conditionMet) begin
        dataOut  <= {FUNC_ANSWER, qVars, localDigital, localAnalog};
        sendData <= 1'b1;
        qValid   <= 1'b0;
      end else if (txFree && askQueued) begin
        dataOut    <= askFrame;
        sendData   <= 1'b1;
        askQueued  <= 1'b0;
        askPending <= 1'b1;
        waitVars   <= askFrame.vars;
      end

      // a new question is taken after the answer logic, so it replaces the stored one
      if (frameValid && func == FUNC_QUESTION && questionOk) begin
        qValid   <= 1'b1;
        qVars    <= vars;
        qDigital <= digitalIO;
        qAnalog  <= analogIO;
      end
    end
  end

  // Handshake rule: a frame is handed to the transmitter only while it is idle.
  a_send_when_idle: assert property (@(posedge clk) disable iff (rst) sendData |-> !txBusy);

endmodule
