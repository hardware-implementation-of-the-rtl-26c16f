// tb_cloudbus_end_module: two end modules on one CloudBus link, at the default parameters.
//
// Module A's TxD drives module B's RxD and B's TxD drives A's RxD; the testbench can switch B's
// RxD to its own serial driver to inject traffic. A owns digital variables 8..15, B owns digital
// 0..7 and the four analog channels. The run goes through:
//   1. A asks whether B's digital 2 is 1 and analog 1 is 0x00C8. B stores the question and does
//      not answer while its inputs differ (deferred answer); when the testbench sets B's inputs,
//      B answers within one frame time, A ends its ask and shows B's states on its outputs.
//   2. B asks about A's digital 9, which already holds: A answers at once (immediate answer).
//   3. Injected frames into B: a frame with a wrong CRC, a frame of 5 bytes (CNT 5, CRC right for
//      it), a byte with a low stop bit, and a good question about a variable B does not own.
//      They must give a frame error, a frame error, a byte error and no answer.
//   4. After the injected errors, a good injected question still gets its answer.
// Each of these mechanisms is counted and must occur at least once. Frame time is checked: an
// frame is complete at the receiver 16 x 10 bit times after it was handed to the sender, less
// half a bit (the stop bit is read in its middle), plus a few cycles of handshake per byte.
module tb_cloudbus_end_module;
  import tb_cloudbus_pkg::*;
  localparam int LO = 434;               // bit time of the default configuration
  localparam int FRAME_CYCLES = 160 * LO;

  logic clk = 0, rst = 1;
  logic aTxD, bTxD, bRxD, inject = 0, injLine = 1;
  // A
  logic [15:0] aDigIn = 0, aDigOut;
  logic [63:0] aAnaIn = 0, aAnaOut;
  logic aAskValid = 0, aAskReady, aAskPending, aAskDone, aAnswerSeen, aByteErr, aFrameErr;
  logic [23:0] aAskVars = 0;
  logic [15:0] aAskDig = 0;
  logic [63:0] aAskAna = 0;
  logic [7:0] aErrCnt;
  // B
  logic [15:0] bDigIn = 0, bDigOut;
  logic [63:0] bAnaIn = 0, bAnaOut;
  logic bAskValid = 0, bAskReady, bAskPending, bAskDone, bAnswerSeen, bByteErr, bFrameErr;
  logic [23:0] bAskVars = 0;
  logic [15:0] bAskDig = 0;
  logic [63:0] bAskAna = 0;
  logic [7:0] bErrCnt;

  int checks = 0, failures = 0;
  int nQuestion = 0, nDeferred = 0, nImmediate = 0, nAskDone = 0, nFrameErr = 0, nByteErr = 0;
  int nIgnored = 0, nAnswerSeen = 0;
  longint cycle = 0;

  assign bRxD = inject ? injLine : aTxD;

  cloudbus_end_module u_a (
    .clk, .rst, .RxD(bTxD), .TxD(aTxD), .digitalIn(aDigIn), .analogIn(aAnaIn),
    .digitalOut(aDigOut), .analogOut(aAnaOut), .ownVars(24'h00_FF00),
    .askValid(aAskValid), .askVars(aAskVars), .askDigital(aAskDig), .askAnalog(aAskAna),
    .askReady(aAskReady), .askPending(aAskPending), .askDone(aAskDone),
    .answerSeen(aAnswerSeen), .rxByteError(aByteErr), .frameError(aFrameErr), .errorCount(aErrCnt)
  );

  cloudbus_end_module u_b (
    .clk, .rst, .RxD(bRxD), .TxD(bTxD), .digitalIn(bDigIn), .analogIn(bAnaIn),
    .digitalOut(bDigOut), .analogOut(bAnaOut), .ownVars(24'h0F_00FF),
    .askValid(bAskValid), .askVars(bAskVars), .askDigital(bAskDig), .askAnalog(bAskAna),
    .askReady(bAskReady), .askPending(bAskPending), .askDone(bAskDone),
    .answerSeen(bAnswerSeen), .rxByteError(bByteErr), .frameError(bFrameErr), .errorCount(bErrCnt)
  );

  always #5 clk = ~clk;

  int bAnswersSent = 0, aAnswersSent = 0;
  always @(posedge clk) begin
    cycle++;
    if (aAskDone || bAskDone) nAskDone++;
    if (aAnswerSeen || bAnswerSeen) nAnswerSeen++;
    if (aFrameErr || bFrameErr) nFrameErr++;
    if (aByteErr || bByteErr) nByteErr++;
    if (u_b.u_controller.sendData && u_b.u_controller.dataOut[111:104] == 8'h02) bAnswersSent++;
    if (u_a.u_controller.sendData && u_a.u_controller.dataOut[111:104] == 8'h02) aAnswersSent++;
    if (u_a.u_controller.sendData && u_a.u_controller.dataOut[111:104] == 8'h01) nQuestion++;
    if (u_b.u_controller.sendData && u_b.u_controller.dataOut[111:104] == 8'h01) nQuestion++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic inj_byte(input logic [7:0] b, input logic stopBit);
    logic [9:0] bits;
    bits = {stopBit, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      injLine = bits[i];
      repeat (LO) @(posedge clk);
    end
    injLine = 1;
    repeat (2) @(posedge clk);
  endtask

  task automatic inj_frame(input logic [127:0] f, input int n);
    for (int i = 0; i < n; i++) inj_byte(f[127 - 8*i -: 8], 1'b1);
  endtask

  task automatic wait_for(ref logic sig, input int maxCycles, output int took);
    took = 0;
    while (!sig && took < maxCycles) begin @(posedge clk); took++; end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk); failures++;  // watchdog
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int took, e0, b0, s0;
    logic [127:0] f;
    repeat (5) @(posedge clk);
    rst = 0;
    aDigIn = 16'h0200;                       // A's digital 9 is 1
    bDigIn = 16'h0001;
    bAnaIn = 64'h1111_2222_0000_4444;
    repeat (10) @(posedge clk);

    // 1. A asks B; B defers until its inputs match
    @(negedge clk);
    aAskVars = 24'h02_0004; aAskDig = 16'h0004; aAskAna = 64'h0000_0000_00C8_0000; aAskValid = 1;
    @(negedge clk); aAskValid = 0;
    wait_for(u_b.u_controller.qValid, 2 * FRAME_CYCLES, took);
    check(u_b.u_controller.qValid, "B stored the question");
    check(took >= FRAME_CYCLES - LO / 2 && took <= FRAME_CYCLES - LO / 2 + 16 * 8,
          $sformatf("question frame took %0d cycles", took));
    repeat (FRAME_CYCLES / 4) @(posedge clk);
    check(bAnswersSent == 0 && aAskPending, "B waits while the condition is false");
    if (bAnswersSent == 0) nDeferred++;
    @(negedge clk);
    bDigIn = 16'h0005;
    bAnaIn = 64'h1111_2222_00C8_4444;
    wait_for(aAskDone, 2 * FRAME_CYCLES, took);
    check(aAskDone, "A got its answer");
    check(took >= FRAME_CYCLES - LO / 2 && took <= FRAME_CYCLES - LO / 2 + 16 * 8 + 10,
          $sformatf("answer took %0d cycles", took));
    repeat (3) @(posedge clk);
    check(!aAskPending, "A ask closed");
    check(aDigOut == 16'h0005 && aAnaOut == 64'h1111_2222_00C8_4444, "A outputs show B's states");
    check(bAnswersSent == 1, "one answer from B");

    // 2. B asks about A's digital 9, already true
    @(negedge clk);
    bAskVars = 24'h00_0200; bAskDig = 16'h0200; bAskAna = 0; bAskValid = 1;
    @(negedge clk); bAskValid = 0;
    wait_for(bAskDone, 3 * FRAME_CYCLES, took);
    check(bAskDone, "B got its answer");
    check(took <= 2 * FRAME_CYCLES + 100, $sformatf("question and answer took %0d cycles", took));
    if (bAskDone) nImmediate++;
    repeat (3) @(posedge clk);
    check(bDigOut == 16'h0200, "B outputs show A's states");

    // 3. injected traffic into B
    repeat (100) @(posedge clk);
    inject = 1;
    e0 = nFrameErr;
    f = make_frame(8'h01, 24'h00_0001, 16'h0001, 64'h0);
    f[7:0] = ~f[7:0];
    inj_frame(f, 16);
    repeat (5) @(posedge clk);
    check(nFrameErr == e0 + 1 && bErrCnt == 1, "CRC error detected");
    f = {8'd5, 8'h01, 8'h00, 8'h00, 8'h01, 96'h0};
    f[87:80] = ref_crc(f, 4);
    inj_frame(f, 5);
    repeat (5) @(posedge clk);
    check(nFrameErr == e0 + 2 && bErrCnt == 2, "length error detected");
    b0 = nByteErr;
    inj_byte(8'h10, 1'b1);                    // start of a frame ...
    inj_byte(8'h55, 1'b0);                    // ... broken by a framing error
    repeat (LO) @(posedge clk);
    check(nByteErr == b0 + 1, "framing error detected");
    s0 = bAnswersSent;
    inj_frame(make_frame(8'h01, 24'h00_0100, 16'h0100, 64'h0), 16);   // digital 8 not B's
    repeat (FRAME_CYCLES / 2) @(posedge clk);
    check(bAnswersSent == s0 && !u_b.u_controller.qValid, "foreign question ignored");
    if (bAnswersSent == s0) nIgnored++;

    // 4. a good question after the errors is answered (digital 0 is 1 on B)
    inj_frame(make_frame(8'h01, 24'h00_0001, 16'h0001, 64'h0), 16);
    repeat (100) @(posedge clk);
    check(bAnswersSent == s0 + 1, "good question answered after errors");
    inject = 0;
    repeat (FRAME_CYCLES + 4000) @(posedge clk);   // B's answer reaches A
    check(aDigOut == 16'h0005, "A sees B's answer to the injected question");

    check(nQuestion == 2, $sformatf("questions sent %0d", nQuestion));
    check(nDeferred >= 1, "deferred answer happened");
    check(nImmediate >= 1, "immediate answer happened");
    check(nAskDone >= 2, $sformatf("asks completed %0d", nAskDone));
    check(nAnswerSeen >= 3, $sformatf("answers seen %0d", nAnswerSeen));
    check(nFrameErr >= 2, $sformatf("frame errors %0d", nFrameErr));
    check(nByteErr >= 1, $sformatf("byte errors %0d", nByteErr));
    check(nIgnored >= 1, "foreign question ignored at least once");
    check(aErrCnt == 0, "no errors on the clean direction");
    $display("mechanisms: questions=%0d deferred=%0d immediate=%0d askDone=%0d answersSeen=%0d frameErr=%0d byteErr=%0d ignored=%0d cycles=%0d",
             nQuestion, nDeferred, nImmediate, nAskDone, nAnswerSeen, nFrameErr, nByteErr, nIgnored, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
