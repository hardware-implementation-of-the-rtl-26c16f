// tb_controller: drives parsed frames and local states into the controller and checks what it
// sends. A model transmitter raises txBusy the cycle after sendData for a few cycles.
// Checked: an owned question is answered only once the local states reach the asked ones, with
// the question's VARS and the local states; a question naming a variable the module does not own
// is never answered; a later question replaces a stored one; a local ask goes out as a QUESTION
// and an ANSWER covering it ends askPending with askDone; answers land on IO_Port; errors are
// counted; an answer due has priority over a queued question.
module tb_controller;
  logic clk = 0, rst = 1;
  logic [7:0] func = 0;
  logic [23:0] vars = 0, ownVars = 0, askVars = 0;
  logic [15:0] digitalIO = 0, localDigital = 0, askDigital = 0;
  logic [63:0] analogIO = 0, localAnalog = 0, askAnalog = 0;
  logic frameValid = 0, error = 0, askValid = 0, txBusy = 0;
  logic askReady, askPending, askDone, sendData, answerSeen;
  logic [111:0] dataOut;
  logic [103:0] IO_Port;
  logic [7:0] errorCount;
  int checks = 0, failures = 0;
  int busyLeft = 0, nDone = 0;
  logic [111:0] sent [$];

  controller dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (sendData) begin
      if (txBusy) begin failures++; $display("FAIL sendData while busy"); end
      sent.push_back(dataOut);
      txBusy   <= 1;
      busyLeft <= $urandom_range(2, 6);
    end else if (busyLeft > 1) busyLeft <= busyLeft - 1;
    else begin busyLeft <= 0; txBusy <= 0; end
    if (askDone) nDone++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic frame_in(input logic [7:0] f, input logic [23:0] v, input logic [15:0] d,
                          input logic [63:0] a);
    @(negedge clk); func = f; vars = v; digitalIO = d; analogIO = a; frameValid = 1;
    @(negedge clk); frameValid = 0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++;  // watchdog
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] a;
    repeat (3) @(negedge clk);
    rst = 0;
    ownVars = 24'h0F_00FF;     // digital 0..7 and analog 0..3
    localDigital = 16'h0000;
    localAnalog  = 64'h0;

    // 1. question on digital 1 and 3 == 1, analog 2 == 0x1234; not yet true
    a = 64'h0000_1234_0000_0000;
    frame_in(8'h01, 24'h04_000A, 16'h000A, a);
    idle(20);
    check(sent.size() == 0, "no answer before condition");
    localDigital = 16'h0002; idle(10);
    check(sent.size() == 0, "no answer with one bit met");
    localDigital = 16'h800A; idle(10);
    check(sent.size() == 0, "no answer without the analog word");
    localAnalog = 64'h5555_1234_0000_9999;
    idle(3);
    check(sent.size() == 1, "answer once condition met");
    if (sent.size() == 1)
      check(sent[0] == {8'h02, 24'h04_000A, 16'h800A, 64'h5555_1234_0000_9999}, "answer contents");
    idle(20);
    check(sent.size() == 1, "answered only once");

    // 2. question naming a variable not owned (digital 9)
    sent.delete();
    frame_in(8'h01, 24'h00_0200, 16'h0000, 64'h0);
    idle(20);
    check(sent.size() == 0, "foreign variable not answered");

    // 3. a later question replaces the stored one
    localDigital = 16'h0000;
    frame_in(8'h01, 24'h00_0001, 16'h0001, 64'h0);
    frame_in(8'h01, 24'h00_0010, 16'h0010, 64'h0);
    idle(5);
    localDigital = 16'h0001; idle(10);
    check(sent.size() == 0, "replaced question not answered");
    localDigital = 16'h0011; idle(5);
    check(sent.size() == 1 && sent[0][103:80] == 24'h00_0010, "new question answered");

    // 4. already true question answered at once
    sent.delete();
    frame_in(8'h01, 24'h00_0001, 16'h0001, 64'h0);
    idle(3);
    check(sent.size() == 1 && sent[0][111:104] == 8'h02, "immediate answer");

    // 5. local ask goes out as a question; answers update IO_Port and end the ask
    sent.delete();
    @(negedge clk);
    check(askReady, "ask ready");
    askVars = 24'h00_3000; askDigital = 16'h3000; askAnalog = 64'h0; askValid = 1;
    @(negedge clk); askValid = 0;
    idle(15);
    check(sent.size() == 1 && sent[0] == {8'h01, 24'h00_3000, 16'h3000, 64'h0}, $sformatf("question sent %0d %h", sent.size(), sent.size() > 0 ? sent[0] : 0));
    check(askPending, "ask pending");
    frame_in(8'h02, 24'h00_1000, 16'h1000, 64'hAAAA);   // covers only part
    idle(1);
    check(IO_Port == {24'h00_1000, 16'h1000, 64'hAAAA}, "IO_Port from answer");
    check(askPending && nDone == 0, "partial answer leaves ask pending");
    frame_in(8'h02, 24'h00_3000, 16'h3000, 64'hBBBB);
    idle(1);
    check(!askPending && nDone == 1, "answer ends ask");
    check(IO_Port == {24'h00_3000, 16'h3000, 64'hBBBB}, "IO_Port updated");

    // 6. answer due has priority over a queued ask
    sent.delete();
    localDigital = 16'h0000;
    frame_in(8'h01, 24'h00_0004, 16'h0004, 64'h0);
    txBusy = 1; busyLeft = 10;
    askVars = 24'h00_0100; askDigital = 16'h0100; askValid = 1;
    @(negedge clk); askValid = 0;
    localDigital = 16'h0004;
    idle(30);
    check(sent.size() == 2, $sformatf("two frames sent (%0d)", sent.size()));
    if (sent.size() == 2)
      check(sent[0][111:104] == 8'h02 && sent[1][111:104] == 8'h01, "answer first");

    // 7. errors counted
    for (int i = 0; i < 5; i++) begin
      @(negedge clk) error = 1; @(negedge clk) error = 0;
    end
    idle(1);
    check(errorCount == 5, $sformatf("errorCount %0d", errorCount));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
