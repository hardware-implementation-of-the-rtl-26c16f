// tb_transmitter_buffer: checks the frame the transmitter buffer hands to a model sender.
// The model raises txBusy the cycle after readyToSend and holds it for a random number of
// cycles. The 16 bytes collected must be CNT = 16, the payload, and the CRC-8 of the first 15
// bytes (from the testbench's own model); busy must cover the whole frame, and send while busy
// must not disturb it.
module tb_transmitter_buffer;
  import tb_cloudbus_pkg::*;
  logic clk = 0, reset = 1, send = 0, txBusy = 0;
  logic [111:0] data = 0;
  logic [7:0] byteForTransmit;
  logic readyToSend, busy;
  int checks = 0, failures = 0;
  int busyLeft = 0;
  logic [7:0] got [$];

  transmitter_buffer dut (.clk, .reset, .data, .send, .txBusy, .byteForTransmit, .readyToSend,
                          .busy);

  always #5 clk = ~clk;

  // model sender
  always @(posedge clk) begin
    if (readyToSend) begin
      if (txBusy) begin failures++; $display("FAIL readyToSend while sender busy"); end
      got.push_back(byteForTransmit);
      txBusy   <= 1;
      busyLeft <= $urandom_range(1, 12);
    end else if (busyLeft > 1) busyLeft <= busyLeft - 1;
    else begin busyLeft <= 0; txBusy <= 0; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk); failures++;  // watchdog
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [111:0] p;
    logic [127:0] expected, frame;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int n = 0; n < 30; n++) begin
      p = {$urandom, $urandom, $urandom, 16'($urandom)};
      expected = make_frame(p[111:104], p[103:80], p[79:64], p[63:0]);
      got.delete();
      @(negedge clk); data = p; send = 1;
      @(negedge clk); send = 0; data = ~p;
      check(busy, "busy after send");
      repeat (20) @(negedge clk);
      send = 1;                       // ignored while busy
      @(negedge clk); send = 0;
      while (busy) @(negedge clk);
      while (txBusy) @(negedge clk);
      check(got.size() == 16, $sformatf("%0d bytes sent", got.size()));
      for (int i = 0; i < 16; i++) frame[127 - 8*i -: 8] = (i < got.size()) ? got[i] : 8'h00;
      check(frame == expected, $sformatf("frame %h expected %h", frame, expected));
      check(frame[127:120] == 8'd16, "CNT byte");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
