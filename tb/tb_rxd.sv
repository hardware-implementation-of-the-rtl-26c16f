// tb_rxd: drives serial bytes into the receiver (with its timer) and checks what comes out.
// Random bytes must arrive intact with one received pulse each; a byte with a low stop bit must
// give one error pulse and no received pulse; a short low glitch on an idle line must give
// nothing. The bit time is 16 cycles, sampling every 2 cycles.
module tb_rxd;
  localparam int HI = 2, LO = 16;
  logic clk = 0, rst = 1, RxD = 1;
  logic clkHi, clkLo, loRst, error, received;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int nRecv = 0, nErr = 0;
  logic [7:0] lastData;

  rxd_timer #(.HI_DIV(HI), .LO_DIV(LO)) u_timer (.clkMain(clk), .hiRst(rst), .loRst, .clkHi, .clkLo);
  rxd dut (.clk, .rst, .clkHi, .clkLo, .RxD, .loRst, .error, .data, .received);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (received) begin nRecv++; lastData = data; end
    if (error) nErr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_byte(input logic [7:0] b, input logic stopBit);
    logic [9:0] bits;
    bits = {stopBit, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      RxD = bits[i];
      repeat (LO) @(posedge clk);
    end
    RxD = 1;
    repeat (LO) @(posedge clk);
  endtask

  initial begin
    repeat (300000) @(posedge clk); failures++;  // watchdog
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int r0, e0;
    logic [7:0] b;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (10) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      b = (n < 2) ? (n == 0 ? 8'h00 : 8'hFF) : 8'($urandom);
      r0 = nRecv; e0 = nErr;
      send_byte(b, 1'b1);
      check(nRecv == r0 + 1 && nErr == e0, $sformatf("one received pulse for %h", b));
      check(lastData == b, $sformatf("data %h expected %h", lastData, b));
      check(data == b, "data holds the byte");
    end
    // framing error: stop bit low
    for (int n = 0; n < 5; n++) begin
      r0 = nRecv; e0 = nErr;
      send_byte(8'($urandom), 1'b0);
      repeat (3 * LO) @(posedge clk);
      check(nErr == e0 + 1 && nRecv == r0, "framing error flagged");
      check(data == lastData, "data kept after error");
    end
    // glitch shorter than half a bit
    r0 = nRecv; e0 = nErr;
    RxD = 0; repeat (3) @(posedge clk); RxD = 1;
    repeat (20 * LO) @(posedge clk);
    check(nRecv == r0 && nErr == e0, "glitch ignored");
    check(loRst == 1'b1, "timer stopped when idle");
    // a good byte still arrives after the glitch
    send_byte(8'hA5, 1'b1);
    check(nRecv == r0 + 1 && lastData == 8'hA5, "byte after glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
