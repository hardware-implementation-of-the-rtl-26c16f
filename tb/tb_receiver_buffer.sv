// tb_receiver_buffer: feeds bytes with gaps into the receiver buffer.
// Full 16-byte frames must come out whole, first byte on top, with one ready pulse one cycle
// after the last byte and out held until the next frame. A frame whose CNT is 3 must end after
// 3 bytes with the rest zero; CNT 0 is taken as 16; reset mid-frame restarts on the next byte.
module tb_receiver_buffer;
  logic clk = 0, reset = 1, inValid = 0;
  logic [7:0] in = 0;
  logic [127:0] out;
  logic ready;
  int checks = 0, failures = 0;
  int nReady = 0;

  receiver_buffer dut (.clk, .reset, .in, .inValid, .out, .ready);

  always #5 clk = ~clk;
  always @(posedge clk) if (ready) nReady++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Sends n bytes of f (top first); checks ready comes exactly one cycle after the last.
  task automatic push(input logic [127:0] f, input int n, input bit expectFrame);
    int r0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk); in = f[127 - 8*i -: 8]; inValid = 1;
      @(negedge clk); inValid = 0; in = 8'($urandom);
      if (i < n - 1 || !expectFrame) check(!ready, "no early ready");
      else check(ready, "ready one cycle after last byte");
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++;  // watchdog
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] f, prev;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int n = 0; n < 10; n++) begin
      f = {8'd16, 120'({$urandom, $urandom, $urandom, $urandom})};
      push(f, 16, 1);
      check(out == f, $sformatf("frame %0d", n));
      prev = f;
    end
    // out held while the next frame arrives
    f = {8'd16, 120'({$urandom, $urandom, $urandom, $urandom})};
    push(f, 7, 0);
    check(out == prev, "out held during next frame");
    push(f << 56, 9, 1);
    check(out == f, "frame completed after a pause");
    // short frame
    @(negedge clk) reset = 1; @(negedge clk) reset = 0;
    f = {8'd3, 8'hAB, 8'hCD, 104'h0};
    push(f | 128'hFFFF, 3, 1);
    check(out == f, "short frame of 3 bytes");
    // CNT 0 taken as 16
    f = {8'd0, 120'({$urandom, $urandom, $urandom, $urandom})};
    push(f, 16, 1);
    check(out == f, "CNT 0 frame");
    // reset mid frame
    f = {8'd16, 120'({$urandom, $urandom, $urandom, $urandom})};
    push(f, 5, 0);
    @(negedge clk) reset = 1; @(negedge clk) reset = 0;
    check(out == 128'h0, "reset clears out");
    push(f, 16, 1);
    check(out == f, "frame after reset");
    check(nReady == 14, $sformatf("ready pulses %0d", nReady));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
