// tb_txd: sends bytes through the transmitter (with its timer) and decodes the line.
// Each bit must last exactly LO_DIV cycles: start low, eight data bits LSB first, stop high.
// busy must be high for exactly 10 bit times, and send while busy must be ignored.
module tb_txd;
  localparam int LO = 8;
  logic clk = 0, rst = 1, send = 0;
  logic [7:0] data = 0;
  logic clkLo, loRst, TxD, busy;
  int checks = 0, failures = 0;

  txd_timer #(.LO_DIV(LO)) u_timer (.clkMain(clk), .loRst, .clkLo);
  txd dut (.clk, .rst, .clkLo, .send, .data, .TxD, .loRst, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++;  // watchdog
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] b;
    logic [9:0] expect_bits;
    int busyCycles;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    check(TxD == 1'b1 && !busy && loRst, "idle line high");
    for (int n = 0; n < 30; n++) begin
      b = (n == 0) ? 8'h01 : 8'($urandom);
      expect_bits = {1'b1, b, 1'b0};
      @(negedge clk); data = b; send = 1;
      @(negedge clk); send = 0; data = ~b;
      // now in the first cycle of the start bit
      busyCycles = 0;
      for (int i = 0; i < 10; i++) begin
        for (int c = 0; c < LO; c++) begin
          check(TxD == expect_bits[i], $sformatf("byte %h bit %0d cycle %0d", b, i, c));
          if (busy) busyCycles++;
          if (i == 4 && c == 2) begin send = 1; end  // must be ignored
          @(negedge clk);
          send = 0;
        end
      end
      check(!busy && TxD, "idle after stop bit");
      check(busyCycles == 10 * LO, $sformatf("busy for %0d cycles", busyCycles));
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(TxD == 1'b1, "line stays idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
