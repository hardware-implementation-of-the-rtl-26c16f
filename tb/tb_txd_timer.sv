// tb_txd_timer: checks that the transmit bit tick comes LO_DIV cycles after loRst is released
// and every LO_DIV cycles after that, and never while loRst is high. loRst changes between
// clock edges here; in the design it comes from a register, one edge earlier, so the first tick
// is seen one cycle sooner after the change than the period.
module tb_txd_timer;
  localparam int LO = 10;
  logic clk = 0, loRst = 1, clkLo;
  int checks = 0, failures = 0;

  txd_timer #(.LO_DIV(LO)) dut (.clkMain(clk), .loRst, .clkLo);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++;  // watchdog
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int gap;
    repeat (5) begin @(negedge clk); check(!clkLo, "no tick in reset"); end
    for (int rep = 0; rep < 4; rep++) begin
      loRst = 0;
      gap = 0;
      for (int n = 0; n < 4 + rep; n++) begin
        do begin @(negedge clk); gap++; end while (!clkLo);
        check(gap == (n == 0 ? LO - 1 : LO), $sformatf("clkLo gap %0d", gap));
        gap = 0;
      end
      @(negedge clk) loRst = 1;
      repeat (LO + rep) begin @(negedge clk); check(!clkLo, "tick in reset"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
