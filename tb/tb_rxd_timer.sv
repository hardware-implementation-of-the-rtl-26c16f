// tb_rxd_timer: checks the periods and reset behaviour of the receiver's double timer.
// With HI_DIV = 5 and LO_DIV = 12: clkHi every 5 cycles, clkLo first half a bit (6 cycles) after
// loRst is released and every 12 cycles after, and neither tick while its reset is high. The
// resets change between clock edges here; in the design they come from a register, one edge
// earlier, so the first tick is seen one cycle sooner after the change than the period.
module tb_rxd_timer;
  localparam int HI = 5, LO = 12;
  logic clk = 0, hiRst = 1, loRst = 1, clkHi, clkLo;
  int checks = 0, failures = 0;

  rxd_timer #(.HI_DIV(HI), .LO_DIV(LO)) dut (.clkMain(clk), .hiRst, .loRst, .clkHi, .clkLo);

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
    repeat (3) @(posedge clk);
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); check(!clkHi && !clkLo, "no tick in reset");
    end
    // high-rate ticks
    @(negedge clk) hiRst = 0;
    gap = 0;
    for (int n = 0; n < 6; n++) begin
      do begin @(negedge clk); gap++; end while (!clkHi);
      check(gap == (n == 0 ? HI - 1 : HI), $sformatf("clkHi period %0d", gap));
      gap = 0;
    end
    // low-rate ticks: first after LO/2 cycles, then every LO
    for (int rep = 0; rep < 3; rep++) begin
      loRst = 0;
      gap = 0;
      for (int n = 0; n < 5; n++) begin
        do begin @(negedge clk); gap++; end while (!clkLo);
        check(gap == (n == 0 ? LO / 2 - 1 : LO), $sformatf("clkLo gap %0d at tick %0d", gap, n));
        gap = 0;
      end
      @(negedge clk) loRst = 1;
      repeat (2 * LO) begin @(negedge clk); check(!clkLo, "clkLo in reset"); end
    end
    @(negedge clk) hiRst = 1;
    repeat (2 * HI) begin @(negedge clk); check(!clkHi, "clkHi in reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
