// tb_io_ports: checks the I/O registers' latencies and mapping.
// Digital pins must reach localDigital two cycles later, analog inputs localAnalog one cycle
// later, and the digital and analog parts of IO_Port the output pins one cycle later.
module tb_io_ports;
  logic clk = 0, rst = 1;
  logic [15:0] digitalIn = 0, digitalOut, localDigital;
  logic [63:0] analogIn = 0, analogOut, localAnalog;
  logic [103:0] IO_Port = 0;
  int checks = 0, failures = 0;

  io_ports dut (.clk, .rst, .digitalIn, .analogIn, .digitalOut, .analogOut, .localDigital,
                .localAnalog, .IO_Port);

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
    logic [15:0] hist [0:49];
    logic [63:0] a;
    logic [103:0] p;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 50; n++) begin
      digitalIn = 16'($urandom);
      analogIn  = {$urandom, $urandom};
      IO_Port   = {8'($urandom), $urandom, $urandom, $urandom};
      a = analogIn; p = IO_Port; hist[n] = digitalIn;
      @(negedge clk);
      check(localAnalog == a, "analog input one cycle");
      check(digitalOut == p[79:64] && analogOut == p[63:0], "outputs one cycle");
      if (n > 0) check(localDigital == hist[n-1], "digital input two cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
