// tb_parser: presents frames to the parser and checks the fields and the verdict.
// Frames are built with the testbench's own CRC model. Good frames must appear on the outputs
// one cycle after inValid with a valid pulse; frames with a flipped bit anywhere in the first
// 15 bytes or in the CRC, or with a CNT other than 16, must pulse error and leave the outputs
// holding the last good frame.
module tb_parser;
  import tb_cloudbus_pkg::*;
  logic clk = 0, rst = 1, inValid = 0;
  logic [127:0] in = 0;
  logic [7:0] func;
  logic [23:0] vars;
  logic [15:0] digitalIO;
  logic [63:0] analogIO;
  logic valid, error;
  int checks = 0, failures = 0;

  parser dut (.clk, .rst, .in, .inValid, .func, .vars, .digitalIO, .analogIO, .valid, .error);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic present(input logic [127:0] f, input bit good, input logic [127:0] last);
    @(negedge clk); in = f; inValid = 1;
    @(negedge clk); inValid = 0; in = '0;
    check(valid == good && error == !good, $sformatf("verdict for %h", f));
    check({func, vars, digitalIO, analogIO} == last[119:8], "fields");
    @(negedge clk);
    check(!valid && !error, "one-cycle pulses");
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++;  // watchdog
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] f, good_f, bad;
    repeat (3) @(negedge clk);
    rst = 0;
    good_f = '0;
    for (int n = 0; n < 60; n++) begin
      f = make_frame(8'($urandom_range(1, 2)), 24'($urandom), 16'($urandom),
                     {$urandom, $urandom});
      present(f, 1, f);
      good_f = f;
      // one flipped bit
      bad = f ^ (128'h1 << $urandom_range(0, 127));
      if (bad[127:120] == 8'd16) present(bad, 0, good_f);
      // wrong length with a CRC that matches it
      bad = f;
      bad[127:120] = 8'($urandom_range(0, 15));
      bad[7:0] = ref_crc(bad, 15);
      present(bad, 0, good_f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
