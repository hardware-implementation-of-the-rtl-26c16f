// tb_cloudbus_pkg: reference models shared by the CloudBus testbenches.
//
// The frame CRC is recomputed here bit by bit as a shift register (polynomial x^8+x^2+x+1,
// initial value 0, message bits in order, most significant bit of each byte first), a form
// independent of the byte-wise function in the design. make_frame builds a complete frame from
// its fields the same way a remote module would.
package tb_cloudbus_pkg;

  function automatic logic [7:0] ref_crc(input logic [127:0] f, input int nbytes);
    logic [7:0] r;
    logic       fb;
    r = 8'h00;
    for (int i = 0; i < nbytes * 8; i++) begin
      fb = r[7] ^ f[127 - i];
      r  = {r[6:0], 1'b0};
      if (fb) r = r ^ 8'h07;
    end
    return r;
  endfunction

  function automatic logic [127:0] make_frame(input logic [7:0] func, input logic [23:0] vars,
                                              input logic [15:0] dig, input logic [63:0] ana);
    logic [127:0] f;
    f = {8'd16, func, vars, dig, ana, 8'h00};
    f[7:0] = ref_crc(f, 15);
    return f;
  endfunction

endpackage
