// io_ports: the end module's digital and analog I/O registers.
//
// Inputs. The 16 digital input pins pass through two flip-flops each (they are asynchronous to
// the clock) and become localDigital, the states the controller compares with questions and
// reports in answers. The four 16-bit analog input words, from an external converter, are
// registered once into localAnalog.
// Outputs. The controller's IO_Port holds the variable states last reported by other modules as
// {vars, digital, analog}. Its digital and analog parts are registered onto the digital output
// pins and the four 16-bit analog output words (for an external converter).
//
// Interface and timing: localDigital lags the pins by two cycles, localAnalog by one; the
// outputs lag IO_Port by one cycle. Everything resets to zero. The VARS part of IO_Port
// (bits 103:80) is not used here: it says which variables the last answer was about, which the
// pins do not need; it stays on the port so the controller's IO_Port connects whole.
//
// From the document: an I/O PORTS block between the controller and 16 digital and 4 analog
// (16-bit) inputs/outputs. Its insides are not described; this design's own choices are the
// separate input and output pins, the synchroniser and the mapping of IO_Port onto the outputs.
module io_ports
  import cloudbus_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [DIG_W-1:0]     digitalIn,
  input  logic [ANA_W-1:0]     analogIn,
  output logic [DIG_W-1:0]     digitalOut,
  output logic [ANA_W-1:0]     analogOut,
  output logic [DIG_W-1:0]     localDigital,
  output logic [ANA_W-1:0]     localAnalog,
  input  logic [IO_PORT_W-1:0] IO_Port
);
  logic [DIG_W-1:0] digitalMeta;

  always_ff @(posedge clk) begin
    if (rst) begin
      digitalMeta  <= '0;
      localDigital <= '0;
      localAnalog  <= '0;
      digitalOut   <= '0;
      analogOut    <= '0;
    end else begin
      digitalMeta  <= digitalIn;
      localDigital <= digitalMeta;
      localAnalog  <= analogIn;
      digitalOut   <= IO_Port[ANA_W +: DIG_W];
      analogOut    <= IO_Port[ANA_W-1:0];
    end
  end

endmodule
