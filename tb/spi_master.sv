// spi_master: testbench SPI master for the monitor's control port. Sends
// one 16-bit mode-0 frame {rw, addr[2:0], data[11:0]} MSB first with a
// half period of HALF ps and returns the 12 bits read on miso during the
// data phase (sampled on rising sclk edges).
`timescale 1ps/1ps
module spi_master #(
  parameter int HALF = 100000
) (
  output logic sclk,
  output logic cs_n,
  output logic mosi,
  input  logic miso
);
  initial begin sclk = 0; cs_n = 1; mosi = 0; end

  task automatic xfer(input logic rw, input logic [2:0] addr, input logic [11:0] wdata,
                      output logic [11:0] rdata);
    logic [15:0] frame;
    frame = {rw, addr, wdata};
    rdata = '0;
    cs_n = 0;
    #HALF;
    for (int i = 15; i >= 0; i--) begin
      mosi = frame[i];
      #HALF sclk = 1;
      if (i < 12) rdata[i] = miso;
      #HALF sclk = 0;
    end
    #HALF cs_n = 1;
    #(4*HALF);
  endtask
endmodule
