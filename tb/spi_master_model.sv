// spi_master_model: behavioural model of the host computer's SPI master
// (mode 0, MSB first). SCLK period SCLK_NS (default 256 ns: a 500 MHz clock
// divided by 128). xfer() sends nbytes bytes from tx and returns the bytes
// read from MISO in rx, framed by cs_n.
module spi_master_model #(
  parameter real SCLK_NS = 256.0
) (
  output logic sclk,
  output logic cs_n,
  output logic mosi,
  input  logic miso
);
  initial begin
    sclk = 1'b0;
    cs_n = 1'b1;
    mosi = 1'b0;
  end

  task automatic xfer(input int nbytes, input logic [7:0] tx [65],
                      output logic [7:0] rx [65]);
    cs_n = 1'b0;
    #(SCLK_NS);
    for (int b = 0; b < nbytes; b++) begin
      for (int i = 7; i >= 0; i--) begin
        mosi = tx[b][i];
        #(SCLK_NS / 2);
        sclk = 1'b1;
        if (b < 65) rx[b][i] = miso;
        #(SCLK_NS / 2);
        sclk = 1'b0;
      end
    end
    #(SCLK_NS);
    cs_n = 1'b1;
    #(SCLK_NS);
  endtask
endmodule
