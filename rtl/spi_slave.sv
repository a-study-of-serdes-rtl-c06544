// spi_slave: SPI slave port towards the host computer (the host is master).
//
// Mode 0 (clock idle low, data sampled on the rising SCLK edge, changed on
// the falling edge), most significant bit first. SCLK, CS_N and MOSI are
// brought into the clk domain by two-flop synchronisers and their edges are
// detected there, so SCLK must be well below clk/4 (the host runs it at
// 500 MHz / 128 = 3.9 MHz against a 100 MHz clk).
// While CS_N is low every byte shifted in on MOSI is stored in rx_bytes
// (byte 0 first) and tx_bytes is shifted out on MISO in the same order.
// When CS_N rises after exactly NBYTES bytes, frame_ok pulses for one clock;
// a shorter or longer frame gives frame_bad instead.
//
// The published design only states that payloads move over SPI with the FPGA
// as slave; the mode, bit order and framing by CS_N are this design's choices.
module spi_slave
  import vlc_pkg::*;
#(
  parameter int unsigned NBYTES = PAYLOAD_BYTES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sclk,
  input  logic                   cs_n,
  input  logic                   mosi,
  output logic                   miso,
  input  logic [NBYTES-1:0][7:0] tx_bytes,   // byte i goes out as the i-th byte
  output logic [NBYTES-1:0][7:0] rx_bytes,   // byte i came in as the i-th byte
  output logic                   frame_ok,
  output logic                   frame_bad
);

  localparam int CW = $clog2(NBYTES * 8 + 1);

  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic       sclk_rise, sclk_fall, cs_fall, cs_rise, cs_low;
  logic [CW-1:0] nbits;
  logic [6:0]    sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  assign sclk_rise = sclk_s[1] & ~sclk_s[2];
  assign sclk_fall = ~sclk_s[1] & sclk_s[2];
  assign cs_fall   = ~cs_s[1] & cs_s[2];
  assign cs_rise   = cs_s[1] & ~cs_s[2];
  assign cs_low    = ~cs_s[1];

  // Bit that MISO must show for bit number n of the frame.
  function automatic logic tx_bit(input logic [CW-1:0] n);
    logic [CW-1:0] byte_i;
    byte_i = n >> 3;
    if (byte_i >= CW'(NBYTES)) return 1'b0;
    return tx_bytes[byte_i][3'd7 - n[2:0]];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbits     <= '0;
      sh        <= '0;
      rx_bytes  <= '0;
      miso      <= 1'b0;
      frame_ok  <= 1'b0;
      frame_bad <= 1'b0;
    end else begin
      frame_ok  <= 1'b0;
      frame_bad <= 1'b0;
      if (cs_fall) begin
        nbits <= '0;
        miso  <= tx_bit('0);
      end else if (cs_low && sclk_rise) begin
        sh <= {sh[5:0], mosi_s[1]};
        if (nbits[2:0] == 3'd7 && (nbits >> 3) < CW'(NBYTES))
          rx_bytes[nbits >> 3] <= {sh, mosi_s[1]};
        if (nbits != '1) nbits <= nbits + 1'b1;
      end else if (cs_low && sclk_fall) begin
        miso <= tx_bit(nbits);
      end
      if (cs_rise) begin
        if (nbits == CW'(NBYTES * 8)) frame_ok <= 1'b1;
        else                          frame_bad <= 1'b1;
      end
    end
  end

endmodule
