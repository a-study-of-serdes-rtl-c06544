// crc16_ccitt: bit-serial CRC-16-CCITT over a LEN-bit vector.
//
// A one-clock start pulse loads the register with INIT and the module then
// takes one bit of data_in per clock, data_in[LEN-1] first. After LEN clocks
// result holds the CRC and strobe pulses for one clock; result keeps its value
// until the next start. data_in must stay stable while busy is high.
// Generator x^16 + x^12 + x^5 + 1 (17'b1_0001_0000_0010_0001) as published;
// the all-ones preset is this design's choice. Because the register update is
// linear, crc(d ^ e) = crc(d) ^ crc_with_zero_preset(e), which the error
// correction of the receiver relies on.
module crc16_ccitt
  import vlc_pkg::*;
#(
  parameter int unsigned LEN  = DATA_BITS,
  parameter logic [15:0] POLY = CRC_POLY,
  parameter logic [15:0] INIT = CRC_INIT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [LEN-1:0] data_in,
  output logic [15:0]    result,
  output logic           strobe,
  output logic           busy
);

  localparam int IW = $clog2(LEN + 1);

  logic [IW-1:0] left;    // bits still to take
  logic          fb;

  assign fb = result[15] ^ data_in[left - 1'b1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0;
      left   <= '0;
      busy   <= 1'b0;
      strobe <= 1'b0;
    end else begin
      strobe <= 1'b0;
      if (start) begin
        result <= INIT;
        left   <= IW'(LEN);
        busy   <= 1'b1;
      end else if (busy) begin
        result <= {result[14:0], 1'b0} ^ (fb ? POLY : 16'h0000);
        left   <= left - 1'b1;
        if (left == IW'(1)) begin
          busy   <= 1'b0;
          strobe <= 1'b1;
        end
      end
    end
  end

endmodule
