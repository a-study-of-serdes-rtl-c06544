// crc_corrector: locates a single-bit error from a CRC-16 syndrome.
//
// The receiver forms the syndrome S = CRC(received data) xor received CRC.
// S = 0 means no error was detected. A single flipped bit that lies p bits
// before the end of the protected word (p = 0 is the last CRC bit, p = 16 the
// last data bit) gives S = x^p mod g(x), independent of the data and of the
// CRC preset. After a one-clock start pulse the module steps r = x^p mod g
// from p = 0 upward, one p per clock, and stops at the first p with r = S.
// done pulses when the search ends; found and pos then tell whether a single
// error explains S and where. At most NBITS + 1 clocks. CRC-16-CCITT has
// minimum distance 4 for words up to 32767 bits, so no double error is taken
// for a single one.
// The published design uses the CRC for correction and counts corrected
// packets; the search method is this design's choice.
module crc_corrector
  import vlc_pkg::*;
#(
  parameter int unsigned NBITS = DATA_BITS + CRC_BITS,   // protected word
  parameter logic [15:0] POLY  = CRC_POLY
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] syndrome,
  output logic        done,
  output logic        found,
  output logic [$clog2(NBITS)-1:0] pos
);

  localparam int PW = $clog2(NBITS);

  logic        busy;
  logic [15:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      r     <= '0;
      pos   <= '0;
      done  <= 1'b0;
      found <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        r     <= 16'h0001;
        pos   <= '0;
        found <= 1'b0;
      end else if (busy) begin
        if (r == syndrome) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          found <= 1'b1;
        end else if (pos == PW'(NBITS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          r   <= {r[14:0], 1'b0} ^ (r[15] ? POLY : 16'h0000);
          pos <= pos + 1'b1;
        end
      end
    end
  end

endmodule
