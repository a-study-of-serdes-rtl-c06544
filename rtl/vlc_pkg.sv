// vlc_pkg: constants shared by the 8B13B visible-light SerDes.
//
// The packet on the light path is: a preamble of alternating 1/0 bits, four
// start bits (1111 when the payload is valid, 0000 when it is not), 65 data
// bytes each sent as a 13-bit 8B13B codeword, and a 16-bit CRC-16-CCITT in
// which every CRC bit is sent as three line bits (0 -> 001, 1 -> 010).
// With a 36-bit preamble this is 933 bits; at 160 ns per bit one packet
// takes 149.28 us, which carries 65 bytes (3.48 Mbit/s while sending).
//
// Sizes, the CRC polynomial, the 160 ns bit time (1/16 of 100 MHz), the
// 640 ns timing tick, the 38600 tick frame and the request/start ticks
// (1 and 11000) follow the published design. The CRC preset (all ones) and
// the single 100 MHz clock for the whole logic are this design's choices.
// CODE_TABLE, the 8B13B table, is computed here at elaboration from its rule
// (see build_code_table); the rule matches the published entries 0 to 5.
package vlc_pkg;

  localparam int unsigned CLK_HZ         = 100_000_000; // logic clock
  localparam int unsigned BIT_CYCLES     = 16;          // 160 ns per line bit
  localparam int unsigned CODE_BITS      = 13;          // 8B13B codeword
  localparam int unsigned PAYLOAD_BYTES  = 65;          // bytes per packet
  localparam int unsigned PREAMBLE_BITS  = 36;          // preamble of a packet
  localparam int unsigned START_BITS     = 4;           // 1111 or 0000
  localparam int unsigned CRC_BITS       = 16;
  localparam int unsigned CRC_LINE_BITS  = 3 * CRC_BITS; // 1B3B coded CRC
  localparam int unsigned DATA_BITS      = CODE_BITS * PAYLOAD_BYTES; // 845
  localparam int unsigned PACKET_BITS    =
      PREAMBLE_BITS + START_BITS + DATA_BITS + CRC_LINE_BITS;       // 933

  localparam logic [15:0] CRC_POLY = 16'h1021;  // x^16 + x^12 + x^5 + 1
  localparam logic [15:0] CRC_INIT = 16'hFFFF;

  localparam int unsigned PULSE_CYCLES   = 13;     // 130 ns shaped pulse
  localparam int unsigned TICK_CYCLES    = 64;     // 640 ns timing tick
  localparam int unsigned COUNT_MAX      = 38600;  // ticks per frame period
  localparam int unsigned REQ_AT         = 1;      // tick of data_req
  localparam int unsigned START_AT       = 11000;  // tick of start (~7 ms)

  // Rising-edge form of a codeword, as a receiver that sees only positive
  // edges reads it: bit i (bit 12 is sent first) is 1 when the line goes
  // from 0 to 1 there.
  function automatic logic [CODE_BITS-1:0] edge_form(input logic [CODE_BITS-1:0] w);
    return w & ~(w >> 1);
  endfunction

  typedef logic [255:0][CODE_BITS-1:0] code_table_t;

  // The 8B13B table, computed when the design is elaborated. Among all
  // 13-bit words with a leading 0 and six 1s, keep for each rising-edge form
  // the numerically largest word (a descending scan keeps the first word of
  // each form). The kept words in ascending order, starting at
  // 0001010110101, are the codewords of the byte values 0, 1, 2, ... 255.
  function automatic code_table_t build_code_table();
    logic [4095:0]        seen;
    logic [4095:0]        keep;
    logic [CODE_BITS-1:0] w;
    logic [11:0]          e;
    code_table_t          t;
    int                   n;
    seen = '0;
    keep = '0;
    t    = '0;
    for (int i = 4095; i >= 0; i--) begin
      w = CODE_BITS'(i);
      e = 12'(edge_form(w));  // bit 12 of w is 0
      if ($countones(w) == 6 && !seen[e]) begin
        seen[e]            = 1'b1;
        keep[i]            = 1'b1;
      end
    end
    n = 0;
    for (int i = 'h02B5; i < 4096; i++) begin  // 0001010110101
      if (keep[i] && n < 256) begin
        t[n] = CODE_BITS'(i);
        n++;
      end
    end
    return t;
  endfunction

  localparam code_table_t CODE_TABLE = build_code_table();

endpackage
