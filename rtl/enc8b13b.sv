// enc8b13b: 8B13B encoder, a 256-entry lookup table.
//
// Every codeword is 13 bits, starts with 0 (so each codeword begins with the
// line low and its first 1 is always a rising edge) and holds exactly six 1s
// (constant mean light level). A receiver that keeps only rising edges must
// still tell all 256 words apart, so no two words share a rising-edge form.
// The table (CODE_TABLE in vlc_pkg, computed at elaboration; bit 12 is sent
// first) follows this rule: among
// all 13-bit words with a leading 0 and six 1s, group the words by their
// rising-edge form and keep the numerically largest word of each group; sort
// the kept words in ascending order; byte value v takes the v-th word counted
// from 0001010110101. This reproduces the published table entries for the
// values 0 to 5 (e.g. 3 -> 0001010111010, received as 0001010100010); the rule
// for the remaining entries is this design's own.
// Purely combinational (a 256 x 13 ROM): code follows data the same clock.
module enc8b13b
  import vlc_pkg::*;
(
  input  logic [7:0]           data,
  output logic [CODE_BITS-1:0] code
);

  assign code = CODE_TABLE[data];

endmodule
