// decode8b13b: turns the received rising-edge patterns of a packet back into
// bytes.
//
// data_in holds NBYTES 13-bit edge patterns, the first codeword in the top
// bits. After a one-clock start pulse the module decodes one codeword per
// clock: the pattern is compared with the rising-edge form of all 256 table
// words at once, and the index of the match is the byte. When all NBYTES are
// done, strobe pulses for one clock; data_out then holds the bytes (byte 0
// first) and code_err is 1 if any pattern matched no table word (that byte
// reads 0). Latency NBYTES + 1 clocks.
// The start/strobe handshake and decoding from positive edges follow the
// published design; the table is CODE_TABLE of vlc_pkg, as in enc8b13b.
module decode8b13b
  import vlc_pkg::*;
#(
  parameter int unsigned NBYTES   = PAYLOAD_BYTES
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [NBYTES*CODE_BITS-1:0]   data_in,
  output logic [NBYTES-1:0][7:0]        data_out,
  output logic                          strobe,
  output logic                          code_err
);

  localparam int IW = $clog2(NBYTES + 1);

  logic                 busy;
  logic [IW-1:0]        idx;
  logic [CODE_BITS-1:0] pat;
  logic                 hit;
  logic [7:0]           val;

  assign pat = data_in[NBYTES*CODE_BITS - 1 - int'(idx) * CODE_BITS -: CODE_BITS];

  always_comb begin
    hit = 1'b0;
    val = '0;
    for (int i = 0; i < 256; i++) begin
      if (edge_form(CODE_TABLE[i]) == pat) begin
        hit = 1'b1;
        val = 8'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      idx      <= '0;
      data_out <= '0;
      strobe   <= 1'b0;
      code_err <= 1'b0;
    end else begin
      strobe <= 1'b0;
      if (start) begin
        busy     <= 1'b1;
        idx      <= '0;
        code_err <= 1'b0;
      end else if (busy) begin
        data_out[idx] <= val;
        if (!hit) code_err <= 1'b1;
        if (idx == IW'(NBYTES - 1)) begin
          busy   <= 1'b0;
          strobe <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
