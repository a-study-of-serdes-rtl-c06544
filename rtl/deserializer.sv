// deserializer: receive path from the binarised photodetector signal to the
// 65 payload bytes.
//
// Chain: pulse_shaper (130 ns pulse per rising edge) -> dll_cdr (bit clock
// recovery, one bit per 160 ns) -> framing state machine -> CRC check ->
// single-bit correction -> decode8b13b -> output buffer and recv_req.
//
// Framing. Once the loop is locked the state machine watches the preamble
// (alternating bits). Because only rising edges survive the shaper, the start
// bits 1111 look like one more preamble 1 followed by 0s; the raw line level,
// sampled at the same bit strobe, tells them apart: two raw 1s in a row after
// at least PRE_MIN alternating bits mean start bits 1111 (two more start bits
// follow); a missing 1 (two 0 bits in a row) means start bits 0000 (three more
// follow). Then 845 code bits are stored, and the 48 CRC line bits are
// reduced to 16 by taking the middle bit of each triplet (001 -> 0,
// 010 -> 1; a lost pulse in 010 becomes a single CRC bit error).
// A packet whose start bits were 0000 is counted in pkt_discard and dropped.
//
// Checking. crc16_ccitt recomputes the CRC over the 845 edge bits; the
// syndrome is that CRC xor the received one. A nonzero syndrome increments
// num_error and starts crc_corrector; if one flipped bit explains the
// syndrome, that bit is inverted and the packet goes on. decode8b13b then maps
// each 13-bit edge pattern to a byte. A packet that decodes (after a
// correction or without one) is copied to data_out, raises recv_req (held until
// read_done) and pulses pkt_good; one that was corrected also increments
// num_corr. A packet that cannot be corrected, or holds a pattern that is not
// a codeword, is dropped (a bad pattern without a CRC error also counts in
// num_error).
// With stat_sel high the last four output bytes are replaced by num_error and
// num_corr (most significant byte first), so the host can read the counters.
//
// Processing time after the last line bit: about 845 + 862 + 66 clocks,
// under 18 us, far less than the 24.7 ms between packets.
//
// The chain, the 130 ns shaper, the DLL, CRC error detection and correction,
// the start-bit discard rule, num_error/num_corr and the counter read-out
// switch follow the published design. Framing on the raw level, the CRC bit
// reduction, the output buffer and where the counters appear in the payload
// are this design's choices.
module deserializer
  import vlc_pkg::*;
#(
  parameter int unsigned NBYTES  = PAYLOAD_BYTES,
  parameter int unsigned PRE_MIN = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,      // receive mode
  input  logic                   rx_in,       // binarised photodetector signal
  input  logic                   stat_sel,    // error-count read-out switch
  input  logic                   read_done,   // host has read the payload
  output logic [NBYTES-1:0][7:0] data_out,
  output logic                   recv_req,
  output logic [15:0]            num_error,
  output logic [15:0]            num_corr,
  output logic                   pkt_good,    // one clock per delivered packet
  output logic                   pkt_discard, // one clock per 0000 packet
  output logic                   locked,
  output logic                   dll_inc,
  output logic                   dll_dec
);

  localparam int unsigned NDATA = NBYTES * CODE_BITS;
  localparam int unsigned NWORD = NDATA + CRC_BITS;
  localparam int NW = $clog2(NDATA + 1);
  localparam int PW = $clog2(NWORD);

  typedef enum logic [2:0] {S_PRE, S_SKIP, S_DATA, S_CRC, S_CHECK, S_FIX, S_DEC}
    state_t;

  logic raw, shaped, bv, bit_in;

  pulse_shaper u_shaper (.clk, .rst_n, .din(rx_in), .din_sync(raw), .dout(shaped));

  dll_cdr u_dll (
    .clk, .rst_n, .din(shaped), .bit_valid(bv), .bit_out(bit_in),
    .locked, .inc(dll_inc), .dec(dll_dec)
  );

  state_t          st;
  logic [NW-1:0]   n;
  logic [5:0]      alt;
  logic            prev_bit, prev_raw, discard, err_seen, corrected;
  logic [1:0]      sub;
  logic [NDATA-1:0] buffer;
  logic [15:0]     crc_rx;

  logic            crc_start, crc_strobe, crc_busy;
  logic [15:0]     crc_val;
  logic            fix_start, fix_done, fix_found;
  logic [PW-1:0]   fix_pos;
  logic            dec_start, dec_strobe, dec_err;
  logic [NBYTES-1:0][7:0] dec_out, held;

  crc16_ccitt #(.LEN(NDATA)) u_crc (
    .clk, .rst_n, .start(crc_start), .data_in(buffer),
    .result(crc_val), .strobe(crc_strobe), .busy(crc_busy)
  );

  crc_corrector #(.NBITS(NWORD)) u_fix (
    .clk, .rst_n, .start(fix_start), .syndrome(crc_val ^ crc_rx),
    .done(fix_done), .found(fix_found), .pos(fix_pos)
  );

  decode8b13b #(.NBYTES(NBYTES)) u_dec (
    .clk, .rst_n, .start(dec_start), .data_in(buffer),
    .data_out(dec_out), .strobe(dec_strobe), .code_err(dec_err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_PRE;
      n           <= '0;
      alt         <= '0;
      prev_bit    <= 1'b1;
      prev_raw    <= 1'b0;
      discard     <= 1'b0;
      err_seen    <= 1'b0;
      corrected   <= 1'b0;
      sub         <= '0;
      buffer      <= '0;
      crc_rx      <= '0;
      crc_start   <= 1'b0;
      fix_start   <= 1'b0;
      dec_start   <= 1'b0;
      held        <= '0;
      recv_req    <= 1'b0;
      num_error   <= '0;
      num_corr    <= '0;
      pkt_good    <= 1'b0;
      pkt_discard <= 1'b0;
    end else begin
      crc_start   <= 1'b0;
      fix_start   <= 1'b0;
      dec_start   <= 1'b0;
      pkt_good    <= 1'b0;
      pkt_discard <= 1'b0;
      if (read_done) recv_req <= 1'b0;
      unique case (st)
        S_PRE: if (!enable || !locked) begin
          alt      <= '0;
          prev_bit <= 1'b1;
          prev_raw <= 1'b0;
        end else if (bv) begin
          prev_bit <= bit_in;
          prev_raw <= raw;
          alt      <= (bit_in != prev_bit) ? ((alt == '1) ? alt : alt + 1'b1) : '0;
          if (alt >= 6'(PRE_MIN)) begin
            if (prev_raw && raw) begin
              st      <= S_SKIP;       // 1111: two start bits still to come
              n       <= NW'(2);
              discard <= 1'b0;
            end else if (!prev_bit && !bit_in) begin
              st      <= S_SKIP;       // 0000: three start bits still to come
              n       <= NW'(3);
              discard <= 1'b1;
            end
          end
        end
        S_SKIP: if (bv) begin
          if (n == NW'(1)) begin
            st <= S_DATA;
            n  <= NW'(NDATA);
          end else begin
            n <= n - 1'b1;
          end
        end
        S_DATA: if (bv) begin
          buffer <= {buffer[NDATA-2:0], bit_in};
          if (n == NW'(1)) begin
            st  <= S_CRC;
            n   <= NW'(CRC_LINE_BITS);
            sub <= '0;
          end else begin
            n <= n - 1'b1;
          end
        end
        S_CRC: if (bv) begin
          sub <= (sub == 2'd2) ? 2'd0 : sub + 1'b1;
          if (sub == 2'd1) crc_rx <= {crc_rx[14:0], bit_in};
          if (n == NW'(1)) begin
            alt      <= '0;
            prev_bit <= 1'b1;
            prev_raw <= 1'b0;
            if (discard) begin
              pkt_discard <= 1'b1;
              st          <= S_PRE;
            end else begin
              st        <= S_CHECK;
              crc_start <= 1'b1;
              err_seen  <= 1'b0;
              corrected <= 1'b0;
            end
          end else begin
            n <= n - 1'b1;
          end
        end
        S_CHECK: if (crc_strobe) begin
          if ((crc_val ^ crc_rx) == 16'h0000) begin
            st        <= S_DEC;
            dec_start <= 1'b1;
          end else begin
            num_error <= num_error + 1'b1;
            err_seen  <= 1'b1;
            st        <= S_FIX;
            fix_start <= 1'b1;
          end
        end
        S_FIX: if (fix_done) begin
          if (fix_found) begin
            if (fix_pos >= PW'(CRC_BITS))
              buffer[fix_pos - PW'(CRC_BITS)] <= ~buffer[fix_pos - PW'(CRC_BITS)];
            corrected <= 1'b1;
            st        <= S_DEC;
            dec_start <= 1'b1;
          end else begin
            st <= S_PRE;
          end
        end
        S_DEC: if (dec_strobe) begin
          st <= S_PRE;
          if (dec_err) begin
            if (!err_seen) num_error <= num_error + 1'b1;
          end else begin
            held     <= dec_out;
            recv_req <= 1'b1;
            pkt_good <= 1'b1;
            if (corrected) num_corr <= num_corr + 1'b1;
          end
        end
        default: st <= S_PRE;
      endcase
    end
  end

  always_comb begin
    data_out = held;
    if (stat_sel) begin
      data_out[NBYTES-4] = num_error[15:8];
      data_out[NBYTES-3] = num_error[7:0];
      data_out[NBYTES-2] = num_corr[15:8];
      data_out[NBYTES-1] = num_corr[7:0];
    end
  end

endmodule
