// serializer: builds an 8B13B packet and sends it on the LED line.
//
// Preparation: a one-clock load pulse (a payload has arrived) starts it. The
// 65 payload bytes are encoded one per clock through enc8b13b into a 845-bit
// register (byte 0 first), then a CRC-16-CCITT is run over the rising-edge
// form of those 845 bits, which is what the receiver will see after its
// pulse shaper. ready is high when both are done (about 910 clocks).
//
// Line: the output changes every BIT_CYCLES clocks (160 ns). While no packet
// is being sent the line carries the alternating preamble pattern 1010...,
// so the light stays on at half brightness and the receiver stays locked.
// After a start pulse, and once ready, the next 1 of the pattern begins a
// packet: PRE_BITS preamble bits (1 first), four start bits (1111 if active,
// else 0000), the 845 code bits, and the 16 CRC bits most significant first,
// each as 001 for a 0 or 010 for a 1. pkt_done pulses after the last bit;
// a packet lasts (PRE_BITS + 4 + 845 + 48) * BIT_CYCLES clocks, 149.28 us at
// the defaults.
//
// Field sizes, start-bit values, 1B3B coding and bit time follow the published
// design. The continuous idle preamble, the CRC being taken over the
// rising-edge form, and preparing on load rather than on start are this
// design's choices.
module serializer
  import vlc_pkg::*;
#(
  parameter int unsigned NBYTES   = PAYLOAD_BYTES,
  parameter int unsigned BITCLK   = BIT_CYCLES,
  parameter int unsigned PRE_BITS = PREAMBLE_BITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,      // payload valid: encode and CRC
  input  logic [NBYTES-1:0][7:0] payload,
  input  logic                   start,     // send a packet
  input  logic                   active,    // start bits 1111 (1) or 0000 (0)
  output logic                   ready,     // encoded packet and CRC held
  output logic                   sending,   // a packet is on the line
  output logic                   pkt_done,  // one clock after the last bit
  output logic                   tx_out     // serial line to the LED driver
);

  localparam int unsigned NDATA = NBYTES * CODE_BITS;
  localparam int BW = $clog2(BITCLK);
  localparam int NW = $clog2(NDATA + 1);
  localparam int IW = $clog2(NBYTES + 1);

  typedef enum logic [2:0] {F_IDLE, F_PRE, F_START, F_DATA, F_CRC} field_t;
  typedef enum logic [1:0] {P_IDLE, P_ENC, P_CRC} prep_t;

  // ---------------- preparation ----------------
  prep_t               prep;
  logic [IW-1:0]       enc_i;
  logic [7:0]          enc_byte;
  logic [CODE_BITS-1:0] enc_code;
  logic [NDATA-1:0]    codes;       // codeword of byte 0 in the top bits
  logic [NDATA-1:0]    edges;
  logic                crc_start, crc_strobe, crc_busy;
  logic [15:0]         crc_val, crc_hold;

  assign enc_byte = payload[enc_i];

  enc8b13b u_enc (.data(enc_byte), .code(enc_code));

  always_comb begin
    for (int b = 0; b < int'(NBYTES); b++)
      edges[b*CODE_BITS +: CODE_BITS] = edge_form(codes[b*CODE_BITS +: CODE_BITS]);
  end

  crc16_ccitt #(.LEN(NDATA)) u_crc (
    .clk, .rst_n, .start(crc_start), .data_in(edges),
    .result(crc_val), .strobe(crc_strobe), .busy(crc_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prep      <= P_IDLE;
      enc_i     <= '0;
      codes     <= '0;
      crc_start <= 1'b0;
      crc_hold  <= '0;
      ready     <= 1'b0;
    end else begin
      crc_start <= 1'b0;
      unique case (prep)
        P_IDLE: if (load) begin
          prep  <= P_ENC;
          enc_i <= '0;
          ready <= 1'b0;
        end
        P_ENC: begin
          codes[NDATA - 1 - int'(enc_i) * CODE_BITS -: CODE_BITS] <= enc_code;
          if (enc_i == IW'(NBYTES - 1)) begin
            prep      <= P_CRC;
            crc_start <= 1'b1;
          end else begin
            enc_i <= enc_i + 1'b1;
          end
        end
        P_CRC: if (crc_strobe) begin
          crc_hold <= crc_val;
          ready    <= 1'b1;
          prep     <= P_IDLE;
        end
        default: prep <= P_IDLE;
      endcase
    end
  end

  // ---------------- line ----------------
  field_t        field;
  logic [BW-1:0] tmr;
  logic          bit_end;
  logic          pat;          // idle pattern value of the current bit
  logic [NW-1:0] n;            // bits left in the current field
  logic [1:0]    sub;          // position inside a 1B3B triplet
  logic [15:0]   crc_sh;
  logic [NDATA-1:0] data_sh;
  logic          pend;         // start seen, packet not yet begun
  logic          act_q;

  assign bit_end = (tmr == BW'(BITCLK - 1));

  always_ff @(posedge clk or negedge rst_n) begin : p_line
    logic nxt;
    if (!rst_n) begin
      field    <= F_IDLE;
      tmr      <= '0;
      pat      <= 1'b1;
      n        <= '0;
      sub      <= '0;
      crc_sh   <= '0;
      data_sh  <= '0;
      pend     <= 1'b0;
      act_q    <= 1'b0;
      tx_out   <= 1'b0;
      pkt_done <= 1'b0;
    end else begin
      pkt_done <= 1'b0;
      if (start) begin
        pend  <= 1'b1;
        act_q <= active;
      end
      tmr <= bit_end ? '0 : tmr + 1'b1;
      if (bit_end) begin
        // choose the next line bit
        nxt = 1'b0;
        unique case (field)
          F_IDLE: begin
            pat <= ~pat;
            nxt = ~pat;
            if (~pat && pend && (ready || !act_q) && prep == P_IDLE) begin
              // the pattern's 1 starts the packet preamble
              pend    <= 1'b0;
              field   <= F_PRE;
              n       <= NW'(PRE_BITS - 1);
              data_sh <= codes;
              crc_sh  <= crc_hold;
            end
          end
          F_PRE: begin
            nxt = ~tx_out;
            if (n == '0) begin
              field <= F_START;
              n     <= NW'(START_BITS - 1);
              nxt   = act_q;
            end else begin
              n <= n - 1'b1;
            end
          end
          F_START: begin
            nxt = act_q;
            if (n == '0) begin
              field   <= F_DATA;
              n       <= NW'(NDATA - 1);
              nxt     = data_sh[NDATA-1];
              data_sh <= data_sh << 1;
            end else begin
              n <= n - 1'b1;
            end
          end
          F_DATA: begin
            if (n == '0) begin
              field <= F_CRC;
              n     <= NW'(CRC_BITS - 1);
              sub   <= 2'd1;
              nxt   = 1'b0;        // first bit of a triplet is always 0
            end else begin
              nxt     = data_sh[NDATA-1];
              data_sh <= data_sh << 1;
              n       <= n - 1'b1;
            end
          end
          F_CRC: begin
            // triplet of crc_sh[15]: 0 -> 001, 1 -> 010
            unique case (sub)
              2'd1: begin nxt = crc_sh[15];  sub <= 2'd2; end
              2'd2: begin
                nxt = ~crc_sh[15];
                sub <= 2'd0;
              end
              default: begin
                if (n == '0) begin
                  field    <= F_IDLE;
                  pkt_done <= 1'b1;
                  pat      <= 1'b1;
                  nxt      = 1'b1;
                end else begin
                  n      <= n - 1'b1;
                  crc_sh <= crc_sh << 1;
                  sub    <= 2'd1;
                  nxt    = 1'b0;
                end
              end
            endcase
          end
          default: field <= F_IDLE;
        endcase
        tx_out <= nxt;
      end
    end
  end

  assign sending = (field != F_IDLE);

endmodule
