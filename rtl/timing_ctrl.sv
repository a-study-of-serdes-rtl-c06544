// timing_ctrl: frame timing of the transmitter.
//
// A prescaler divides the clock into 640 ns ticks (TICK_CYCLES clocks). A tick
// counter runs from 0 to COUNT_MAX and wraps. When it reaches REQ_AT the
// data_req output rises to ask the host for the next payload over SPI, and the
// active flag is cleared. A complete SPI frame (spi_frame_ok) before the start
// tick sets active and drops data_req. When the counter reaches START_AT a
// one-clock start pulse tells the serializer to send the packet; active then
// tells it whether the packet carries fresh data (start bits 1111) or not
// (0000). data_req is also dropped at START_AT if no frame came.
// In receive mode (tx_mode = 0) data_req and start stay low.
//
// The counter values (640 ns tick, wrap at 38600, request at 1, start at
// 11000) follow the published design. Holding data_req as a level until the
// frame arrives, so that a host that polls can see it, is this design's choice.
module timing_ctrl
  import vlc_pkg::*;
#(
  parameter int unsigned TICK     = TICK_CYCLES,
  parameter int unsigned CNT_MAX  = COUNT_MAX,
  parameter int unsigned REQ_TICK = REQ_AT,
  parameter int unsigned START_TICK = START_AT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tx_mode,       // transmit/receive switch, 1 = transmit
  input  logic        spi_frame_ok,  // a full payload arrived over SPI
  output logic        data_req,      // request to the host
  output logic        start,         // one-clock pulse: send the packet now
  output logic        active,        // payload held and valid
  output logic [15:0] count          // tick counter
);

  localparam int PW = (TICK > 1) ? $clog2(TICK) : 1;

  logic [PW-1:0] pre;
  logic          tick;

  assign tick = (pre == PW'(TICK - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre      <= '0;
      count    <= '0;
      data_req <= 1'b0;
      start    <= 1'b0;
      active   <= 1'b0;
    end else begin
      start <= 1'b0;
      pre   <= tick ? '0 : pre + 1'b1;
      if (tick) begin
        count <= (count == 16'(CNT_MAX)) ? '0 : count + 1'b1;
      end
      if (!tx_mode) begin
        data_req <= 1'b0;
      end else begin
        if (tick && count == 16'(REQ_TICK - 1)) begin
          // the counter is about to read REQ_TICK
          data_req <= 1'b1;
          active   <= 1'b0;
        end else if (tick && count == 16'(START_TICK - 1)) begin
          data_req <= 1'b0;
          start    <= 1'b1;
        end else if (spi_frame_ok && data_req) begin
          data_req <= 1'b0;
          active   <= 1'b1;
        end
      end
    end
  end

endmodule
