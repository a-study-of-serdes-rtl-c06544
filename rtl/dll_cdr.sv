// dll_cdr: delay-locked loop that recovers the bit clock from the shaped
// light signal.
//
// The shaped signal (one short pulse per rising line edge) is shifted into a
// 32-bit register every clock, bit 0 newest. A 1/16 divider (phase counter
// ph, 0..15) marks the end of each 160 ns bit window with bit_valid. At that
// clock the newest 16 register positions are the current window; a rising
// edge at position k (sr[k] = 1, sr[k+1] = 0) means a 1 bit that began k
// clocks ago, and bit_out is 1. The edge of a 1 should sit in the middle of
// the window (k = CENTER = 8); this is the phase detector.
//
// Acquisition (not locked): every rising edge restarts the divider so that
// the window closes CENTER clocks after the edge. The preamble has an edge
// every second bit (a period of two bit times); after LOCK_BITS alternating
// bits the loop is locked.
// Tracking (locked): the divider is not restarted. If an edge comes at
// k < CENTER - DEADBAND the window closed too early, and the next window is
// made one clock longer (dec pulse: the divider count is held back by one).
// If k > CENTER + DEADBAND the next window is one clock shorter (inc pulse:
// the count jumps by two). One clock of correction per edge follows a
// frequency offset of up to 1/16 clock per bit between the two ends.
// After LOSS_BITS bits without any edge the loop drops lock.
//
// The 32-bit register, edge detection by the register's bit pattern, the
// 1/16 divider at 100 MHz nudged up or down, and locking on the alternating
// preamble follow the published design. The window position, the dead band
// and the lock and loss rules are this design's choices.
module dll_cdr
  import vlc_pkg::*;
#(
  parameter int unsigned SR_BITS   = 32,
  parameter int unsigned DEADBAND  = 1,
  parameter int unsigned LOCK_BITS = 16,
  parameter int unsigned LOSS_BITS = 24
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,          // shaped signal
  output logic bit_valid,    // one clock per recovered bit
  output logic bit_out,      // recovered bit, valid with bit_valid
  output logic locked,
  output logic inc,          // window shortened by one clock
  output logic dec           // window lengthened by one clock
);

  localparam int unsigned WIN    = BIT_CYCLES;       // 16
  localparam int unsigned CENTER = WIN / 2;          // 8

  logic [SR_BITS-1:0] sr;
  logic [3:0]         ph;
  logic               found;
  logic [3:0]         pos;
  logic [5:0]         alt_cnt, quiet;
  logic               prev_bit;
  logic               stall;       // hold the divider for one clock

  // Phase detector: position of the rising edge inside the current window.
  always_comb begin
    found = 1'b0;
    pos   = '0;
    for (int k = int'(WIN) - 1; k >= 0; k--) begin
      if (sr[k] && !sr[k+1]) begin
        found = 1'b1;
        pos   = 4'(k);
      end
    end
  end

  assign bit_valid = (ph == 4'(WIN - 1));
  assign bit_out   = found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr       <= '0;
      ph       <= '0;
      locked   <= 1'b0;
      alt_cnt  <= '0;
      quiet    <= '0;
      prev_bit <= 1'b0;
      inc      <= 1'b0;
      dec      <= 1'b0;
      stall    <= 1'b0;
    end else begin
      sr    <= {sr[SR_BITS-2:0], din};
      inc   <= 1'b0;
      dec   <= 1'b0;
      stall <= 1'b0;
      ph    <= stall ? ph : ph + 1'b1;
      if (!locked && din && !sr[0]) begin
        // acquisition: close the window CENTER clocks after this edge
        ph <= 4'(WIN - 1 - CENTER);
      end else if (bit_valid && locked && found) begin
        if (int'(pos) < int'(CENTER) - int'(DEADBAND)) begin
          stall <= 1'b1;      // the next window lasts WIN + 1 clocks
          dec   <= 1'b1;
        end else if (int'(pos) > int'(CENTER) + int'(DEADBAND)) begin
          ph  <= 4'd1;        // the next window lasts WIN - 1 clocks
          inc <= 1'b1;
        end
      end
      if (bit_valid) begin
        prev_bit <= found;
        quiet    <= found ? '0 : ((quiet == '1) ? quiet : quiet + 1'b1);
        if (!locked) begin
          alt_cnt <= (found != prev_bit) ? alt_cnt + 1'b1 : '0;
          if (alt_cnt >= 6'(LOCK_BITS - 1) && found != prev_bit) locked <= 1'b1;
        end else if (!found && quiet >= 6'(LOSS_BITS - 1)) begin
          locked  <= 1'b0;
          alt_cnt <= '0;
        end
      end
    end
  end

endmodule
