// pulse_shaper: monostable multivibrator in logic.
//
// The binarised photodetector signal is asynchronous to clk; it passes a
// two-flop synchroniser. Each rising edge then starts an output pulse of
// exactly PULSE clocks (130 ns at 100 MHz); edges that arrive while a pulse is
// running are ignored. A long run of 1s on the line ("11", or the start bits
// "1111") thus becomes one short pulse at its leading edge, so the stretched
// or shrunk pulse widths that a slow LED produces do not matter: only rising
// edges carry information. din_sync is the synchronised input level, for
// logic that needs the raw level. Output delay: 3 clocks after the edge.
//
// Trigger on the positive edge and the 130 ns width follow the published
// design; the synchroniser and the non-retriggerable behaviour are this
// design's choices.
module pulse_shaper
  import vlc_pkg::*;
#(
  parameter int unsigned PULSE = PULSE_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic din_sync,
  output logic dout
);

  localparam int PW = $clog2(PULSE + 1);

  logic [2:0]    sync;
  logic [PW-1:0] left;

  assign din_sync = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0;
      left <= '0;
      dout <= 1'b0;
    end else begin
      sync <= {sync[1:0], din};
      if (left != '0) begin
        left <= left - 1'b1;
        dout <= (left != PW'(1));
      end else if (sync[1] && !sync[2]) begin
        left <= PW'(PULSE);
        dout <= 1'b1;
      end
    end
  end

endmodule
