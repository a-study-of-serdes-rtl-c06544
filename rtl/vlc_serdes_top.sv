// vlc_serdes_top: 8B13B SerDes for visible light communication, one FPGA.
//
// The same logic serves as transmitter or receiver; the tx_mode switch picks
// the role. A host computer (SPI master) is attached to the SPI port.
//
// Transmit (tx_mode = 1): timing_ctrl counts 640 ns ticks over a 24.7 ms
// frame. At tick 1 it raises data_req; the host answers with one 65-byte SPI
// frame, which sets active and makes the serializer encode the bytes and
// compute the CRC. At tick 11000 (about 7 ms) start makes the serializer send
// the packet on led_out (start bits 1111 if a frame arrived, else 0000). In
// between, led_out carries the alternating preamble pattern.
//
// Receive (tx_mode = 0): the deserializer recovers packets from pd_in, the
// binarised photodetector signal. A packet that passes the CRC (possibly after
// a one-bit correction) and decodes is held for the host and recv_req rises;
// the host reads the 65 bytes with one SPI frame, which lowers recv_req.
// stat_sel (the error read-out switch) puts num_error and num_corr into the
// last four bytes of that payload.
//
// All logic runs from one 100 MHz clock (160 ns = 16 clocks per line bit);
// rst_n is an asynchronous active-low reset. The status outputs (error
// counters, lock, packet and DLL-correction pulses) are for LEDs or debug.
// The partitioning into timing controller, spi_slave, serializer with CRC and
// encoder, and deserializer with CRC and DECODE8B13B follows the published
// block diagram; the single clock and the status outputs are this design's
// choices.
module vlc_serdes_top
  import vlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tx_mode,      // transmission/reception switch, 1 = transmit
  input  logic        stat_sel,     // error count read-out switch
  // SPI to the host (host is master)
  input  logic        spi_sclk,
  input  logic        spi_cs_n,
  input  logic        spi_mosi,
  output logic        spi_miso,
  output logic        data_req,     // transmit: asks the host for a payload
  output logic        recv_req,     // receive: a payload is waiting
  // light path
  output logic        led_out,      // to the LED driver
  input  logic        pd_in,        // from the binarisation circuit
  // status
  output logic        tx_active,
  output logic        tx_sending,
  output logic        tx_pkt_done,
  output logic        spi_frame_bad,
  output logic        rx_locked,
  output logic        rx_pkt_good,
  output logic        rx_pkt_discard,
  output logic        rx_dll_inc,
  output logic        rx_dll_dec,
  output logic [15:0] num_error,
  output logic [15:0] num_corr
);

  logic [PAYLOAD_BYTES-1:0][7:0] spi_rx, rx_data;
  logic        frame_ok;
  logic        start, ser_out;

  spi_slave #(.NBYTES(PAYLOAD_BYTES)) u_spi (
    .clk, .rst_n,
    .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .tx_bytes(rx_data), .rx_bytes(spi_rx),
    .frame_ok, .frame_bad(spi_frame_bad)
  );

  timing_ctrl u_timing (
    .clk, .rst_n, .tx_mode, .spi_frame_ok(frame_ok),
    .data_req, .start, .active(tx_active), .count()
  );

  serializer u_ser (
    .clk, .rst_n,
    .load(frame_ok && tx_mode), .payload(spi_rx),
    .start, .active(tx_active),
    .ready(), .sending(tx_sending), .pkt_done(tx_pkt_done), .tx_out(ser_out)
  );

  deserializer u_deser (
    .clk, .rst_n, .enable(!tx_mode), .rx_in(pd_in), .stat_sel,
    .read_done(frame_ok && !tx_mode),
    .data_out(rx_data), .recv_req,
    .num_error, .num_corr,
    .pkt_good(rx_pkt_good), .pkt_discard(rx_pkt_discard),
    .locked(rx_locked), .dll_inc(rx_dll_inc), .dll_dec(rx_dll_dec)
  );

  assign led_out = tx_mode & ser_out;

endmodule
