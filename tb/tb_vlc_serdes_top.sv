// tb_vlc_serdes_top: end-to-end test at full size, two boards as in a real
// link. Board A (transmit mode) gets payloads from a host model over SPI each
// time it raises data_req; its LED output goes through a channel model to the
// photodetector input of board B (receive mode), whose host model reads every
// payload announced by recv_req. The boards run from separate clocks whose
// periods differ by 0.1 % (first one way, then the other), so the receive
// loop has to correct its phase in both directions.
//
// Five frames of 24.7 ms: (1) a normal packet; (2) the host does not answer
// data_req, so start bits 0000 are sent and the receiver discards the packet;
// (3) the channel loses one pulse, the receiver corrects it; (4) the channel
// loses two pulses, the receiver counts an error and drops the packet;
// (5) a normal packet read with the counter read-out switch on.
// Checks: payloads, frame timing (38601 ticks of 640 ns, start 10999 ticks
// after data_req), packet length on the line (149.28 us), error counters, and
// that each mechanism happened.
module tb_vlc_serdes_top;
  import tb_util_pkg::*;

  real  tx_half = 5.005;
  logic clk_a = 0, clk_b = 0, rst_n = 0;
  always #(tx_half) clk_a = ~clk_a;
  always #5 clk_b = ~clk_b;

  // board A: transmitter
  logic a_sclk, a_cs_n, a_mosi, a_miso, a_req, a_rreq, a_led;
  logic a_active, a_sending, a_done, a_fbad, a_lock, a_good, a_disc, a_inc, a_dec;
  logic [15:0] a_nerr, a_ncorr;
  // board B: receiver
  logic b_sclk, b_cs_n, b_mosi, b_miso, b_req, b_rreq, b_led, b_pd;
  logic b_active, b_sending, b_done, b_fbad, b_lock, b_good, b_disc, b_inc, b_dec;
  logic [15:0] b_nerr, b_ncorr;
  logic stat_b = 0;

  vlc_serdes_top board_a (
    .clk(clk_a), .rst_n, .tx_mode(1'b1), .stat_sel(1'b0),
    .spi_sclk(a_sclk), .spi_cs_n(a_cs_n), .spi_mosi(a_mosi), .spi_miso(a_miso),
    .data_req(a_req), .recv_req(a_rreq), .led_out(a_led), .pd_in(1'b0),
    .tx_active(a_active), .tx_sending(a_sending), .tx_pkt_done(a_done),
    .spi_frame_bad(a_fbad), .rx_locked(a_lock), .rx_pkt_good(a_good),
    .rx_pkt_discard(a_disc), .rx_dll_inc(a_inc), .rx_dll_dec(a_dec),
    .num_error(a_nerr), .num_corr(a_ncorr));

  vlc_serdes_top board_b (
    .clk(clk_b), .rst_n, .tx_mode(1'b0), .stat_sel(stat_b),
    .spi_sclk(b_sclk), .spi_cs_n(b_cs_n), .spi_mosi(b_mosi), .spi_miso(b_miso),
    .data_req(b_req), .recv_req(b_rreq), .led_out(b_led), .pd_in(b_pd),
    .tx_active(b_active), .tx_sending(b_sending), .tx_pkt_done(b_done),
    .spi_frame_bad(b_fbad), .rx_locked(b_lock), .rx_pkt_good(b_good),
    .rx_pkt_discard(b_disc), .rx_dll_inc(b_inc), .rx_dll_dec(b_dec),
    .num_error(b_nerr), .num_corr(b_ncorr));

  spi_master_model host_a (.sclk(a_sclk), .cs_n(a_cs_n), .mosi(a_mosi), .miso(a_miso));
  spi_master_model host_b (.sclk(b_sclk), .cs_n(b_cs_n), .mosi(b_mosi), .miso(b_miso));

  int checks = 0, failures = 0;
  int m_sent_active = 0, m_discard = 0, m_corr = 0, m_error = 0, m_inc = 0, m_dec = 0;
  int m_good = 0, m_stat = 0, m_spi_miss = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- channel: may lose pulses after the start bits ----------
  int  drop_a = 0, drop_b = 0, run = 0;
  bit  armed = 0, suppress = 0;
  realtime t_rise;
  assign b_pd = a_led & ~suppress;
  always @(posedge a_led) begin
    t_rise = $realtime;
    if (armed) begin
      run++;
      suppress = (run == drop_a) || (run == drop_b);
    end
  end
  always @(negedge a_led) begin
    if (!armed && a_sending && $realtime - t_rise > 400.0) begin
      armed = 1;     // end of the 1111 start bits
      run = 0;
    end
    suppress = 0;
  end
  always @(posedge a_done) armed = 0;

  // ---------------- counters of mechanisms and timing ----------------------
  realtime t_req [$], t_start [$], t_send_begin, t_send_len;
  always @(posedge a_req) t_req.push_back($realtime);
  always @(posedge a_sending) begin
    t_start.push_back($realtime);
    t_send_begin = $realtime;
  end
  always @(negedge a_sending) t_send_len = $realtime - t_send_begin;
  always @(posedge clk_b) if (rst_n) begin
    if (b_disc) m_discard++;
    if (b_inc) m_inc++;
    if (b_dec) m_dec++;
    if (b_good) m_good++;
  end

  // ---------------- hosts ---------------------------------------------------
  logic [7:0] payload [5][65];
  int frame = 0;

  initial begin : host_tx
    logic [7:0] r [65];
    for (int f = 0; f < 5; f++) begin
      @(posedge a_req);
      frame = f;
      for (int i = 0; i < 65; i++) payload[f][i] = 8'($urandom);
      payload[f][0] = 8'(f);   // serial number
      if (f == 1) begin
        m_spi_miss++;           // host too busy: no SPI transfer this frame
      end else begin
        drop_a = (f == 2) ? 23 : ((f == 3) ? 11 : 0);
        drop_b = (f == 3) ? 140 : 0;
        if (f >= 3) tx_half = 4.995;   // transmitter clock now 0.1 % fast
        #(50us);                 // host software latency
        host_a.xfer(65, payload[f], r);
        m_sent_active++;
      end
    end
  end

  logic [7:0] got [65];
  int n_read = 0;
  initial begin : host_rx
    logic [7:0] zero [65];
    foreach (zero[i]) zero[i] = 8'h00;
    forever begin
      @(posedge b_rreq);
      #(20us);
      host_b.xfer(65, zero, got);
      n_read++;
      begin
        int bad, f;
        f = got[0];
        bad = 0;
        check(f == 0 || f == 2 || f == 4, $sformatf("unexpected packet %0d delivered", f));
        for (int i = 0; i < 65; i++)
          if (!(stat_b && i >= 61) && got[i] != payload[f][i]) bad++;
        check(bad == 0, $sformatf("frame %0d: %0d bytes wrong", f, bad));
        if (stat_b) begin
          check({got[61], got[62]} == b_nerr && {got[63], got[64]} == b_ncorr,
                "counters in the payload");
          m_stat++;
        end
      end
    end
  end

  initial begin : main
    #100 rst_n = 1;
    // frames 0 to 3
    wait (t_req.size() == 5);
    #(1ms);
    check(n_read == 2, $sformatf("packets read after 4 frames: %0d", n_read));
    check(b_ncorr == 1, $sformatf("num_corr %0d", b_ncorr));
    check(b_nerr == 2, $sformatf("num_error %0d", b_nerr));
    m_corr = b_ncorr;
    m_error = b_nerr - b_ncorr;
    stat_b = 1;
    // frame 4
    wait (t_start.size() == 5);
    wait (n_read == 3);
    #(100us);
    // 38601 ticks and 10999 ticks of 64 transmitter clocks (10.01 ns for
    // frames 0-2, 9.99 ns from frame 3), plus at most two line bits
    check(t_req[1] - t_req[0] > 38601 * 64 * 10.01 - 1000.0 &&
          t_req[1] - t_req[0] < 38601 * 64 * 10.01 + 1000.0,
          $sformatf("frame period %0t", t_req[1] - t_req[0]));
    for (int f = 0; f < 5; f++) begin
      real per;
      per = (f < 3) ? 10.01 : 9.99;
      check(t_start[f] - t_req[f] > 10999 * 64 * per - 1000.0 &&
            t_start[f] - t_req[f] < 10999 * 64 * per + 1000.0,
            $sformatf("request to packet %0t", t_start[f] - t_req[f]));
    end
    // last packet: 933 bits of 16 clocks of 9.99 ns
    check(t_send_len > 933 * 16 * 9.99 - 20.0 && t_send_len < 933 * 16 * 9.99 + 20.0,
          $sformatf("packet length %0t", t_send_len));
    check(m_good == 3, $sformatf("packets delivered %0d", m_good));
    // each mechanism at least once
    check(m_sent_active >= 1, "no active packet");
    check(m_spi_miss >= 1 && m_discard == 1, $sformatf("0000 packets discarded: %0d", m_discard));
    check(m_corr >= 1, "no correction");
    check(m_error >= 1, "no uncorrectable error");
    check(m_inc >= 1, "no DLL inc");
    check(m_dec >= 1, "no DLL dec");
    check(m_stat >= 1, "no counter read-out");
    $display("mechanisms: active %0d discard %0d corrected %0d error %0d dll_inc %0d dll_dec %0d readout %0d",
             m_sent_active, m_discard, m_corr, m_error, m_inc, m_dec, m_stat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(140ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
