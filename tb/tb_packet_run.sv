// tb_packet_run: a long run of packets through the receive path, in the
// manner of a packet-loss measurement. Every packet carries a 16-bit serial
// number in bytes 0-1 (the rest is random), so the host side can see lost
// packets as gaps in the numbering. Each packet is sent with a random bit
// time within +/-1000 ppm of 160 ns and random pulse shrinkage, and loses
// either no pulse (70 %), one pulse (20 %) or two pulses (10 %) at random
// places in the data and CRC fields, like bits falling below the detector
// threshold. A lost pulse on the third bit of a 001 CRC triplet does not
// count as a loss, since the receiver reads only the middle bit of each
// triplet. A host model reads every delivered packet.
// Expected: every packet with at most one lost pulse is delivered intact
// (in numbering order), every packet with two is dropped and shows as a
// gap; num_error equals the number of damaged packets and num_corr the
// number with one loss. NPKT sets the length of the run.
module tb_packet_run;
  import tb_util_pkg::*;
  localparam int NPKT = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rx_in, read_done, recv_req, pkt_good, pkt_discard, locked, dll_inc, dll_dec;
  logic [64:0][7:0] data_out;
  logic [15:0] num_error, num_corr;
  logic [12:0] tab [256];
  logic [7:0]  sent [NPKT][65];
  int checks = 0, failures = 0;
  int n_clean = 0, n_single = 0, n_double = 0, n_harmless = 0;
  int n_read = 0, n_gap = 0, bad_bytes = 0, last_serial = -1;

  deserializer dut (.clk, .rst_n, .enable(1'b1), .rx_in, .stat_sel(1'b0), .read_done,
                    .data_out, .recv_req, .num_error, .num_corr, .pkt_good,
                    .pkt_discard, .locked, .dll_inc, .dll_dec);
  line_model line (.line(rx_in));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // host: read each delivered packet, check its bytes and its serial number
  initial begin
    read_done = 0;
    forever begin
      int s;
      @(posedge clk);
      if (rst_n && recv_req && !read_done) begin
        s = {data_out[0], data_out[1]};
        if (s <= last_serial || s >= NPKT) begin
          failures++;
          $display("FAIL serial %0d after %0d", s, last_serial);
        end else begin
          n_gap += s - last_serial - 1;
          for (int b = 0; b < 65; b++) if (data_out[b] != sent[s][b]) bad_bytes++;
          last_serial = s;
        end
        n_read++;
        read_done <= 1;
        @(posedge clk) read_done <= 0;
      end
    end
  end

  initial begin
    logic pkt [933];
    logic bits [];
    int runs, kind, da, db, eff;
    real bit_ns, shrink;
    build_table(tab);
    bits = new[933];
    #33 rst_n = 1;
    line.idle(60, 160.0);
    for (int n = 0; n < NPKT; n++) begin
      sent[n][0] = 8'(n >> 8);
      sent[n][1] = 8'(n);
      for (int b = 2; b < 65; b++) sent[n][b] = 8'($urandom);
      build_packet(sent[n], 1'b1, tab, pkt);
      // rising edges of the data and CRC fields are runs 20 .. 19 + runs
      runs = 0;
      for (int i = 40; i < 933; i++) if (pkt[i] && !pkt[i-1]) runs++;
      kind = $urandom_range(0, 9);
      da = 0;
      db = 0;
      if (kind >= 7) da = 20 + $urandom_range(0, runs - 1);
      if (kind == 9) begin
        do db = 20 + $urandom_range(0, runs - 1); while (db == da);
      end
      // a lost pulse on the third bit of a 001 CRC triplet is harmless: only
      // the middle bit of each triplet is read
      eff = 0;
      runs = 0;
      for (int i = 40; i < 933; i++) if (pkt[i] && !pkt[i-1]) begin
        runs++;
        if ((19 + runs == da || 19 + runs == db) && (i < 885 || (i - 885) % 3 == 1)) eff++;
        if ((19 + runs == da || 19 + runs == db) && !(i < 885 || (i - 885) % 3 == 1)) n_harmless++;
      end
      if (eff == 0) n_clean++; else if (eff == 1) n_single++; else n_double++;
      bit_ns = 160.0 * (1.0 + real'($urandom_range(0, 2000)) * 1.0e-6 - 1.0e-3);
      shrink = real'($urandom_range(0, 70));
      foreach (pkt[i]) bits[i] = pkt[i];
      line.idle(40, bit_ns);
      line.send(bits, bit_ns, shrink, da, db);
      line.idle(200, bit_ns);
    end
    line.idle(40, 160.0);
    // a double loss at the end of the run is a gap that no later packet shows
    n_gap += NPKT - 1 - last_serial;
    $display("packets: %0d clean, %0d one loss, %0d two losses (%0d harmless losses); read %0d, gaps %0d, errors %0d, corrected %0d",
             n_clean, n_single, n_double, n_harmless, n_read, n_gap, num_error, num_corr);
    check(n_read == n_clean + n_single, "every packet with at most one loss delivered");
    check(n_gap == n_double, "every packet with two losses dropped");
    check(bad_bytes == 0, $sformatf("%0d delivered bytes wrong", bad_bytes));
    check(int'(num_error) == n_single + n_double, "num_error counts damaged packets");
    check(int'(num_corr) == n_single, "num_corr counts corrected packets");
    check(n_single > 0 && n_double > 0, "both error kinds occurred");
    check(locked, "still locked at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
