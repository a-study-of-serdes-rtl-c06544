// tb_deserializer: packets built by the reference model are sent on a model
// line, between stretches of the alternating idle pattern, with the sender's
// bit time 0.1 % longer or shorter than the receiver's and with shrunken
// pulses. Cases: clean packets, a 0000 packet (discarded), one lost pulse in
// the data (corrected), one lost pulse in the CRC field (corrected), two lost
// pulses (error, dropped), and the counter read-out switch. Checks the
// delivered bytes, recv_req and its clearing, num_error, num_corr, and that
// the DLL made corrections in both directions.
module tb_deserializer;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rx_in, stat_sel, read_done, recv_req, pkt_good, pkt_discard, locked, dll_inc, dll_dec;
  logic [64:0][7:0] data_out;
  logic [15:0] num_error, num_corr;
  logic [12:0] tab [256];
  int checks = 0, failures = 0;
  int n_good = 0, n_disc = 0, n_inc = 0, n_dec = 0;

  deserializer dut (.clk, .rst_n, .enable(1'b1), .rx_in, .stat_sel, .read_done,
                    .data_out, .recv_req, .num_error, .num_corr, .pkt_good,
                    .pkt_discard, .locked, .dll_inc, .dll_dec);
  line_model line (.line(rx_in));

  always @(posedge clk) if (rst_n) begin
    if (pkt_good) n_good++;
    if (pkt_discard) n_disc++;
    if (dll_inc) n_inc++;
    if (dll_dec) n_dec++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // send one packet; drops count runs of 1s from the start of the packet
  // (18 preamble runs, 1 start run, then data and CRC runs)
  task automatic packet(input logic act, input real bit_ns, input real shrink,
                        input int drop_a, input int drop_b, ref logic [7:0] bytes [65]);
    logic pkt [933];
    logic bits [];
    for (int b = 0; b < 65; b++) bytes[b] = 8'($urandom);
    build_packet(bytes, act, tab, pkt);
    // a negative drop number -k means the k-th run of the CRC field
    begin
      int runs;
      runs = 0;
      for (int i = 40; i < 885; i++) if (pkt[i] && !pkt[i-1]) runs++;
      if (drop_a < 0) drop_a = 19 + runs - drop_a;
      if (drop_b < 0) drop_b = 19 + runs - drop_b;
    end
    bits = new[933];
    foreach (pkt[i]) bits[i] = pkt[i];
    line.idle(40, bit_ns);
    line.send(bits, bit_ns, shrink, drop_a, drop_b);
    line.idle(200, bit_ns);
  endtask

  task automatic expect_good(input logic [7:0] bytes [65], input int good_before, input string what);
    int bad;
    bad = 0;
    for (int b = 0; b < 65; b++) if (data_out[b] != bytes[b]) bad++;
    check(n_good == good_before + 1, $sformatf("%s: not delivered", what));
    check(bad == 0, $sformatf("%s: %0d bytes wrong", what, bad));
    check(recv_req, $sformatf("%s: recv_req", what));
    @(posedge clk) read_done <= 1;
    @(posedge clk) read_done <= 0;
    @(posedge clk);
    check(!recv_req, "recv_req cleared by read_done");
  endtask

  initial begin
    logic [7:0] bytes [65];
    int g;
    stat_sel = 0; read_done = 0;
    build_table(tab);
    #33 rst_n = 1;
    line.idle(60, 160.16);
    check(locked, "lock on idle pattern");
    // clean, slow sender with shrunken pulses
    g = n_good; packet(1, 160.16, 60.0, 0, 0, bytes); expect_good(bytes, g, "clean slow");
    check(num_error == 0 && num_corr == 0, "no errors counted");
    // clean, fast sender
    g = n_good; packet(1, 159.84, 30.0, 0, 0, bytes); expect_good(bytes, g, "clean fast");
    // 0000 start bits: discarded
    g = n_good; packet(0, 160.0, 0.0, 0, 0, bytes);
    check(n_good == g && n_disc == 1, "0000 packet discarded");
    // one lost pulse in the data
    g = n_good; packet(1, 160.16, 40.0, 19 + 30, 0, bytes); expect_good(bytes, g, "corrected data");
    check(num_error == 1 && num_corr == 1, $sformatf("counters %0d %0d", num_error, num_corr));
    // one lost pulse in the CRC field
    g = n_good; packet(1, 159.84, 0.0, -5, 0, bytes);
    if (n_good == g + 1) expect_good(bytes, g, "corrected crc");
    else check(0, "crc-field error not corrected");
    check(num_error == 2 && num_corr == 2, $sformatf("counters %0d %0d", num_error, num_corr));
    // two lost pulses: detected, not corrected
    g = n_good; packet(1, 160.16, 0.0, 19 + 20, 19 + 150, bytes);
    check(n_good == g && !recv_req, "double error dropped");
    check(num_error == 3 && num_corr == 2, $sformatf("counters %0d %0d", num_error, num_corr));
    // read-out switch
    stat_sel = 1;
    #1;
    check({data_out[61], data_out[62]} == 16'd3 && {data_out[63], data_out[64]} == 16'd2,
          "counters in the payload");
    stat_sel = 0;
    check(n_inc > 0 && n_dec > 0, $sformatf("DLL corrections inc %0d dec %0d", n_inc, n_dec));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
