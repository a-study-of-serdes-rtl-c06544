// tb_spi_slave: a full 65-byte frame in both directions with random data,
// checked byte by byte; frame_ok for exactly 65 bytes, frame_bad for a short
// and for a long frame.
module tb_spi_slave;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sclk, cs_n, mosi, miso, frame_ok, frame_bad;
  logic [64:0][7:0] tx_bytes, rx_bytes;
  int checks = 0, failures = 0, n_ok = 0, n_bad = 0;

  spi_slave dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .tx_bytes, .rx_bytes,
                 .frame_ok, .frame_bad);
  spi_master_model host (.sclk, .cs_n, .mosi, .miso);

  always @(posedge clk) begin
    if (frame_ok && rst_n) n_ok++;
    if (frame_bad && rst_n) n_bad++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] t [65], r [65];
    #50 rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 65; i++) begin
        t[i] = 8'($urandom);
        tx_bytes[i] = 8'($urandom);
      end
      host.xfer(65, t, r);
      #100;
      for (int i = 0; i < 65; i++) begin
        check(rx_bytes[i] == t[i], $sformatf("mosi byte %0d", i));
        check(r[i] == tx_bytes[i], $sformatf("miso byte %0d: %h vs %h", i, r[i], tx_bytes[i]));
      end
      check(n_ok == rep + 1 && n_bad == 0, $sformatf("frame_ok count %0d %0d", n_ok, n_bad));
    end
    host.xfer(10, t, r);
    #100 check(n_bad == 1 && n_ok == 3, "short frame");
    host.xfer(66, t, r);
    #100 check(n_bad == 2 && n_ok == 3, "long frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
