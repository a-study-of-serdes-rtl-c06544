// tb_timing_ctrl: default parameters. Checks the data_req period
// (38601 ticks of 64 clocks), the distance from data_req to start
// (10999 ticks), that a SPI frame drops data_req and sets active, that a
// missed frame leaves active low at start, and that receive mode is silent.
module tb_timing_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tx_mode, frame_ok, data_req, start, active;
  logic [15:0] count;
  int checks = 0, failures = 0;
  longint cyc = 0;

  timing_ctrl dut (.clk, .rst_n, .tx_mode, .spi_frame_ok(frame_ok), .data_req,
                   .start, .active, .count);

  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    longint t_req [3], t_start;
    tx_mode = 1; frame_ok = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      @(posedge data_req);
      t_req[p] = cyc;
      check(count == 16'd1, $sformatf("count at data_req %0d", count));
      check(!active, "active cleared at data_req");
      if (p > 0) check(t_req[p] - t_req[p-1] == 64 * 38601,
                       $sformatf("period %0d", t_req[p] - t_req[p-1]));
      if (p != 1) begin
        repeat (5000) @(posedge clk);
        frame_ok <= 1;
        @(posedge clk);
        frame_ok <= 0;
        @(posedge clk);
        @(posedge clk);
        check(!data_req && active, "frame accepted");
      end
      @(posedge clk iff start);
      t_start = cyc;
      check(t_start - t_req[p] == 64 * 10999, $sformatf("req to start %0d", t_start - t_req[p]));
      check(count == 16'd11000, "count at start");
      check(active == (p != 1), "active at start");
      check(!data_req, "data_req low at start");
    end
    tx_mode = 0;
    repeat (64 * 38601 + 10) begin
      @(posedge clk);
      if (data_req || start) begin
        failures++;
        break;
      end
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (64 * 38601 * 5) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
