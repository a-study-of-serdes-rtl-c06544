// tb_crc16_ccitt: the serial CRC against a reference model, on the standard
// check string "123456789" (expected 0x29B1) and on random 845-bit vectors;
// also checks the LEN-clock latency of strobe.
module tb_crc16_ccitt;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        st_a, st_b, sb_a, sb_b, busy_a, busy_b;
  logic [71:0] din_a;
  logic [844:0] din_b;
  logic [15:0] res_a, res_b;
  int checks = 0, failures = 0;
  longint cyc = 0, t_st = 0, lat = 0;

  // latency: clock edges from the edge that takes start to the edge that
  // first sees strobe (LEN + 1)
  always @(posedge clk) begin
    cyc++;
    if (st_a || st_b) t_st = cyc;
    if (sb_a || sb_b) lat = cyc - t_st;
  end

  crc16_ccitt #(.LEN(72)) dut_a (.clk, .rst_n, .start(st_a), .data_in(din_a),
                                 .result(res_a), .strobe(sb_a), .busy(busy_a));
  crc16_ccitt dut_b (.clk, .rst_n, .start(st_b), .data_in(din_b),
                     .result(res_b), .strobe(sb_b), .busy(busy_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [15:0] r;
    st_a = 0; st_b = 0; din_a = "123456789"; din_b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    st_a <= 1;
    @(posedge clk);
    st_a <= 0;
    while (!sb_a) @(posedge clk);
    @(posedge clk);
    check(res_a == 16'h29B1, $sformatf("check string: %h", res_a));
    check(lat == 73, $sformatf("latency %0d", lat));
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 845; i++) din_b[i] = 1'($urandom);
      if (t == 0) din_b = '0;
      r = 16'hFFFF;
      for (int i = 844; i >= 0; i--) r = crc_step(r, din_b[i]);
      st_b <= 1;
      @(posedge clk);
      st_b <= 0;
      while (!sb_b) @(posedge clk);
      @(posedge clk);
      check(res_b == r, $sformatf("vector %0d: %h expected %h", t, res_b, r));
      check(lat == 846, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
