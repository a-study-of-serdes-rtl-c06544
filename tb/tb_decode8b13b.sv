// tb_decode8b13b: packets of random bytes are turned into rising-edge
// patterns with the reference table and decoded; the bytes must come back,
// code_err must stay low, and strobe must come NBYTES + 1 clocks after start.
// A packet with one corrupted pattern must raise code_err.
module tb_decode8b13b;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, strobe, code_err;
  logic [844:0] din;
  logic [64:0][7:0] dout;
  logic [12:0] tab [256];
  logic [7:0] bytes [65];
  int checks = 0, failures = 0;
  longint cyc = 0, t_st = 0, lat = 0;

  decode8b13b dut (.clk, .rst_n, .start, .data_in(din), .data_out(dout), .strobe, .code_err);

  always @(posedge clk) begin
    cyc++;
    if (start) t_st = cyc;
    if (strobe) lat = cyc - t_st;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run();
    @(posedge clk) start <= 1;
    @(posedge clk) start <= 0;
    while (!strobe) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    build_table(tab);
    start = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      for (int b = 0; b < 65; b++) begin
        bytes[b] = (t == 0) ? 8'(b) : ((t == 1) ? 8'(b + 190) : 8'($urandom));
        din[844 - 13*b -: 13] = edge13(tab[bytes[b]]);
      end
      run();
      for (int b = 0; b < 65; b++)
        check(dout[b] == bytes[b], $sformatf("byte %0d: %0d expected %0d", b, dout[b], bytes[b]));
      check(!code_err, "code_err on a good packet");
      check(lat == 66, $sformatf("latency %0d", lat));
    end
    // a pattern with two adjacent 1s is never a rising-edge form
    din[844 - 13*7 -: 13] = 13'b0000000000011;
    run();
    check(code_err, "bad pattern not flagged");
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
