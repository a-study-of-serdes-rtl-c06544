// tb_crc_corrector: for random single-bit errors at position p of the
// 861-bit word the syndrome is x^p mod g (computed here by running the
// reference CRC over an error-only word); the corrector must find p.
// Double-bit errors must not be found. Checks the search time of p + 2
// clocks from start to done.
module tb_crc_corrector;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done, found;
  logic [15:0] syn;
  logic [9:0] pos;
  int checks = 0, failures = 0;
  longint cyc = 0, t_st = 0, lat = 0;

  crc_corrector dut (.clk, .rst_n, .start, .syndrome(syn), .done, .found, .pos);

  always @(posedge clk) begin
    cyc++;
    if (start) t_st = cyc;
    if (done) lat = cyc - t_st;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // syndrome of an error word: CRC with zero preset over the 845 data bits,
  // xor the 16 CRC bits of the error word
  function automatic logic [15:0] syndrome_of(input int p1, input int p2);
    logic [15:0] c;
    logic [15:0] ce;
    c = 16'h0000;
    ce = 16'h0000;
    for (int i = 860; i >= 16; i--) c = crc_step(c, (i == p1) || (i == p2));
    for (int i = 15; i >= 0; i--) ce[i] = (i == p1) || (i == p2);
    return c ^ ce;
  endfunction

  task automatic run(input logic [15:0] s);
    syn = s;
    @(posedge clk) start <= 1;
    @(posedge clk) start <= 0;
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    start = 0; syn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int p;
      p = (t < 3) ? (t == 0 ? 0 : (t == 1 ? 16 : 860)) : $urandom_range(0, 860);
      run(syndrome_of(p, -1));
      check(found && pos == 10'(p), $sformatf("single error at %0d: found %b pos %0d", p, found, pos));
      check(lat == p + 2, $sformatf("search time %0d for %0d", lat, p));
    end
    for (int t = 0; t < 10; t++) begin
      int p1, p2;
      p1 = $urandom_range(0, 430);
      p2 = $urandom_range(431, 860);
      run(syndrome_of(p1, p2));
      check(!found, $sformatf("double error %0d %0d taken as single", p1, p2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
