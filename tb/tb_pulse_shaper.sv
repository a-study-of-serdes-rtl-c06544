// tb_pulse_shaper: random pulses of 3 to 60 clocks on an asynchronous input
// (edges between clock edges). Every rising input edge that comes while no
// pulse runs must give exactly one 13-clock output pulse starting 3 clocks
// later; din_sync must follow the input.
module tb_pulse_shaper;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic din = 0, din_sync, dout;
  int checks = 0, failures = 0;
  longint cyc = 0, t_rise = -100, t_out = 0;
  int nrise = 0, nout = 0, width = 0;
  logic dprev = 0, oprev = 0;

  pulse_shaper dut (.clk, .rst_n, .din, .din_sync, .dout);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (din && !dprev) begin t_rise = cyc; nrise++; end
      if (dout && !oprev) begin
        nout++;
        t_out = cyc;
        check(t_out - t_rise == 3, $sformatf("delay %0d", t_out - t_rise));
      end
      if (dout) width++;
      if (!dout && oprev) begin
        check(width == 13, $sformatf("width %0d", width));
        width = 0;
      end
    end
    dprev = din;
    oprev = dout;
  end

  initial begin
    #23 rst_n = 1;
    #100;
    for (int i = 0; i < 200; i++) begin
      #(10 * (20 + $urandom_range(0, 10)) + 3);
      din = 1;
      #(10 * $urandom_range(3, 12) + 2);
      din = 0;
    end
    #500;
    check(nout == nrise && nout == 200, $sformatf("pulses %0d edges %0d", nout, nrise));
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
