// tb_dll_cdr: a bit stream (alternating preamble, then random 8B13B
// codewords) is turned into 130 ns pulses at each rising edge, with a bit
// time 0.1 % longer, then 0.1 % shorter than 160 ns, so that the sampling
// phase has to be moved. After lock the recovered bits must equal the
// rising-edge form of the sent stream, the loop must use both corrections,
// and bit_valid must come once per 16 clocks on average.
module tb_dll_cdr;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic din = 0, bit_valid, bit_out, locked, inc, dec;
  logic [12:0] tab [256];
  logic sent [$];       // rising-edge form of what was sent
  logic got [$];
  int checks = 0, failures = 0, n_inc = 0, n_dec = 0;
  longint n_valid = 0, t_first = 0, t_last = 0, cyc = 0;

  dll_cdr dut (.clk, .rst_n, .din, .bit_valid, .bit_out, .locked, .inc, .dec);

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (inc) n_inc++;
      if (dec) n_dec++;
      if (bit_valid && locked) begin
        got.push_back(bit_out);
        if (n_valid == 0) t_first = cyc;
        t_last = cyc;
        n_valid++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_bit(input logic b, input logic prev, input real bit_ns);
    sent.push_back(b && !prev);
    if (b && !prev) begin
      din = 1;
      #(130.0);
      din = 0;
      #(bit_ns - 130.0);
    end else begin
      #(bit_ns);
    end
  endtask

  initial begin
    logic prev;
    int off, best;
    build_table(tab);
    #27 rst_n = 1;
    prev = 0;
    for (int ph = 0; ph < 2; ph++) begin
      real bn;
      bn = (ph == 0) ? 160.16 : 159.84;
      for (int i = 0; i < 40; i++) begin send_bit(i % 2 == 0, prev, bn); prev = (i % 2 == 0); end
      for (int w = 0; w < 150; w++) begin
        logic [12:0] c;
        c = tab[$urandom_range(0, 255)];
        for (int i = 12; i >= 0; i--) begin send_bit(c[i], prev, bn); prev = c[i]; end
      end
    end
    #1000;
    // align: the first recovered bit is one of the first 40 sent bits
    best = -1;
    for (off = 0; off < 40 && best < 0; off++) begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 200; i++) if (got[i] != sent[off + i]) ok = 0;
      if (ok) best = off;
    end
    check(best >= 0, "no alignment found");
    if (best >= 0) begin
      int bad;
      bad = 0;
      for (int i = 0; i + best < sent.size() && i < got.size(); i++)
        if (got[i] != sent[best + i]) bad++;
      check(bad == 0, $sformatf("%0d recovered bits wrong", bad));
      check(got.size() >= sent.size() - best - 2, $sformatf("bits recovered %0d of %0d", got.size(), sent.size() - best));
    end
    check(n_inc > 0 && n_dec > 0, $sformatf("corrections inc %0d dec %0d", n_inc, n_dec));
    check(n_valid > 1000 && (t_last - t_first) < (n_valid - 1) * 16 + 60 &&
          (t_last - t_first) > (n_valid - 1) * 16 - 60, "bit rate");
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
