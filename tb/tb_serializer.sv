// tb_serializer: loads random payloads, sends packets with start bits 1111
// and 0000, samples the line in the middle of every bit and compares the
// 933 bits with a packet built by the reference model (preamble, start bits,
// table codewords, 1B3B CRC of the rising-edge form). Also checks the packet
// length of 933 x 16 clocks (149.28 us) and the alternating idle pattern.
module tb_serializer;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load, start, active, ready, sending, pkt_done, tx_out;
  logic [64:0][7:0] payload;
  logic [12:0] tab [256];
  int checks = 0, failures = 0;
  longint cyc = 0, t_send = 0, t_done = 0;
  logic prev_send = 0;

  serializer dut (.clk, .rst_n, .load, .payload, .start, .active, .ready,
                  .sending, .pkt_done, .tx_out);

  always @(posedge clk) begin
    cyc++;
    if (sending && !prev_send) t_send = cyc;
    if (pkt_done) t_done = cyc;
    prev_send = sending;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected packet, bit 0 first on the line
  function automatic void build(input logic act, ref logic exp [933]);
    int k;
    logic [15:0] c;
    k = 0;
    c = 16'hFFFF;
    for (int i = 0; i < 36; i++) exp[k++] = (i % 2 == 0);
    for (int i = 0; i < 4; i++) exp[k++] = act;
    for (int b = 0; b < 65; b++) begin
      logic [12:0] w, e;
      w = tab[payload[b]];
      e = edge13(w);
      for (int i = 12; i >= 0; i--) begin
        exp[k++] = w[i];
        c = crc_step(c, e[i]);
      end
    end
    for (int i = 15; i >= 0; i--) begin
      logic [2:0] t;
      t = b3(c[i]);
      exp[k++] = t[2]; exp[k++] = t[1]; exp[k++] = t[0];
    end
  endfunction

  task automatic one_packet(input logic act, input bit do_load);
    logic exp [933];
    int bad;
    if (do_load) begin
      for (int i = 0; i < 65; i++) payload[i] = 8'($urandom);
      if (checks == 0) for (int i = 0; i < 6; i++) payload[i] = 8'(i);
      @(posedge clk) load <= 1;
      @(posedge clk) load <= 0;
    end
    build(act, exp);
    @(posedge clk) begin start <= 1; active <= act; end
    @(posedge clk) start <= 0;
    // wait for the first preamble bit on the line
    @(posedge sending);
    @(posedge clk);
    repeat (7) @(posedge clk);
    bad = 0;
    for (int i = 0; i < 933; i++) begin
      if (tx_out !== exp[i]) begin
        bad++;
        if (bad < 5) $display("bit %0d: %b expected %b", i, tx_out, exp[i]);
      end
      repeat (16) @(posedge clk);
    end
    check(bad == 0, $sformatf("packet bits, %0d wrong (active %b)", bad, act));
    repeat (4) @(posedge clk);
    check(t_done - t_send == 933 * 16, $sformatf("packet length %0d clocks", t_done - t_send));
    // idle pattern: alternating, starting with 1
    repeat (4) @(posedge clk);
    for (int i = 0; i < 10; i++) begin
      check(tx_out == (i % 2 == 0), "idle pattern");
      repeat (16) @(posedge clk);
    end
  endtask

  initial begin
    build_table(tab);
    load = 0; start = 0; active = 0; payload = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40) @(posedge clk);
    one_packet(1'b1, 1);
    one_packet(1'b1, 1);
    one_packet(1'b0, 0);
    check(ready, "ready held");
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
