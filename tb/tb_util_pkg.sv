// tb_util_pkg: reference models shared by the testbenches, written
// independently of the RTL.
//  - crc16_ref: CRC-16-CCITT (poly 0x1021, preset 0xFFFF), MSB first.
//  - build_table: the 8B13B table from its defining rule, computed at run
//    time: for every rising-edge pattern keep the largest 13-bit word with a
//    leading 0 and six 1s, sort ascending, start at 0001010110101.
//  - edge13: rising-edge form of a codeword (bit 12 first on the line).
package tb_util_pkg;

  function automatic logic [15:0] crc_step(input logic [15:0] c, input logic b);
    logic f;
    f = c[15] ^ b;
    c = c << 1;
    if (f) c = c ^ 16'h1021;
    return c;
  endfunction

  function automatic logic [12:0] edge13(input logic [12:0] w);
    logic [12:0] e;
    logic prev;
    prev = 1'b0;
    for (int i = 12; i >= 0; i--) begin
      e[i] = w[i] & ~prev;
      prev = w[i];
    end
    return e;
  endfunction

  // table[v] for v = 0..255
  function automatic void build_table(ref logic [12:0] tab [256]);
    bit seen [8192];
    bit keep [8192];
    int k;
    bit started;
    for (int v = 8191; v >= 0; v--) begin
      logic [12:0] w;
      w = 13'(v);
      if (!w[12] && $countones(w) == 6 && !seen[edge13(w)]) begin
        seen[edge13(w)] = 1'b1;
        keep[v] = 1'b1;
      end
    end
    k = 0;
    started = 0;
    for (int v = 0; v < 8192 && k < 256; v++) begin
      if (v == 13'b0001010110101) started = 1;
      if (started && keep[v]) begin
        tab[k] = 13'(v);
        k++;
      end
    end
  endfunction

  // 1B3B: 0 -> 001, 1 -> 010
  function automatic logic [2:0] b3(input logic b);
    return b ? 3'b010 : 3'b001;
  endfunction

  // Line bits of a whole packet (36-bit preamble), first bit at index 0.
  function automatic void build_packet(input logic [7:0] bytes [65], input logic act,
                                       ref logic [12:0] tab [256], ref logic pkt [933]);
    int k;
    logic [15:0] c;
    k = 0;
    c = 16'hFFFF;
    for (int i = 0; i < 36; i++) pkt[k++] = (i % 2 == 0);
    for (int i = 0; i < 4; i++) pkt[k++] = act;
    for (int b = 0; b < 65; b++) begin
      logic [12:0] w, e;
      w = tab[bytes[b]];
      e = edge13(w);
      for (int i = 12; i >= 0; i--) begin
        pkt[k++] = w[i];
        c = crc_step(c, e[i]);
      end
    end
    for (int i = 15; i >= 0; i--) begin
      logic [2:0] t;
      t = b3(c[i]);
      pkt[k++] = t[2]; pkt[k++] = t[1]; pkt[k++] = t[0];
    end
  endfunction

endpackage
