// line_model: behavioural model of the optical link as seen after the
// binarisation circuit. send() puts bits on the line at bit_ns per bit, which
// may differ from the receiver's 160 ns to model a clock offset between the
// two ends. shrink_ns ends every run of 1s early (pulse-width shrinkage of a
// slow LED). Runs of 1s whose number (counted from 1 within the call) equals
// drop_a or drop_b are removed, which models a pulse lost below the
// threshold: one rising edge, i.e. one received bit, goes missing.
module line_model (
  output logic line
);
  initial line = 1'b0;

  task automatic send(input logic bits [], input real bit_ns, input real shrink_ns,
                      input int drop_a, input int drop_b);
    int run;
    logic prev, drop;
    run = 0;
    prev = line;
    drop = 1'b0;
    for (int i = 0; i < bits.size(); i++) begin
      logic b, nextb;
      b = bits[i];
      nextb = (i + 1 < bits.size()) ? bits[i+1] : 1'b0;
      if (b && !prev) begin
        run++;
        drop = (run == drop_a) || (run == drop_b);
      end
      if (b && !nextb && shrink_ns > 0.0) begin
        line = b && !drop;
        #(bit_ns - shrink_ns);
        line = 1'b0;
        #(shrink_ns);
      end else begin
        line = b && !drop;
        #(bit_ns);
      end
      prev = b;
    end
  endtask

  // alternating idle pattern, n bits, 1 first
  task automatic idle(input int n, input real bit_ns);
    logic bits [];
    bits = new[n];
    for (int i = 0; i < n; i++) bits[i] = (i % 2 == 0);
    send(bits, bit_ns, 0.0, 0, 0);
  endtask
endmodule
