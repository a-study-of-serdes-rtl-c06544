// tb_enc8b13b: checks all 256 entries of the 8B13B table against the table
// rebuilt from its rule, the printed values 0..5, the six-ones weight, the
// leading 0 and that the rising-edge forms are all different.
module tb_enc8b13b;
  import tb_util_pkg::*;

  logic [7:0]  data;
  logic [12:0] code;
  logic [12:0] ref_tab [256];
  int checks = 0, failures = 0;

  enc8b13b dut (.data, .code);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [12:0] printed [6];
    bit seen [8192];
    printed = '{13'b0001010110101, 13'b0001010110110, 13'b0001010111001,
                13'b0001010111010, 13'b0001010111100, 13'b0001011010101};
    build_table(ref_tab);
    for (int v = 0; v < 256; v++) begin
      data = 8'(v);
      #1;
      check(code == ref_tab[v], $sformatf("value %0d code %b expected %b", v, code, ref_tab[v]));
      check($countones(code) == 6 && !code[12], $sformatf("weight/lead of %0d", v));
      check(!seen[edge13(code)], $sformatf("edge form of %0d repeats", v));
      seen[edge13(code)] = 1'b1;
      if (v < 6) check(code == printed[v], $sformatf("printed entry %0d", v));
    end
    // received form of value 3 as printed
    data = 8'd3;
    #1;
    check(edge13(code) == 13'b0001010100010, "edge form of 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
