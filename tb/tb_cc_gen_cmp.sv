// tb_cc_gen_cmp: self-checking test of the generalized comparator.
// For each of the six relations (<, <=, >, >=, ==, !=) random signed
// operands, with equal operands one time in four, are compared with the
// testbench's own evaluation of the relation.
module tb_cc_gen_cmp;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [2:0] cfg_rel;
  logic [31:0] a, b;
  logic y, e;
  cc_gen_cmp dut (.cfg_rel, .a, .b, .y);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 1200; n++) begin
      int sa, sb;
      cfg_rel = 3'(n % 6); a = $urandom; b = (n % 5 == 0) ? a : $urandom;
      @(posedge clk);
      sa = $signed(a); sb = $signed(b);
      case (cfg_rel)
        0: e = sa < sb;
        1: e = sa <= sb;
        2: e = sa > sb;
        3: e = sa >= sb;
        4: e = sa == sb;
        default: e = sa != sb;
      endcase
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("rel=%0d a=%h b=%h y=%b", cfg_rel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
