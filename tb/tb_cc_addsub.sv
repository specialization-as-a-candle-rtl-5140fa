// tb_cc_addsub: self-checking test of the generalized add/subtract operator.
// Random operands with the configuration bit set both ways, compared with
// + and - computed in the testbench.
module tb_cc_addsub;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cfg_sub;
  logic [31:0] a, b, y;
  cc_addsub dut (.cfg_sub, .a, .b, .y);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 1000; n++) begin
      cfg_sub = 1'(n); a = $urandom; b = $urandom;
      @(posedge clk);
      checks++;
      if (y !== (cfg_sub ? a - b : a + b)) begin
        failures++;
        if (failures < 10) $display("sub=%b a=%h b=%h y=%h", cfg_sub, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
