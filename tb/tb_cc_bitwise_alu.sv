// tb_cc_bitwise_alu: self-checking test of the configurable bitwise ALU.
// Random operands for each of and, or, xor and nor.
module tb_cc_bitwise_alu;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] cfg_op;
  logic [31:0] a, b, y, e;
  cc_bitwise_alu dut (.cfg_op, .a, .b, .y);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 800; n++) begin
      cfg_op = 2'(n); a = $urandom; b = $urandom;
      @(posedge clk);
      case (cfg_op)
        0: e = a & b;
        1: e = a | b;
        2: e = a ^ b;
        default: e = ~(a | b);
      endcase
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("op=%0d a=%h b=%h y=%h", cfg_op, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
