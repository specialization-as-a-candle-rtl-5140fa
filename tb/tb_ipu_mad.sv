// tb_ipu_mad: self-checking test of the lane multiply-add unit.
// Random signed 16x16 products plus or minus a 32-bit addend, shifted right
// arithmetically by a random fraction width, against a reference computed
// with 64-bit integers in the testbench.  The unit is combinational: one
// result per cycle.
module tb_ipu_mad;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] a, b;
  logic [31:0] c, y;
  logic sub;
  logic [3:0] fshift;
  ipu_mad dut (.a, .b, .c, .sub, .fshift, .y);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint p, r;
      a = 16'($urandom); b = 16'($urandom); c = $urandom;
      sub = 1'($urandom); fshift = (n < 1000) ? 4'd0 : 4'($urandom);
      @(posedge clk);
      p = longint'($signed(a)) * longint'($signed(b));
      r = sub ? p - longint'($signed(c)) : p + longint'($signed(c));
      r = longint'($signed(32'(r))) >>> fshift;
      checks++;
      if (y !== 32'(r)) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h c=%h sub=%b sh=%0d y=%h exp=%h", a, b, c, sub, fshift, y, 32'(r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
