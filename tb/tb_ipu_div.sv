// tb_ipu_div: self-checking test of the iterative divider.
// Starts random unsigned divisions (including divide by zero and by one),
// checks the quotient against the / operator, and checks that done (with
// the quotient) comes in the 8th cycle counting the start cycle as the
// first, the published divide latency.
module tb_ipu_div;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, start, busy, done;
  logic [15:0] a, b, q;
  ipu_div dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .q);
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int lat;
    logic [15:0] e;
    rst_n = 0; start = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (n % 7 == 1) b = 16'($urandom_range(1, 15));
      if (n == 2) b = 0;
      if (n == 3) b = 1;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      // count cycles, the start cycle being the first
      lat = 2;
      while (!done) begin @(negedge clk); lat++; end
      e = (b == 0) ? 16'hffff : a / b;
      checks++;
      if (q !== e) begin
        failures++;
        if (failures < 10) $display("%0d / %0d = %0d exp %0d", a, b, q, e);
      end
      checks++;
      if (lat != 8) begin
        failures++;
        if (failures < 10) $display("latency %0d, expected 8", lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
