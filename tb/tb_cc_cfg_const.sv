// tb_cc_cfg_const: self-checking test of a configurable constant.
// Checks the reset value equals the compiled-in constant, that writes
// change only the low 8 bits one cycle later, and that the upper 24 bits
// never change.
module tb_cc_cfg_const;
  localparam logic [31:0] ORIG = 32'h1234_5678;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, we;
  logic [7:0] wdata, low;
  logic [31:0] value;
  cc_cfg_const #(.ORIG(ORIG)) dut (.clk, .rst_n, .we, .wdata, .value);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    rst_n = 0; we = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (value !== ORIG) begin failures++; $display("reset value %h", value); end
    low = ORIG[7:0];
    for (int n = 0; n < 300; n++) begin
      we = 1'($urandom); wdata = 8'($urandom);
      @(negedge clk);
      if (we) low = wdata;
      we = 0;
      checks++;
      if (value !== {ORIG[31:8], low}) begin
        failures++;
        if (failures < 10) $display("value %h exp %h", value, {ORIG[31:8], low});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
