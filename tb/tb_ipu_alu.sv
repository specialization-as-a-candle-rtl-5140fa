// tb_ipu_alu: self-checking test of the 16-bit lane ALU.
// Random operands for every operation, compared with a reference model
// written independently in the testbench; also checks that two ALUs chained
// through cout/cin add and subtract 32-bit values.  Combinational block, so
// a small clock only paces the test and drives the watchdog.
module tb_ipu_alu;
  import ipu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [5:0] op;
  logic [15:0] a, b, y, yh, exp_y;
  logic use_cin, cin, cout, couth;
  ipu_alu dut (.op, .a, .b, .use_cin, .cin, .y, .cout);
  // second ALU for the 32-bit pair
  logic [15:0] ah, bh;
  ipu_alu dut_hi (.op, .a(ah), .b(bh), .use_cin(1'b1), .cin(cout), .y(yh), .cout(couth));

  function automatic logic [15:0] model(input logic [5:0] o, input logic [15:0] x, input logic [15:0] z);
    int sx, sz;
    sx = $signed(x); sz = $signed(z);
    case (o)
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_AND: return x & z;
      OP_OR:  return x | z;
      OP_XOR: return x ^ z;
      OP_NOT: return ~x;
      OP_SHL: return x << (z % 16);
      OP_SHR: return x >> (z % 16);
      OP_SRA: return 16'(sx >>> (z % 16));
      OP_SEQ: return (x == z) ? 16'd1 : 16'd0;
      OP_SLT: return (sx < sz) ? 16'd1 : 16'd0;
      OP_MAX: return (sx > sz) ? x : z;
      OP_MIN: return (sx < sz) ? x : z;
      OP_ABS: return (sx < 0) ? 16'(-sx) : x;
      OP_CLZ: begin
        for (int i = 15; i >= 0; i--) if (x[i]) return 16'(15 - i);
        return 16'd16;
      end
      OP_MOV: return x;
      default: return 16'd0;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    use_cin = 0; cin = 0; ah = 0; bh = 0;
    for (int o = OP_ADD; o <= OP_MOV; o++) begin
      for (int n = 0; n < 200; n++) begin
        op = 6'(o); a = 16'($urandom); b = 16'($urandom);
        if (n < 4) a = (n == 0) ? 16'h0 : (n == 1) ? 16'h8000 : (n == 2) ? 16'h0001 : 16'hffff;
        if (n == 5) b = a;
        @(posedge clk);
        exp_y = model(op, a, b);
        checks++;
        if (y !== exp_y) begin
          failures++;
          if (failures < 10) $display("op %0d a=%h b=%h y=%h exp=%h", o, a, b, y, exp_y);
        end
      end
    end
    // 32-bit paired add / subtract
    for (int n = 0; n < 500; n++) begin
      logic [31:0] x, z, r;
      x = $urandom; z = $urandom;
      op = (n % 2 == 0) ? 6'(OP_ADD) : 6'(OP_SUB);
      {ah, a} = x; {bh, b} = z;
      @(posedge clk);
      r = (n % 2 == 0) ? x + z : x - z;
      checks++;
      if ({yh, y} !== r) begin
        failures++;
        if (failures < 10) $display("pair op %0d %h %h got %h exp %h", op, x, z, {yh, y}, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
