// ipu_alu: one 16-bit ALU of an IPU lane (each compute lane has two).
//
// Combinational.  Operations: add, subtract, and, or, xor, not, shift left,
// logical and arithmetic shift right, set-equal, set-less-than, max, min,
// absolute value, count leading zeros and move.  Comparisons, max, min and
// abs treat the operands as signed two's complement (this design's choice).
// Shift amounts are b[3:0].
//
// Pairing: two ALUs form one 32-bit adder/subtractor.  The low half runs
// with use_cin = 0 and passes cout to the high half, which runs with
// use_cin = 1; bitwise operations pair trivially.  The set of operations
// follows the published instruction list; the encoding is this design's own.
module ipu_alu
  import ipu_pkg::*;
(
  input  logic [5:0]   op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         use_cin,   // high half of a 32-bit pair
  input  logic         cin,
  output logic [W-1:0] y,
  output logic         cout
);
  logic         is_sub;
  logic [W:0]   sum;
  logic [W-1:0] clz;

  assign is_sub = (op == OP_SUB);
  assign sum    = {1'b0, a} + {1'b0, (is_sub ? ~b : b)} + {{W{1'b0}}, (use_cin ? cin : is_sub)};

  always_comb begin
    clz = W[W-1:0];
    for (int i = 0; i < W; i++)
      if (a[i]) clz = W[W-1:0] - 1'b1 - i[W-1:0];
  end

  always_comb begin
    cout = 1'b0;
    unique case (op)
      OP_ADD, OP_SUB: begin y = sum[W-1:0]; cout = sum[W]; end
      OP_AND: y = a & b;
      OP_OR:  y = a | b;
      OP_XOR: y = a ^ b;
      OP_NOT: y = ~a;
      OP_SHL: y = a << b[3:0];
      OP_SHR: y = a >> b[3:0];
      OP_SRA: y = $signed(a) >>> b[3:0];
      OP_SEQ: y = {{(W-1){1'b0}}, a == b};
      OP_SLT: y = {{(W-1){1'b0}}, $signed(a) < $signed(b)};
      OP_MAX: y = ($signed(a) > $signed(b)) ? a : b;
      OP_MIN: y = ($signed(a) < $signed(b)) ? a : b;
      OP_ABS: y = a[W-1] ? (~a + 1'b1) : a;
      OP_CLZ: y = clz;
      OP_MOV: y = a;
      default: y = '0;
    endcase
  end
endmodule
