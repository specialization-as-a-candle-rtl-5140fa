// cc_bitwise_alu: configurable bitwise operator of a c-core datapath.
//
// A single AND or OR of the source code is built as a small bitwise ALU so
// that a patch can swap the operation.  cfg_op (this design's encoding):
// 0 and, 1 or, 2 xor, 3 nor.  Combinational.
module cc_bitwise_alu #(
  parameter int W = 32
) (
  input  logic [1:0]   cfg_op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (cfg_op)
      2'd0: y = a & b;
      2'd1: y = a | b;
      2'd2: y = a ^ b;
      default: y = ~(a | b);
    endcase
  end
endmodule
