// cc_gen_cmp: generalized comparator of a c-core datapath.
//
// A comparison in the source code (for example i < n) is built as a
// comparator that can evaluate any of the six relations, chosen by a 3-bit
// configuration field, so a patch can change the relation.  Encoding (this
// design's own): 0 <, 1 <=, 2 >, 3 >=, 4 ==, 5 !=; 6 and 7 give 0.
// Operands are compared as signed integers (C int).  Combinational.
module cc_gen_cmp #(
  parameter int W = 32
) (
  input  logic [2:0]   cfg_rel,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         y
);
  logic lt, eq;
  assign lt = $signed(a) < $signed(b);
  assign eq = (a == b);
  always_comb begin
    unique case (cfg_rel)
      3'd0: y = lt;
      3'd1: y = lt | eq;
      3'd2: y = ~(lt | eq);
      3'd3: y = ~lt;
      3'd4: y = eq;
      3'd5: y = ~eq;
      default: y = 1'b0;
    endcase
  end
endmodule
