// cc_addsub: generalized adder of a conservation core (c-core) datapath.
//
// A fixed adder becomes an add/subtract unit with one configuration bit
// (cfg_sub), so a firmware patch can turn an addition in the original code
// into a subtraction.  Combinational: y = cfg_sub ? a - b : a + b.
// Following the published patching mechanism; the width is a parameter.
module cc_addsub #(
  parameter int W = 32
) (
  input  logic         cfg_sub,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  assign y = a + (cfg_sub ? ~b : b) + W'(cfg_sub);
endmodule
