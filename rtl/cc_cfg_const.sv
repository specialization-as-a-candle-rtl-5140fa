// cc_cfg_const: configurable constant of a c-core datapath.
//
// Instead of a hard-wired immediate, the c-core holds the constant in a
// register so a patch can change it (a new constant value or a shifted
// structure-field offset).  To save area only the low CFG_BITS bits (8 by
// default) are a register; the upper bits stay hard-wired to the original
// program value ORIG.  The register resets to ORIG's low bits and is written
// through the state tree (we, wdata).  value is available every cycle.
module cc_cfg_const #(
  parameter int          W        = 32,
  parameter int          CFG_BITS = 8,
  parameter logic [W-1:0] ORIG    = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic [CFG_BITS-1:0] wdata,
  output logic [W-1:0]        value
);
  logic [CFG_BITS-1:0] low;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  low <= ORIG[CFG_BITS-1:0];
    else if (we) low <= wdata;
  end
  assign value = {ORIG[W-1:CFG_BITS], low};
endmodule
