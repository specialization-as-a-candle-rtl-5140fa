// cc_state_tree: the pipelined state-tree control interface between a tile's
// CPU and its conservation cores.
//
// Every c-core register has a 32-bit address: c-core id [31:26], basic
// block id [25:13] and register id [12:0].  A request travels down a
// three-level tree (tile root, c-core branch, leaf register), each level
// keeping only the address bits it still needs, and a read result travels
// back up three levels.  A write reaches its register 3 cycles after the
// request (the register holds the new value in the cycle after the third
// clock edge); a read returns 6 cycles after the request (resp_valid high
// for one cycle after the sixth edge).  The tree is fully pipelined: one
// request may enter every cycle.  Requests for a c-core id >= NCC are
// ignored (a read returns 0).
//
// Leaf side: leaf_we / leaf_re select one c-core; leaf_addr carries the
// basic-block and register ids; a c-core answers a read combinationally on
// its leaf_rdata.  Latencies and address format follow the published
// design; the level structure is this design's reading of it.
module cc_state_tree #(
  parameter int NCC = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  input  logic                 req_we,
  input  logic [31:0]          req_addr,
  input  logic [31:0]          req_wdata,
  output logic                 resp_valid,
  output logic [31:0]          resp_rdata,
  output logic [NCC-1:0]       leaf_we,
  output logic [NCC-1:0]       leaf_re,
  output logic [25:0]          leaf_addr,
  output logic [31:0]          leaf_wdata,
  input  logic [NCC-1:0][31:0] leaf_rdata
);
  // level 1: tile root, full address
  logic        s1_v, s1_we;
  logic [31:0] s1_addr, s1_wd;
  // level 2: c-core branch, c-core id decoded to a one-hot select
  logic           s2_v, s2_we;
  logic [NCC-1:0] s2_sel;
  logic [25:0]    s2_addr;
  logic [31:0]    s2_wd;
  // return path
  logic        u1_v, u2_v, u3_v;
  logic [31:0] u1_d, u2_d, u3_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_we <= 1'b0; s1_addr <= '0; s1_wd <= '0;
      s2_v <= 1'b0; s2_we <= 1'b0; s2_sel <= '0; s2_addr <= '0; s2_wd <= '0;
      u1_v <= 1'b0; u2_v <= 1'b0; u3_v <= 1'b0; u1_d <= '0; u2_d <= '0; u3_d <= '0;
    end else begin
      s1_v <= req_valid; s1_we <= req_we; s1_addr <= req_addr; s1_wd <= req_wdata;
      s2_v <= s1_v; s2_we <= s1_we; s2_addr <= s1_addr[25:0]; s2_wd <= s1_wd;
      for (int i = 0; i < NCC; i++) s2_sel[i] <= (int'(s1_addr[31:26]) == i);
      // leaf read captured, then two more levels up
      u1_v <= s2_v && !s2_we;
      u1_d <= '0;
      for (int i = 0; i < NCC; i++) if (s2_sel[i]) u1_d <= leaf_rdata[i];
      u2_v <= u1_v; u2_d <= u1_d;
      u3_v <= u2_v; u3_d <= u2_d;
    end
  end

  assign leaf_we    = (s2_v && s2_we)  ? s2_sel : '0;
  assign leaf_re    = (s2_v && !s2_we) ? s2_sel : '0;
  assign leaf_addr  = s2_addr;
  assign leaf_wdata = s2_wd;
  assign resp_valid = u3_v;
  assign resp_rdata = u3_d;
endmodule
