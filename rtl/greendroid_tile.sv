// greendroid_tile: the c-core side of a GreenDroid tile.
//
// A tile couples a general-purpose CPU with a set of conservation cores.
// The c-cores are reached from the CPU through the pipelined state tree
// (the control interface: arguments, patches, status) and share the CPU's
// L1 data cache port through a multiplexer, so switching between CPU and
// c-core needs no cache flush.  Only one c-core is active at a time; while
// one is active it owns the L1 port and CPU accesses wait.  Each c-core
// reaches the multiplexer through its own cachelet.
//
// This tile holds NCC copies of the computeArraySum c-core (c-core ids
// 0..NCC-1 on the state tree).  The CPU, its caches and the on-chip network
// lie outside: the CPU's state-tree and L1 ports come in, the shared L1 port
// goes out.  irq is high while any c-core has finished or raised an
// exception.  L1 handshake: *_req held with address until *_valid.
// The organisation follows the published tile; the c-core count and the
// priority rule are this design's choices.
module greendroid_tile #(
  parameter int NCC = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU state-tree instructions (move to / move from state tree)
  input  logic        st_req_valid,
  input  logic        st_req_we,
  input  logic [31:0] st_req_addr,
  input  logic [31:0] st_req_wdata,
  output logic        st_resp_valid,
  output logic [31:0] st_resp_rdata,
  // CPU data port
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic        cpu_valid,
  output logic [31:0] cpu_rdata,
  // shared L1 data cache port
  output logic        l1_req,
  output logic        l1_we,
  output logic [31:0] l1_addr,
  output logic [31:0] l1_wdata,
  input  logic        l1_valid,
  input  logic [31:0] l1_rdata,
  output logic        irq,
  output logic [NCC-1:0] cc_active,
  output logic [NCC-1:0][31:0] cachelet_hits
);
  logic [NCC-1:0]       leaf_we, leaf_re, done, exc;
  logic [25:0]          leaf_addr;
  logic [31:0]          leaf_wdata;
  logic [NCC-1:0][31:0] leaf_rdata;

  cc_state_tree #(.NCC(NCC)) u_tree (
    .clk, .rst_n, .req_valid(st_req_valid), .req_we(st_req_we), .req_addr(st_req_addr),
    .req_wdata(st_req_wdata), .resp_valid(st_resp_valid), .resp_rdata(st_resp_rdata),
    .leaf_we, .leaf_re, .leaf_addr, .leaf_wdata, .leaf_rdata);

  logic [NCC-1:0]       c_req, c_we, c_valid;
  logic [NCC-1:0][31:0] c_addr, c_wdata;
  logic [NCC-1:0]       ld_en, ld_valid;
  logic [NCC-1:0][31:0] ld_addr, ld_value;

  for (genvar c = 0; c < NCC; c++) begin : g_cc
    logic [31:0] misses_unused;
    cc_array_sum u_cc (
      .clk, .rst_n, .leaf_we(leaf_we[c]), .leaf_re(leaf_re[c]), .leaf_addr, .leaf_wdata,
      .leaf_rdata(leaf_rdata[c]), .ld_en(ld_en[c]), .ld_addr(ld_addr[c]),
      .ld_valid(ld_valid[c]), .ld_value(ld_value[c]),
      .active(cc_active[c]), .done(done[c]), .exc(exc[c]));
    cc_cachelet u_cl (
      .clk, .rst_n, .req(ld_en[c]), .we(1'b0), .addr(ld_addr[c]), .wdata('0),
      .valid(ld_valid[c]), .rdata(ld_value[c]),
      .l1_req(c_req[c]), .l1_we(c_we[c]), .l1_addr(c_addr[c]), .l1_wdata(c_wdata[c]),
      .l1_valid(c_valid[c]), .l1_rdata, .hits(cachelet_hits[c]), .misses(misses_unused));
  end

  // L1 multiplexer: the active c-core (lowest index) owns the port, else the CPU
  logic            any_cc;
  int              owner;
  always_comb begin
    any_cc = 1'b0; owner = '0;
    for (int c = NCC - 1; c >= 0; c--)
      if (cc_active[c]) begin any_cc = 1'b1; owner = c; end
  end

  always_comb begin
    c_valid = '0;
    if (any_cc) begin
      l1_req = c_req[owner]; l1_we = c_we[owner]; l1_addr = c_addr[owner]; l1_wdata = c_wdata[owner];
      c_valid[owner] = l1_valid;
      cpu_valid = 1'b0;
    end else begin
      l1_req = cpu_req; l1_we = cpu_we; l1_addr = cpu_addr; l1_wdata = cpu_wdata;
      cpu_valid = l1_valid;
    end
  end
  assign cpu_rdata = l1_rdata;
  assign irq = |(done | exc);

  always_ff @(posedge clk) begin
    if (rst_n) assert ($onehot0(cc_active)) else $error("two c-cores active in one tile");
  end
endmodule
