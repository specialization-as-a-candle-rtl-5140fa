// candle_top: the two specialized architectures side by side.
//
//   * u_ipu   - the Image Processing Unit: 8 Stencil Processor / Line
//               Buffer Pool cores and an I/O block on a bidirectional ring,
//               for stencil-based image processing pipelines.
//   * u_tile  - the c-core part of a GreenDroid tile: conservation cores
//               reached through the state tree and sharing the CPU's L1 port.
//   * u_murn  - the MiniDroid chip ring network (MURN) with its off-chip
//               I/O block.
// The designs are independent; each brings out its own ports.  Parts that
// lie outside (the IPU's control CPU and DRAM, the tile's CPU and L1 cache,
// the MURN design nodes and the off-chip channel partner) connect through
// these ports.  The parameters size the IPU; their defaults are the
// published configuration (8 cores, 16x16 arrays, 8 line buffers of 8192
// words per pool, 2048-entry instruction RAMs, 16 DMA channels).  Timing is
// that of the three blocks: all are synchronous to clk with active-low
// reset.
module candle_top
  import ipu_pkg::*;
  import murn_pkg::*;
#(
  parameter int NUM_CORES  = 8,
  parameter int ARR        = 16,
  parameter int NLB        = 8,
  parameter int LB_WORDS   = 8192,
  parameter int IRAM_DEPTH = 2048,
  parameter int NCH        = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // IPU
  input  logic                 ipu_csr_we,
  input  logic [15:0]          ipu_csr_addr,
  input  logic [31:0]          ipu_csr_wdata,
  output logic                 ipu_irq,
  output logic [NUM_CORES-1:0] ipu_core_running,
  output logic [NCH-1:0]       ipu_dma_done,
  output logic [31:0]          ipu_mem_addr,
  output logic                 ipu_mem_we,
  output logic [15:0]          ipu_mem_wdata,
  input  logic [15:0]          ipu_mem_rdata,
  output logic [NUM_CORES-1:0][31:0] ipu_stp_stall_cycles,
  output logic [NUM_CORES:0][31:0]   ipu_lbp_stall_cycles,
  output logic [NUM_CORES:0][31:0]   ipu_lbp_starve_cycles,
  output logic [15:0]          ipu_ring_drops,
  // GreenDroid tile
  input  logic                 gd_st_req_valid,
  input  logic                 gd_st_req_we,
  input  logic [31:0]          gd_st_req_addr,
  input  logic [31:0]          gd_st_req_wdata,
  output logic                 gd_st_resp_valid,
  output logic [31:0]          gd_st_resp_rdata,
  input  logic                 gd_cpu_req,
  input  logic                 gd_cpu_we,
  input  logic [31:0]          gd_cpu_addr,
  input  logic [31:0]          gd_cpu_wdata,
  output logic                 gd_cpu_valid,
  output logic [31:0]          gd_cpu_rdata,
  output logic                 gd_l1_req,
  output logic                 gd_l1_we,
  output logic [31:0]          gd_l1_addr,
  output logic [31:0]          gd_l1_wdata,
  input  logic                 gd_l1_valid,
  input  logic [31:0]          gd_l1_rdata,
  output logic                 gd_irq,
  output logic [1:0]           gd_cc_active,
  output logic [1:0][31:0]     gd_cachelet_hits,
  // MURN ring
  input  logic [3:0]           murn_ch_en,
  output logic [3:0]           murn_tx_valid,
  output logic [3:0][7:0]      murn_tx_data,
  input  logic [3:0]           murn_tx_ack,
  input  logic [3:0]           murn_rx_valid,
  input  logic [3:0][7:0]      murn_rx_data,
  output logic [3:0]           murn_rx_ack,
  output logic [1:0]           murn_node_rx_valid,
  input  logic [1:0]           murn_node_rx_ready,
  output murn_pkt_t [1:0]      murn_node_rx_pkt,
  input  logic [1:0]           murn_node_tx_valid,
  output logic [1:0]           murn_node_tx_ready,
  input  murn_pkt_t [1:0]      murn_node_tx_pkt,
  output logic [1:0]           murn_node_pwr,
  output logic [1:0]           murn_node_rst,
  output logic [1:0]           murn_node_en,
  output logic [15:0]          murn_drops
);
  ipu #(.NUM_CORES(NUM_CORES), .ARR(ARR), .NLB(NLB), .LB_WORDS(LB_WORDS),
        .IRAM_DEPTH(IRAM_DEPTH), .NCH(NCH)) u_ipu (
    .clk, .rst_n, .csr_we(ipu_csr_we), .csr_addr(ipu_csr_addr), .csr_wdata(ipu_csr_wdata),
    .irq(ipu_irq), .core_running(ipu_core_running), .dma_done(ipu_dma_done),
    .mem_addr(ipu_mem_addr), .mem_we(ipu_mem_we), .mem_wdata(ipu_mem_wdata),
    .mem_rdata(ipu_mem_rdata), .stp_stall_cycles(ipu_stp_stall_cycles),
    .lbp_stall_cycles(ipu_lbp_stall_cycles), .lbp_starve_cycles(ipu_lbp_starve_cycles),
    .ring_drops(ipu_ring_drops));

  greendroid_tile u_tile (
    .clk, .rst_n,
    .st_req_valid(gd_st_req_valid), .st_req_we(gd_st_req_we), .st_req_addr(gd_st_req_addr),
    .st_req_wdata(gd_st_req_wdata), .st_resp_valid(gd_st_resp_valid), .st_resp_rdata(gd_st_resp_rdata),
    .cpu_req(gd_cpu_req), .cpu_we(gd_cpu_we), .cpu_addr(gd_cpu_addr), .cpu_wdata(gd_cpu_wdata),
    .cpu_valid(gd_cpu_valid), .cpu_rdata(gd_cpu_rdata),
    .l1_req(gd_l1_req), .l1_we(gd_l1_we), .l1_addr(gd_l1_addr), .l1_wdata(gd_l1_wdata),
    .l1_valid(gd_l1_valid), .l1_rdata(gd_l1_rdata), .irq(gd_irq), .cc_active(gd_cc_active),
    .cachelet_hits(gd_cachelet_hits));

  murn_ring u_murn (
    .clk, .rst_n, .ch_en(murn_ch_en),
    .tx_valid(murn_tx_valid), .tx_data(murn_tx_data), .tx_ack(murn_tx_ack),
    .rx_valid(murn_rx_valid), .rx_data(murn_rx_data), .rx_ack(murn_rx_ack),
    .node_rx_valid(murn_node_rx_valid), .node_rx_ready(murn_node_rx_ready),
    .node_rx_pkt(murn_node_rx_pkt), .node_tx_valid(murn_node_tx_valid),
    .node_tx_ready(murn_node_tx_ready), .node_tx_pkt(murn_node_tx_pkt),
    .node_pwr(murn_node_pwr), .node_rst(murn_node_rst), .node_en(murn_node_en),
    .drops(murn_drops));
endmodule
