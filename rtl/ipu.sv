// ipu: the Image Processing Unit.
//
// NUM_CORES Stencil Processor / Line Buffer Pool cores (8 by default) and an
// I/O block (DMA engines plus its own pool, LBP0) sit on a bidirectional
// ring NoC.  A pipeline of image kernels runs with one kernel per STP: the
// DMA streams the input image from external memory into a line buffer, each
// STP pulls sheets from its own pool, computes, and pushes result blocks
// over the ring into the line buffer of the next stage, and a DMA output
// channel drains the last buffer from LBP0 back to memory.  Intermediate
// images never leave the chip.
//
// Control (standing in for the CPU's CSR writes over APB): csr_we,
// csr_addr, csr_wdata.  csr_addr[15:12] selects the unit: 0 the I/O block,
// 1..NUM_CORES a core, 15 global.  csr_addr[11:8] selects the function:
//   core  0: instruction staging word csr_addr[1:0] (4 x 32 bits = one VLIW)
//   core  1: commit the staged VLIW to instruction RAM entry csr_wdata
//   core  2, I/O 2: line-buffer configuration, lb csr_addr[6:4], field csr_addr[3:0]
//   core  3: start the STP program at address 0
//   I/O   4: DMA channel csr_addr[7:4], field csr_addr[3:0]
//   global 0: power mask, bit i-1 powers core i (the ring bypasses cores that are off)
// irq pulses when any STP halts or raises an interrupt, or a DMA channel
// completes.  The counters (STP stall cycles, LBP stall/starve cycles, ring
// drops) are brought out for observation.
//
// Core numbering and ring order, STP/LBP pairing and the I/O block contents
// follow the published architecture; the CSR map and the push-only use of
// the ring (remote reads are not built) are this design's choices.  The
// I/O block's MMU, shared storage pool and MIPI ports are not modelled.
module ipu
  import ipu_pkg::*;
#(
  parameter int NUM_CORES  = 8,
  parameter int ARR        = 16,
  parameter int HALO       = 2,
  parameter int NLB        = 8,
  parameter int LB_WORDS   = 8192,
  parameter int IRAM_DEPTH = 2048,
  parameter int NCH        = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        csr_we,
  input  logic [15:0]                 csr_addr,
  input  logic [31:0]                 csr_wdata,
  output logic                        irq,
  output logic [NUM_CORES-1:0]        core_running,
  output logic [NCH-1:0]              dma_done,
  output logic [31:0]                 mem_addr,
  output logic                        mem_we,
  output logic [W-1:0]                mem_wdata,
  input  logic [W-1:0]                mem_rdata,
  output logic [NUM_CORES-1:0][31:0]  stp_stall_cycles,
  output logic [NUM_CORES:0][31:0]    lbp_stall_cycles,
  output logic [NUM_CORES:0][31:0]    lbp_starve_cycles,
  output logic [15:0]                 ring_drops
);
  localparam int NS = NUM_CORES + 1;

  function automatic int id_at(input int pos);
    if (pos == 0)                   return 0;
    else if (pos <= NUM_CORES / 2)  return 2 * pos - 1;
    else                            return 2 * (NUM_CORES + 1 - pos);
  endfunction

  // ---------------- CSR decode ------------------------------------------------
  logic [3:0]             unit, fn;
  logic [127:0]           stage;
  logic [NUM_CORES-1:0]   pwr;
  assign unit = csr_addr[15:12];
  assign fn   = csr_addr[11:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0; pwr <= '1;
    end else if (csr_we) begin
      if (unit != 4'd15 && unit != 4'd0 && fn == 4'd0)
        stage[csr_addr[1:0] * 32 +: 32] <= csr_wdata;
      if (unit == 4'd15 && fn == 4'd0) pwr <= csr_wdata[NUM_CORES-1:0];
    end
  end

  // ---------------- ring wiring ---------------------------------------------
  logic  cw_v [NS], cw_r [NS], ccw_v [NS], ccw_r [NS];
  flit_t cw_f [NS], ccw_f [NS];
  logic  inj_v [NS], inj_r [NS], ej_v [NS], ej_r [NS];
  flit_t inj_f [NS], ej_f [NS];
  logic [15:0] drops [NS];

  // per-pool ports (index 0 = LBP0 in the I/O block)
  logic                      rd_v [NS], rd_r [NS], rel_v [NS];
  logic [2:0]                rd_lb [NS], rel_lb [NS], rel_id [NS];
  logic signed [COORD_W:0]   rd_x [NS], rd_y [NS];
  logic [PIX_BLK-1:0][W-1:0] rd_d [NS];
  logic [COORD_W:0]          rel_row [NS];
  logic [NS-1:0]             irqs;

  for (genvar id = 0; id < NS; id++) begin : g_node
    localparam int P    = ring_pos(id, NUM_CORES);
    localparam int PREV = id_at((P + NS - 1) % NS);   // clockwise predecessor
    localparam int NEXT = id_at((P + 1) % NS);        // clockwise successor

    ipu_noc_stop #(.ID(id), .NCORES(NUM_CORES)) u_stop (
      .clk, .rst_n, .pwr_on(id == 0 ? 1'b1 : pwr[(id == 0 ? 1 : id) - 1]),
      .cw_in_valid(cw_v[PREV]), .cw_in_ready(cw_r[PREV]), .cw_in(cw_f[PREV]),
      .cw_out_valid(cw_v[id]), .cw_out_ready(cw_r[id]), .cw_out(cw_f[id]),
      .ccw_in_valid(ccw_v[NEXT]), .ccw_in_ready(ccw_r[NEXT]), .ccw_in(ccw_f[NEXT]),
      .ccw_out_valid(ccw_v[id]), .ccw_out_ready(ccw_r[id]), .ccw_out(ccw_f[id]),
      .inj_valid(inj_v[id]), .inj_ready(inj_r[id]), .inj(inj_f[id]),
      .ej_valid(ej_v[id]), .ej_ready(ej_r[id]), .ej(ej_f[id]), .drop_cnt(drops[id]));

    ipu_lbp #(.NLB(NLB), .LB_WORDS(LB_WORDS)) u_lbp (
      .clk, .rst_n,
      .cfg_we(csr_we && int'(unit) == id && fn == 4'd2), .cfg_lb(csr_addr[6:4]),
      .cfg_field(csr_addr[3:0]), .cfg_wdata(csr_wdata[15:0]),
      .wr_valid(ej_v[id]), .wr_ready(ej_r[id]), .wr_lb(ej_f[id].lb),
      .wr_x(ej_f[id].x), .wr_y(ej_f[id].y), .wr_data(ej_f[id].data),
      .rd_valid(rd_v[id]), .rd_ready(rd_r[id]), .rd_lb(rd_lb[id]),
      .rd_x(rd_x[id]), .rd_y(rd_y[id]), .rd_data(rd_d[id]),
      .rel_valid(rel_v[id]), .rel_lb(rel_lb[id]), .rel_id(rel_id[id]), .rel_row(rel_row[id]),
      .stall_cnt(lbp_stall_cycles[id]), .starve_cnt(lbp_starve_cycles[id]));

    if (id == 0) begin : g_io
      logic dma_irq;
      ipu_dma #(.NCH(NCH)) u_dma (
        .clk, .rst_n,
        .cfg_we(csr_we && unit == 4'd0 && fn == 4'd4), .cfg_ch(csr_addr[4 +: $clog2(NCH)]),
        .cfg_field(csr_addr[3:0]), .cfg_wdata(csr_wdata),
        .done(dma_done), .irq(dma_irq),
        .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
        .flit_valid(inj_v[0]), .flit_ready(inj_r[0]), .flit(inj_f[0]),
        .lbp_rd_valid(rd_v[0]), .lbp_rd_ready(rd_r[0]), .lbp_rd_lb(rd_lb[0]),
        .lbp_rd_x(rd_x[0]), .lbp_rd_y(rd_y[0]), .lbp_rd_data(rd_d[0]),
        .rel_valid(rel_v[0]), .rel_lb(rel_lb[0]), .rel_id(rel_id[0]), .rel_row(rel_row[0]));
      assign irqs[0] = dma_irq;
    end else begin : g_core
      logic stp_irq, run;
      ipu_stp #(.ARR(ARR), .HALO(HALO), .IRAM_DEPTH(IRAM_DEPTH)) u_stp (
        .clk, .rst_n,
        .iram_we(csr_we && int'(unit) == id && fn == 4'd1),
        .iram_addr(csr_wdata[$clog2(IRAM_DEPTH)-1:0]), .iram_wdata(stage[VLIW_W-1:0]),
        .start(csr_we && int'(unit) == id && fn == 4'd3 && pwr[id - 1]),
        .running(run), .irq(stp_irq),
        .lbp_rd_valid(rd_v[id]), .lbp_rd_ready(rd_r[id]), .lbp_rd_lb(rd_lb[id]),
        .lbp_rd_x(rd_x[id]), .lbp_rd_y(rd_y[id]), .lbp_rd_data(rd_d[id]),
        .rel_valid(rel_v[id]), .rel_lb(rel_lb[id]), .rel_id(rel_id[id]), .rel_row(rel_row[id]),
        .flit_valid(inj_v[id]), .flit_ready(inj_r[id]), .flit(inj_f[id]),
        .stall_cycles(stp_stall_cycles[id - 1]));
      assign irqs[id] = stp_irq;
      assign core_running[id - 1] = run;
    end
  end

  assign irq = |irqs;

  always_comb begin
    ring_drops = '0;
    for (int i = 0; i < NS; i++) ring_drops = ring_drops + drops[i];
  end
endmodule
