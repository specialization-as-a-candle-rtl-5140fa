// ipu_stp: one Stencil Processor: Scalar Lane, lane array (with its shift
// network) and Sheet Generator.
//
// The scalar lane issues one VLIW per cycle; the vector parts go to every
// lane of the array and the sheet operations to the Sheet Generator, which
// reads the core's own Line Buffer Pool and writes results as NoC flits to
// any pool.  Ports: the instruction-RAM write port and start/running/irq of
// the scalar lane, the LBP read and read-pointer ports, and the NoC
// injection port.  Timing: single-cycle lanes, sheet transfers of one 4x4
// block per cycle running in parallel with computation.
module ipu_stp
  import ipu_pkg::*;
#(
  parameter int ARR        = 16,
  parameter int HALO       = 2,
  parameter int IRAM_DEPTH = 2048
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      iram_we,
  input  logic [$clog2(IRAM_DEPTH)-1:0] iram_addr,
  input  logic [VLIW_W-1:0]         iram_wdata,
  input  logic                      start,
  output logic                      running,
  output logic                      irq,
  output logic                      lbp_rd_valid,
  input  logic                      lbp_rd_ready,
  output logic [2:0]                lbp_rd_lb,
  output logic signed [COORD_W:0]   lbp_rd_x,
  output logic signed [COORD_W:0]   lbp_rd_y,
  input  logic [PIX_BLK-1:0][W-1:0] lbp_rd_data,
  output logic                      rel_valid,
  output logic [2:0]                rel_lb,
  output logic [2:0]                rel_id,
  output logic [COORD_W:0]          rel_row,
  output logic                      flit_valid,
  input  logic                      flit_ready,
  output flit_t                     flit,
  output logic [31:0]               stall_cycles
);
  logic                      issue;
  vmath_instr_t              vm;
  vmem_instr_t               vmem;
  logic [9:0]                mimm;
  logic [W-1:0]              bcast;
  logic                      ld_req, st_req, shg_busy;
  logic [COORD_W-1:0]        sx, sy;
  logic [3:0]                vreg, dest;
  logic [2:0]                lb;
  logic                      ld_we;
  logic [3:0]                ld_reg, rd_reg;
  logic [2:0]                ld_br, ld_bc, rd_br, rd_bc;
  logic [PIX_BLK-1:0][W-1:0] ld_data, rd_data;

  ipu_scalar_lane #(.IRAM_DEPTH(IRAM_DEPTH)) u_scl (
    .clk, .rst_n, .iram_we, .iram_addr, .iram_wdata, .start, .start_pc('0),
    .running, .irq, .issue, .vm, .vmem, .mimm, .bcast,
    .shg_ld_req(ld_req), .shg_st_req(st_req), .shg_x(sx), .shg_y(sy),
    .shg_vreg(vreg), .shg_lb(lb), .shg_dest(dest), .shg_busy,
    .rel_valid, .rel_lb, .rel_id, .rel_row, .stall_cycles);

  ipu_stp_array #(.ARR(ARR), .HALO(HALO)) u_arr (
    .clk, .rst_n, .issue, .vm, .vmem, .mimm, .bcast,
    .ld_we, .ld_reg, .ld_br, .ld_bc, .ld_data,
    .rd_reg, .rd_br, .rd_bc, .rd_data);

  ipu_sheet_gen #(.ARR(ARR), .HALO(HALO)) u_shg (
    .clk, .rst_n, .ld_req, .st_req, .org_x(sx), .org_y(sy), .vreg, .lb, .dest,
    .busy(shg_busy),
    .lbp_rd_valid, .lbp_rd_ready, .lbp_rd_lb, .lbp_rd_x, .lbp_rd_y, .lbp_rd_data,
    .arr_ld_we(ld_we), .arr_ld_reg(ld_reg), .arr_ld_br(ld_br), .arr_ld_bc(ld_bc),
    .arr_ld_data(ld_data), .arr_rd_reg(rd_reg), .arr_rd_br(rd_br), .arr_rd_bc(rd_bc),
    .arr_rd_data(rd_data), .flit_valid, .flit_ready, .flit);
endmodule
