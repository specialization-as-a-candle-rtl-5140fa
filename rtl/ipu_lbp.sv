// ipu_lbp: Line Buffer Pool, the buffer memory paired with each Stencil
// Processor (and one more in the I/O block).
//
// NLB independent line buffers (see ipu_line_buffer) share the pool's SRAM,
// 128 KB by default (8 buffers x 8192 16-bit words).  Here the SRAM is cut
// into NLB equal fixed partitions, one per buffer; the published design only
// says the buffers share the pool.  The pool has one write port (blocks
// arriving from the NoC), one read port and one read-pointer port (the local
// Sheet Generator, or the DMA in the I/O block), each steered by a buffer
// index, and a configuration port (cfg_lb selects the buffer).  The pool
// passes each buffer's stall (wr_ready low) and starve (rd_ready low)
// signals back to the requester; stall_cnt / starve_cnt count cycles spent
// in each condition for observation.
module ipu_lbp
  import ipu_pkg::*;
#(
  parameter int NLB      = 8,
  parameter int LB_WORDS = 8192,
  parameter int NRD      = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [2:0]                cfg_lb,
  input  logic [3:0]                cfg_field,
  input  logic [15:0]               cfg_wdata,
  input  logic                      wr_valid,
  output logic                      wr_ready,
  input  logic [2:0]                wr_lb,
  input  logic [COORD_W-1:0]        wr_x,
  input  logic [COORD_W-1:0]        wr_y,
  input  logic [PIX_BLK-1:0][W-1:0] wr_data,
  input  logic                      rd_valid,
  output logic                      rd_ready,
  input  logic [2:0]                rd_lb,
  input  logic signed [COORD_W:0]   rd_x,
  input  logic signed [COORD_W:0]   rd_y,
  output logic [PIX_BLK-1:0][W-1:0] rd_data,
  input  logic                      rel_valid,
  input  logic [2:0]                rel_lb,
  input  logic [$clog2(NRD)-1:0]    rel_id,
  input  logic [COORD_W:0]          rel_row,
  output logic [31:0]               stall_cnt,
  output logic [31:0]               starve_cnt
);
  logic [NLB-1:0]                      lb_wr_ready, lb_rd_ready;
  logic [NLB-1:0][PIX_BLK-1:0][W-1:0]  lb_rd_data;

  for (genvar i = 0; i < NLB; i++) begin : g_lb
    logic [COORD_W:0] rows_unused;
    ipu_line_buffer #(.WORDS(LB_WORDS), .NRD(NRD)) u_lb (
      .clk, .rst_n,
      .cfg_we(cfg_we && int'(cfg_lb) == i), .cfg_field, .cfg_wdata,
      .wr_valid(wr_valid && int'(wr_lb) == i), .wr_ready(lb_wr_ready[i]),
      .wr_x, .wr_y, .wr_data,
      .rd_valid(rd_valid && int'(rd_lb) == i), .rd_ready(lb_rd_ready[i]),
      .rd_x, .rd_y, .rd_data(lb_rd_data[i]),
      .rel_valid(rel_valid && int'(rel_lb) == i), .rel_id, .rel_row,
      .wr_rows(rows_unused));
  end

  assign wr_ready = lb_wr_ready[wr_lb];
  assign rd_ready = lb_rd_ready[rd_lb];
  assign rd_data  = lb_rd_data[rd_lb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stall_cnt <= '0; starve_cnt <= '0;
    end else begin
      if (wr_valid && !wr_ready) stall_cnt  <= stall_cnt + 1;
      if (rd_valid && !rd_ready) starve_cnt <= starve_cnt + 1;
    end
  end
endmodule
