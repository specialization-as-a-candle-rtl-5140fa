// ipu_sheet_gen: the Sheet Generator, the load/store unit of a Stencil
// Processor.
//
// It moves 2D sheets between line buffers and the lane array, one 4x4 block
// (32 bytes) per cycle.  A sheet load fills register `vreg` of the whole
// S x S array (S = ARR + 2*HALO, 20 x 20 = 25 blocks = 25 cycles by default)
// from the local Line Buffer Pool, with the compute region's north-west
// pixel at image position (org_x, org_y) and the halo lanes receiving the
// surrounding support pixels.  A sheet store sends register `vreg` of the
// ARR x ARR compute region (16 blocks) as NoC flits to line buffer `lb` of
// core `dest`.  Blocks go in raster order.
//
// Flow control: a block read waits while the line buffer reports starving
// (rd_ready low) and a block write waits while the NoC does not accept it
// (back-pressure from a stalled line buffer).  Requests are taken only when
// idle (busy low); the scalar lane keeps issuing instructions while a
// transfer runs, which is how loads overlap computation.
//
// The one-block-per-cycle rate and the 25-cycle fill follow the published
// design; up/downsampling, striding and transposition on the fly are not
// implemented.
module ipu_sheet_gen
  import ipu_pkg::*;
#(
  parameter int ARR  = 16,
  parameter int HALO = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ld_req,
  input  logic                      st_req,
  input  logic [COORD_W-1:0]        org_x,
  input  logic [COORD_W-1:0]        org_y,
  input  logic [3:0]                vreg,
  input  logic [2:0]                lb,
  input  logic [3:0]                dest,
  output logic                      busy,
  // local LBP read port
  output logic                      lbp_rd_valid,
  input  logic                      lbp_rd_ready,
  output logic [2:0]                lbp_rd_lb,
  output logic signed [COORD_W:0]   lbp_rd_x,
  output logic signed [COORD_W:0]   lbp_rd_y,
  input  logic [PIX_BLK-1:0][W-1:0] lbp_rd_data,
  // lane array ports
  output logic                      arr_ld_we,
  output logic [3:0]                arr_ld_reg,
  output logic [2:0]                arr_ld_br,
  output logic [2:0]                arr_ld_bc,
  output logic [PIX_BLK-1:0][W-1:0] arr_ld_data,
  output logic [3:0]                arr_rd_reg,
  output logic [2:0]                arr_rd_br,
  output logic [2:0]                arr_rd_bc,
  input  logic [PIX_BLK-1:0][W-1:0] arr_rd_data,
  // NoC injection
  output logic                      flit_valid,
  input  logic                      flit_ready,
  output flit_t                     flit
);
  localparam int NBL = (ARR + 2 * HALO) / 4;   // blocks per side, load
  localparam int NBS = ARR / 4;                // blocks per side, store

  typedef enum logic [1:0] {IDLE, LOAD, STORE} state_e;
  state_e             state;
  logic [2:0]         br, bc;
  logic [COORD_W-1:0] ox, oy;
  logic [3:0]         r_vreg, r_dest;
  logic [2:0]         r_lb;

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; br <= '0; bc <= '0; ox <= '0; oy <= '0;
      r_vreg <= '0; r_dest <= '0; r_lb <= '0;
    end else begin
      unique case (state)
        IDLE: if (ld_req || st_req) begin
          state <= ld_req ? LOAD : STORE;
          br <= '0; bc <= '0; ox <= org_x; oy <= org_y;
          r_vreg <= vreg; r_dest <= dest; r_lb <= lb;
        end
        LOAD: if (lbp_rd_ready) begin
          if (int'(bc) == NBL - 1) begin
            bc <= '0;
            if (int'(br) == NBL - 1) state <= IDLE;
            else br <= br + 1'b1;
          end else bc <= bc + 1'b1;
        end
        STORE: if (flit_ready) begin
          if (int'(bc) == NBS - 1) begin
            bc <= '0;
            if (int'(br) == NBS - 1) state <= IDLE;
            else br <= br + 1'b1;
          end else bc <= bc + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // load path
  assign lbp_rd_valid = (state == LOAD);
  assign lbp_rd_lb    = r_lb;
  assign lbp_rd_x     = $signed({1'b0, ox}) - (COORD_W+1)'(HALO) + (COORD_W+1)'(4 * int'(bc));
  assign lbp_rd_y     = $signed({1'b0, oy}) - (COORD_W+1)'(HALO) + (COORD_W+1)'(4 * int'(br));
  assign arr_ld_we    = (state == LOAD) && lbp_rd_ready;
  assign arr_ld_reg   = r_vreg;
  assign arr_ld_br    = br;
  assign arr_ld_bc    = bc;
  assign arr_ld_data  = lbp_rd_data;

  // store path
  assign arr_rd_reg   = r_vreg;
  assign arr_rd_br    = br;
  assign arr_rd_bc    = bc;
  assign flit_valid   = (state == STORE);
  assign flit.dest    = r_dest;
  assign flit.lb      = r_lb;
  assign flit.x       = ox + COORD_W'(4 * int'(bc));
  assign flit.y       = oy + COORD_W'(4 * int'(br));
  assign flit.data    = arr_rd_data;
endmodule
