// ipu_stp_array: the 2D lane array of a Stencil Processor with its shift
// network.
//
// S x S lanes (S = ARR + 2*HALO, 20 x 20 by default): the central ARR x ARR
// lanes are compute lanes, the HALO-wide ring around them are halo lanes
// that only hold stencil support data.  Every lane receives the same
// vector instruction each cycle (SIMD).
//
// Shift network: a VMEM_RDNXY instruction lets every lane read shift
// register src0[1:0] of the lane mimm[4:2] hops (1..4; 0 reads itself) away
// in direction mimm[1:0] (N, E, S, W).  Logically the network is a torus, so
// indices wrap at the array edges.  Because every lane reads the same
// direction and distance, the network is a rotation of the whole array by a
// fixed offset, done here by one multiplexer per lane.
//
// Sheet Generator ports: ld_* writes one 4x4 block per cycle into register
// ld_reg of the lanes in block (ld_br, ld_bc) of the S x S array (5 x 5
// blocks); rd_* reads register rd_reg of block (rd_br, rd_bc) of the ARR x
// ARR compute region, combinationally.  Row/column 0 is the north-west
// corner; north is decreasing row.
module ipu_stp_array
  import ipu_pkg::*;
#(
  parameter int ARR      = 16,
  parameter int HALO     = 2,
  parameter int MAX_HOPS = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      issue,
  input  vmath_instr_t              vm,
  input  vmem_instr_t               vmem,
  input  logic [9:0]                mimm,
  input  logic [W-1:0]              bcast,
  input  logic                      ld_we,
  input  logic [3:0]                ld_reg,
  input  logic [2:0]                ld_br,
  input  logic [2:0]                ld_bc,
  input  logic [PIX_BLK-1:0][W-1:0] ld_data,
  input  logic [3:0]                rd_reg,
  input  logic [2:0]                rd_br,
  input  logic [2:0]                rd_bc,
  output logic [PIX_BLK-1:0][W-1:0] rd_data
);
  localparam int S = ARR + 2 * HALO;

  logic [3:0][W-1:0] sh     [S][S];
  logic [W-1:0]      shv    [S][S];   // selected shift register of each lane
  logic [W-1:0]      nbr    [S][S];
  logic [W-1:0]      lane_rd[S][S];

  logic [1:0] dir;
  logic [2:0] hops;
  assign dir  = mimm[1:0];
  assign hops = (int'(mimm[4:2]) > MAX_HOPS) ? 3'(MAX_HOPS) : mimm[4:2];

  for (genvar r = 0; r < S; r++) begin : g_row
    for (genvar c = 0; c < S; c++) begin : g_col
      localparam bit HALO_LANE = (r < HALO) || (r >= HALO + ARR) || (c < HALO) || (c >= HALO + ARR);

      assign shv[r][c] = sh[r][c][vmem.src0[1:0]];

      // torus neighbour selection
      always_comb begin
        nbr[r][c] = shv[r][c];
        for (int h = 1; h <= MAX_HOPS; h++) begin
          if (int'(hops) == h) begin
            unique case (dir)
              DIR_N: nbr[r][c] = shv[(r - h + S) % S][c];
              DIR_S: nbr[r][c] = shv[(r + h) % S][c];
              DIR_E: nbr[r][c] = shv[r][(c + h) % S];
              DIR_W: nbr[r][c] = shv[r][(c - h + S) % S];
            endcase
          end
        end
      end

      ipu_lane #(.IS_HALO(HALO_LANE), .X(c - HALO), .Y(r - HALO)) u_lane (
        .clk, .rst_n, .issue, .vm, .vmem, .mimm, .bcast,
        .nbr(nbr[r][c]), .sh(sh[r][c]),
        .shg_we(ld_we && int'(ld_br) == r / 4 && int'(ld_bc) == c / 4),
        .shg_reg(ld_reg), .shg_wdata(ld_data[(r % 4) * 4 + (c % 4)]),
        .rd_reg, .rd_data(lane_rd[r][c]));
    end
  end

  // Sheet Generator read of one 4x4 block of the compute region
  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        rd_data[i * 4 + j] = lane_rd[HALO + int'(rd_br) * 4 + i][HALO + int'(rd_bc) * 4 + j];
  end
endmodule
