// ipu_line_buffer: one hardware line buffer of a Line Buffer Pool.
//
// A line buffer is 2D single-writer, multi-reader storage holding a sliding
// window of image rows.  The producer writes 4x4 blocks in raster order; a
// band of four rows counts as written once its right-most block arrives,
// which advances the write pointer (wr_rows).  Up to NRD consumers each own
// a read pointer: the row below which that consumer needs nothing more.
// Consumers advance their pointers explicitly (rel_*).  Storage is a ring of
// 2^cap_log2 rows of `width` pixels; a row is reclaimed once every enabled
// read pointer has passed it.
//
// Flow control: a write is refused (wr_ready = 0, the producer stalls) when
// its band would overwrite rows some consumer still needs; a read is refused
// (rd_ready = 0, the consumer starves) when it touches a row not yet written.
// Reads take any (x, y) origin, including negative ones, and return a 4x4
// block; pixels outside the image are produced by the border mode: 0 zero
// padding, 1 repeat edge, 2 mirror edge (reflect without repeating the edge
// pixel).  Read data is combinational; writes and pointer updates take
// effect at the clock edge.
//
// The single-writer / eight-reader organisation, the reclaim rule, the
// stall/starve flow control and the three border modes follow the published
// description; the band granularity, the configuration fields and the
// storage as one array (a silicon version would bank it 4 x 4 so a 4x4
// block touches each bank once) are this design's choices.
//
// Configuration (cfg_we with cfg_field): 0 width, 1 height, 2 cap_log2,
// 3 border mode, 4 reader enable mask, 5 clear pointers.  width must be a
// multiple of 4 and width << cap_log2 must not exceed WORDS.
module ipu_line_buffer
  import ipu_pkg::*;
#(
  parameter int WORDS = 8192,
  parameter int NRD   = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [3:0]                cfg_field,
  input  logic [15:0]               cfg_wdata,
  // producer
  input  logic                      wr_valid,
  output logic                      wr_ready,
  input  logic [COORD_W-1:0]        wr_x,
  input  logic [COORD_W-1:0]        wr_y,
  input  logic [PIX_BLK-1:0][W-1:0] wr_data,
  // consumer read
  input  logic                      rd_valid,
  output logic                      rd_ready,
  input  logic signed [COORD_W:0]   rd_x,
  input  logic signed [COORD_W:0]   rd_y,
  output logic [PIX_BLK-1:0][W-1:0] rd_data,
  // consumer read-pointer advance
  input  logic                      rel_valid,
  input  logic [$clog2(NRD)-1:0]    rel_id,
  input  logic [COORD_W:0]          rel_row,
  output logic [COORD_W:0]          wr_rows
);
  localparam int AW = $clog2(WORDS);
  localparam int CW = COORD_W + 1;

  logic [W-1:0] mem [WORDS];

  logic [COORD_W-1:0] width, height;
  logic [3:0]         cap_log2;
  logic [1:0]         border;
  logic [NRD-1:0]     rd_en;
  logic [CW-1:0]      rd_ptr [NRD];

  // ---------------- configuration and pointers -----------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      width <= COORD_W'(16); height <= COORD_W'(16); cap_log2 <= 4'd4;
      border <= 2'd0; rd_en <= '0; wr_rows <= '0;
      for (int i = 0; i < NRD; i++) rd_ptr[i] <= '0;
    end else begin
      if (cfg_we) begin
        unique case (cfg_field)
          4'd0: width    <= cfg_wdata[COORD_W-1:0];
          4'd1: height   <= cfg_wdata[COORD_W-1:0];
          4'd2: cap_log2 <= cfg_wdata[3:0];
          4'd3: border   <= cfg_wdata[1:0];
          4'd4: rd_en    <= cfg_wdata[NRD-1:0];
          4'd5: begin
            wr_rows <= '0;
            for (int i = 0; i < NRD; i++) rd_ptr[i] <= '0;
          end
          default: ;
        endcase
      end
      if (wr_valid && wr_ready && (CW'(wr_x) + CW'(4) >= CW'(width)))
        wr_rows <= CW'(wr_y) + CW'(4);
      if (rel_valid) rd_ptr[rel_id] <= rel_row;
    end
  end

  // ---------------- write side: reclaim check -------------------------------
  logic [CW-1:0] min_rd;
  always_comb begin
    min_rd = {CW{1'b1}};
    for (int i = 0; i < NRD; i++)
      if (rd_en[i] && rd_ptr[i] < min_rd) min_rd = rd_ptr[i];
  end
  assign wr_ready = (rd_en == '0) ||
                    (int'(wr_y) + 4 - int'(min_rd) <= (1 << cap_log2));

  function automatic logic [AW-1:0] addr_of(input int x, input int y);
    int row;
    row = y & ((1 << cap_log2) - 1);
    return AW'(row * int'(width) + x);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          mem[addr_of(int'(wr_x) + j, int'(wr_y) + i)] <= wr_data[i * 4 + j];
  end

  // ---------------- read side: border handling ------------------------------
  // map a coordinate into [0, size); out = 1 when zero padding applies
  function automatic int bmap(input int v, input int size, input logic [1:0] mode, output logic out);
    int m;
    out = 1'b0;
    m   = v;
    if (v < 0) begin
      if (mode == 2'd0)      out = 1'b1;
      else if (mode == 2'd1) m = 0;
      else                   m = (-v > size - 1) ? size - 1 : -v;
    end else if (v >= size) begin
      if (mode == 2'd0)      out = 1'b1;
      else if (mode == 2'd1) m = size - 1;
      else                   m = (2 * (size - 1) - v < 0) ? 0 : 2 * (size - 1) - v;
    end
    return m;
  endfunction

  int max_row;
  always_comb begin
    int   xr, yr;
    logic ox, oy;
    max_row = 0;
    for (int i = 0; i < 4; i++) begin
      yr = bmap(int'(rd_y) + i, int'(height), border, oy);
      if (!oy && yr > max_row) max_row = yr;
      for (int j = 0; j < 4; j++) begin
        xr = bmap(int'(rd_x) + j, int'(width), border, ox);
        rd_data[i * 4 + j] = (ox || oy) ? '0 : mem[addr_of(xr, yr)];
      end
    end
  end
  assign rd_ready = max_row < int'(wr_rows);

  // a band write must start on a 4-row boundary
  always_ff @(posedge clk) begin
    if (rst_n && wr_valid) assert (wr_y[1:0] == 2'b00 && wr_x[1:0] == 2'b00)
      else $error("line buffer write not 4x4 aligned");
  end
endmodule
