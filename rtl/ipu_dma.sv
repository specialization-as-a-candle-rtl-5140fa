// ipu_dma: the DMA engines of the IPU I/O block.
//
// NCH independent channels (16 by default) move images between external
// memory and line buffers, one 4x4 block at a time, in raster order.
//   * An input channel (dir = 0) gathers a block from external memory,
//     16 words at base + y*width + x, and injects it into the NoC as a
//     flit for line buffer `lb` of core `dest` (stalling while the ring or
//     the target line buffer is full).
//   * An output channel (dir = 1) reads a block from line buffer `lb` of the
//     I/O block's own pool LBP0 (waiting while it starves), writes its 16
//     words to external memory, and after the last block of each 4-row band
//     advances its read pointer `rdid` so the buffer can reclaim the band.
// Active channels take turns, one block each (round robin), so an input
// stream and an output stream progress together; a channel whose block
// cannot move (ring full, or line buffer starving) yields its turn, so one
// blocked channel never holds up the others.
// done[ch] rises when a channel finishes and stays until it is started
// again; irq pulses for one cycle at each completion.
//
// Configuration: cfg_we with cfg_ch and cfg_field: 0 dir, 1 base (32-bit
// word address), 2 width, 3 height, 4 dest, 5 lb, 6 rdid, 7 go.  The
// external-memory port is a plain word port with same-cycle read data,
// standing in for the AXI port of the real chip.  Sixteen channels and the
// DRAM-to-line-buffer role follow the published design; the rest is this
// design's choice.
module ipu_dma
  import ipu_pkg::*;
#(
  parameter int NCH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [$clog2(NCH)-1:0]    cfg_ch,
  input  logic [3:0]                cfg_field,
  input  logic [31:0]               cfg_wdata,
  output logic [NCH-1:0]            done,
  output logic                      irq,
  // external memory
  output logic [31:0]               mem_addr,
  output logic                      mem_we,
  output logic [W-1:0]              mem_wdata,
  input  logic [W-1:0]              mem_rdata,
  // NoC injection (input channels)
  output logic                      flit_valid,
  input  logic                      flit_ready,
  output flit_t                     flit,
  // LBP0 read and read-pointer ports (output channels)
  output logic                      lbp_rd_valid,
  input  logic                      lbp_rd_ready,
  output logic [2:0]                lbp_rd_lb,
  output logic signed [COORD_W:0]   lbp_rd_x,
  output logic signed [COORD_W:0]   lbp_rd_y,
  input  logic [PIX_BLK-1:0][W-1:0] lbp_rd_data,
  output logic                      rel_valid,
  output logic [2:0]                rel_lb,
  output logic [2:0]                rel_id,
  output logic [COORD_W:0]          rel_row
);
  localparam int CHW = $clog2(NCH);

  typedef struct packed {
    logic               dir;
    logic [31:0]        base;
    logic [COORD_W-1:0] width, height;
    logic [3:0]         dest;
    logic [2:0]         lb, rdid;
  } chan_t;

  chan_t              ch [NCH];
  logic [NCH-1:0]     active;

  typedef enum logic [2:0] {PICK, GATHER, SEND, FETCH, SCATTER, NEXT} state_e;
  state_e             state;
  logic [CHW-1:0]     cur;
  logic [COORD_W-1:0] bx, by;
  logic [3:0]         k;
  logic [PIX_BLK-1:0][W-1:0] buf_q;

  // block position of each channel between turns
  logic [COORD_W-1:0] pbx [NCH], pby [NCH];

  // next active channel after the current one (round robin)
  logic           any;
  logic [CHW-1:0] pick;
  always_comb begin
    any = 1'b0; pick = '0;
    for (int i = NCH; i >= 1; i--)
      if (active[(int'(cur) + i) % NCH]) begin any = 1'b1; pick = CHW'((int'(cur) + i) % NCH); end
  end

  chan_t c;
  assign c = ch[cur];

  logic last_x, last_y;
  assign last_x = (int'(bx) + 4 >= int'(c.width));
  assign last_y = (int'(by) + 4 >= int'(c.height));

  assign mem_addr  = c.base + 32'((int'(by) + int'(k[3:2])) * int'(c.width) + int'(bx) + int'(k[1:0]));
  assign mem_we    = (state == SCATTER);
  assign mem_wdata = buf_q[k];

  assign flit_valid = (state == SEND);
  assign flit.dest  = c.dest;
  assign flit.lb    = c.lb;
  assign flit.x     = bx;
  assign flit.y     = by;
  assign flit.data  = buf_q;

  assign lbp_rd_valid = (state == FETCH);
  assign lbp_rd_lb    = c.lb;
  assign lbp_rd_x     = $signed({1'b0, bx});
  assign lbp_rd_y     = $signed({1'b0, by});
  assign rel_valid    = (state == NEXT) && c.dir && last_x;
  assign rel_lb       = c.lb;
  assign rel_id       = c.rdid;
  assign rel_row      = {1'b0, by} + (COORD_W+1)'(4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PICK; cur <= '0; bx <= '0; by <= '0; k <= '0; buf_q <= '0;
      active <= '0; done <= '0; irq <= 1'b0;
      for (int i = 0; i < NCH; i++) begin ch[i] <= '0; pbx[i] <= '0; pby[i] <= '0; end
    end else begin
      irq <= 1'b0;
      if (cfg_we) begin
        unique case (cfg_field)
          4'd0: ch[cfg_ch].dir    <= cfg_wdata[0];
          4'd1: ch[cfg_ch].base   <= cfg_wdata;
          4'd2: ch[cfg_ch].width  <= cfg_wdata[COORD_W-1:0];
          4'd3: ch[cfg_ch].height <= cfg_wdata[COORD_W-1:0];
          4'd4: ch[cfg_ch].dest   <= cfg_wdata[3:0];
          4'd5: ch[cfg_ch].lb     <= cfg_wdata[2:0];
          4'd6: ch[cfg_ch].rdid   <= cfg_wdata[2:0];
          4'd7: begin
            active[cfg_ch] <= cfg_wdata[0]; done[cfg_ch] <= 1'b0;
            pbx[cfg_ch] <= '0; pby[cfg_ch] <= '0;
          end
          default: ;
        endcase
      end
      unique case (state)
        PICK: if (any) begin
          cur <= pick; bx <= pbx[pick]; by <= pby[pick]; k <= '0;
          state <= ch[pick].dir ? FETCH : GATHER;
        end
        GATHER: begin
          buf_q[k] <= mem_rdata;
          k <= k + 1'b1;
          if (k == 4'd15) state <= SEND;
        end
        // a channel that cannot proceed yields its turn (its position is
        // kept, so an unsent block is gathered again on its next turn)
        SEND:    state <= flit_ready ? NEXT : PICK;
        FETCH:   if (lbp_rd_ready) begin buf_q <= lbp_rd_data; k <= '0; state <= SCATTER; end
                 else state <= PICK;
        SCATTER: begin
          k <= k + 1'b1;
          if (k == 4'd15) state <= NEXT;
        end
        NEXT: begin
          k <= '0;
          state <= PICK;
          if (last_x && last_y) begin
            active[cur] <= 1'b0; done[cur] <= 1'b1; irq <= 1'b1;
          end else if (last_x) begin
            pbx[cur] <= '0; pby[cur] <= by + COORD_W'(4);
          end else begin
            pbx[cur] <= bx + COORD_W'(4);
          end
        end
        default: state <= PICK;
      endcase
    end
  end
endmodule
