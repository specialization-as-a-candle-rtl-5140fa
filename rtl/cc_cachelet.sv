// cc_cachelet: a cachelet, a tiny L0 data cache placed inside a c-core's
// datapath next to a memory operator with good locality.
//
// LINES lines (1 to 4) of WORDS 32-bit words, direct mapped, each with a
// tag and valid bit.  A load that hits returns its word in the cycle after
// the request, without touching the L1; a load that misses fetches the whole
// line from the L1 one word at a time and then answers.  Stores are written
// through to the L1 and update the line when it is present, so the L1 stays
// the coherence point.  Core side: a one-cycle req pulse with we/addr/wdata,
// answered by a one-cycle valid (with rdata for loads).  L1 side: l1_req is
// held with its address until l1_valid.  Addresses are byte addresses of
// aligned words.  Line count range, tag compare and the store/fill data mux
// follow the published cachelet; the policies are this design's choices.
module cc_cachelet #(
  parameter int LINES = 1,
  parameter int WORDS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        valid,
  output logic [31:0] rdata,
  output logic        l1_req,
  output logic        l1_we,
  output logic [31:0] l1_addr,
  output logic [31:0] l1_wdata,
  input  logic        l1_valid,
  input  logic [31:0] l1_rdata,
  output logic [31:0] hits,
  output logic [31:0] misses
);
  localparam int OW = $clog2(WORDS);
  localparam int IW = (LINES > 1) ? $clog2(LINES) : 1;
  localparam int TL = 2 + OW + ((LINES > 1) ? IW : 0);   // lowest tag bit

  logic [31:0]    data [LINES][WORDS];
  logic [31:TL]   tag  [LINES];
  logic [LINES-1:0] vld;

  typedef enum logic [1:0] {IDLE, FILL, WRITE, RESP} state_e;
  state_e       state;
  logic [31:0]  r_addr, r_wdata, r_data;
  logic [OW-1:0] k;

  function automatic int idx_of(input logic [31:0] ad);
    return (LINES > 1) ? int'(ad[2 + OW +: IW]) : 0;
  endfunction

  logic hit_now;
  assign hit_now = vld[idx_of(addr)] && tag[idx_of(addr)] == addr[31:TL];

  assign l1_req   = (state == FILL) || (state == WRITE);
  assign l1_we    = (state == WRITE);
  assign l1_addr  = (state == FILL) ? {r_addr[31:2 + OW], k, 2'b00} : r_addr;
  assign l1_wdata = r_wdata;
  assign valid    = (state == RESP);
  assign rdata    = r_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; vld <= '0; r_addr <= '0; r_wdata <= '0; r_data <= '0;
      k <= '0; hits <= '0; misses <= '0;
      for (int l = 0; l < LINES; l++) tag[l] <= '0;
    end else begin
      unique case (state)
        IDLE: if (req) begin
          r_addr <= addr; r_wdata <= wdata; k <= '0;
          if (we) state <= WRITE;
          else if (hit_now) begin
            r_data <= data[idx_of(addr)][addr[2 +: OW]]; state <= RESP; hits <= hits + 1;
          end else begin
            state <= FILL; misses <= misses + 1; vld[idx_of(addr)] <= 1'b0;
          end
        end
        FILL: if (l1_valid) begin
          data[idx_of(r_addr)][k] <= l1_rdata;
          if (k == r_addr[2 +: OW]) r_data <= l1_rdata;
          k <= k + 1'b1;
          if (int'(k) == WORDS - 1) begin
            vld[idx_of(r_addr)] <= 1'b1; tag[idx_of(r_addr)] <= r_addr[31:TL]; state <= RESP;
          end
        end
        WRITE: if (l1_valid) begin
          if (vld[idx_of(r_addr)] && tag[idx_of(r_addr)] == r_addr[31:TL])
            data[idx_of(r_addr)][r_addr[2 +: OW]] <= r_wdata;
          state <= RESP;
        end
        RESP: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
