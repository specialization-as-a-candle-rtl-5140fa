// murn_ring: the MURN chip network: a unidirectional ring of switches with
// the I/O block on switch 0 and NNODES design nodes on switches 1..NNODES.
//
// Packets travel one switch per cycle in increasing id order and wrap from
// the last switch back to switch 0.  The I/O block turns packets for id 0
// into bytes on the four off-chip channels and injects packets received
// from them.  Each design node sees a receive port, a send port and the
// power / reset / enable controls its switch drives; the design nodes
// themselves attach through a node adapter that the published material
// does not describe, so their ports are brought out.  The ring, the switch
// duties and the I/O block follow the published MURN network; the node
// count is this design's choice.
module murn_ring
  import murn_pkg::*;
#(
  parameter int NNODES = 2,
  parameter int NCH    = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NCH-1:0]      ch_en,
  output logic [NCH-1:0]      tx_valid,
  output logic [NCH-1:0][7:0] tx_data,
  input  logic [NCH-1:0]      tx_ack,
  input  logic [NCH-1:0]      rx_valid,
  input  logic [NCH-1:0][7:0] rx_data,
  output logic [NCH-1:0]      rx_ack,
  output logic [NNODES-1:0]   node_rx_valid,
  input  logic [NNODES-1:0]   node_rx_ready,
  output murn_pkt_t [NNODES-1:0] node_rx_pkt,
  input  logic [NNODES-1:0]   node_tx_valid,
  output logic [NNODES-1:0]   node_tx_ready,
  input  murn_pkt_t [NNODES-1:0] node_tx_pkt,
  output logic [NNODES-1:0]   node_pwr,
  output logic [NNODES-1:0]   node_rst,
  output logic [NNODES-1:0]   node_en,
  output logic [15:0]         drops
);
  localparam int NS = NNODES + 1;
  logic      r_v [NS], r_r [NS];
  murn_pkt_t r_p [NS];
  logic      n_v [NS], n_r [NS], i_v [NS], i_r [NS];
  murn_pkt_t n_p [NS], i_p [NS];
  logic [NS-1:0] pwr, rst, en;
  logic [15:0]   d [NS];

  for (genvar s = 0; s < NS; s++) begin : g_sw
    localparam int PREV = (s + NS - 1) % NS;
    murn_switch #(.ID(4'(s))) u_sw (
      .clk, .rst_n,
      .in_valid(r_v[PREV]), .in_ready(r_r[PREV]), .in_pkt(r_p[PREV]),
      .out_valid(r_v[s]), .out_ready(r_r[s]), .out_pkt(r_p[s]),
      .node_valid(n_v[s]), .node_ready(n_r[s]), .node_pkt(n_p[s]),
      .inj_valid(i_v[s]), .inj_ready(i_r[s]), .inj_pkt(i_p[s]),
      .node_pwr(pwr[s]), .node_rst(rst[s]), .node_en(en[s]), .drop_cnt(d[s]));
    if (s > 0) begin : g_node
      assign node_rx_valid[s-1] = n_v[s];
      assign n_r[s]             = node_rx_ready[s-1];
      assign node_rx_pkt[s-1]   = n_p[s];
      assign i_v[s]             = node_tx_valid[s-1];
      assign node_tx_ready[s-1] = i_r[s];
      assign i_p[s]             = node_tx_pkt[s-1];
      assign node_pwr[s-1] = pwr[s];
      assign node_rst[s-1] = rst[s];
      assign node_en[s-1]  = en[s];
    end
  end

  murn_io_block #(.NCH(NCH)) u_io (
    .clk, .rst_n, .ch_en,
    .pkt_in_valid(n_v[0]), .pkt_in_ready(n_r[0]), .pkt_in(n_p[0]),
    .pkt_out_valid(i_v[0]), .pkt_out_ready(i_r[0]), .pkt_out(i_p[0]),
    .tx_valid, .tx_data, .tx_ack, .rx_valid, .rx_data, .rx_ack);

  always_comb begin
    drops = '0;
    for (int s = 0; s < NS; s++) drops = drops + d[s];
  end
endmodule
