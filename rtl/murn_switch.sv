// murn_switch: one switch of the MURN unidirectional ring network.
//
// Every design node (and the I/O block, id 0) hangs off one switch.  A
// packet arriving on the ring is forwarded unless its destination is this
// switch's ID.  If it is, a command packet (cmd = 1) configures the switch's
// control of its node: SW_POWER switches the node's power domain, SW_RESET
// holds the node in reset, SW_ENABLE enables it; a data packet (cmd = 0)
// is delivered to the node, or dropped (drop_cnt) if the node is off or
// disabled.  The node may inject packets while it is on, enabled and out of
// reset.  The switch itself stays powered so the ring is never broken.
//
// Ring output: a two-entry queue, one hop per cycle, ring traffic ahead of
// injection.  All ports use valid/ready.  After reset the node is powered,
// enabled and out of reset.  The packet format and the switch's power,
// reset and enable duties follow the published MURN network; queueing,
// opcodes and reset values are this design's choices.
module murn_switch
  import murn_pkg::*;
#(
  parameter logic [3:0] ID = 4'd1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  murn_pkt_t in_pkt,
  output logic      out_valid,
  input  logic      out_ready,
  output murn_pkt_t out_pkt,
  output logic      node_valid,
  input  logic      node_ready,
  output murn_pkt_t node_pkt,
  input  logic      inj_valid,
  output logic      inj_ready,
  input  murn_pkt_t inj_pkt,
  output logic      node_pwr,
  output logic      node_rst,
  output logic      node_en,
  output logic [15:0] drop_cnt
);
  murn_pkt_t q [2];
  logic [1:0] cnt;
  logic       space, push, pop;
  murn_pkt_t  push_pkt;

  logic here, is_cmd, node_ok;
  assign here    = in_valid && in_pkt.dest == ID;
  assign is_cmd  = in_pkt.cmd;
  assign node_ok = node_pwr && node_en && !node_rst;
  assign space   = cnt < 2'd2;

  always_comb begin
    in_ready = 1'b0; push = 1'b0; push_pkt = in_pkt; inj_ready = 1'b0;
    node_valid = 1'b0; node_pkt = in_pkt;
    if (here) begin
      if (is_cmd || !node_ok) in_ready = 1'b1;
      else begin node_valid = 1'b1; in_ready = node_ready; end
    end else if (in_valid) begin
      in_ready = space; push = space;
    end
    if (!push && inj_valid && node_ok && space) begin
      inj_ready = 1'b1; push = 1'b1; push_pkt = inj_pkt;
    end
  end

  assign out_valid = cnt != 2'd0;
  assign out_pkt   = q[0];
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; q[0] <= '0; q[1] <= '0;
      node_pwr <= 1'b1; node_rst <= 1'b0; node_en <= 1'b1; drop_cnt <= '0;
    end else begin
      if (pop) q[0] <= q[1];
      if (push) begin
        if (pop)              q[0] <= push_pkt;
        else if (cnt == 2'd0) q[0] <= push_pkt;
        else                  q[1] <= push_pkt;
      end
      cnt <= cnt + {1'b0, push} - {1'b0, pop};
      if (here && is_cmd) begin
        unique case (in_pkt.opcode)
          SW_POWER:  node_pwr <= in_pkt.data[0];
          SW_RESET:  node_rst <= in_pkt.data[0];
          SW_ENABLE: node_en  <= in_pkt.data[0];
          default: ;
        endcase
      end
      if (here && !is_cmd && !node_ok) drop_cnt <= drop_cnt + 1'b1;
    end
  end
endmodule
