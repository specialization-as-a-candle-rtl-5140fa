// murn_io_block: the MURN I/O block, bridging the ring network and the
// chip's off-chip data channels.
//
// It translates between 80-bit ring packets and NCH (4) independent 8-bit
// bidirectional channels, each with valid and acknowledge.  Outbound, each
// packet from the ring goes to the lowest-numbered enabled, idle transmit
// channel and leaves as 10 bytes, least significant first; each byte is held
// on tx_data with tx_valid until the far side acknowledges it (tx_ack).
// Inbound, each enabled receive channel collects 10 bytes (acknowledging
// each one with rx_ack for one cycle) into a packet, and complete packets
// are injected into the ring, lowest channel first.  Channels are enabled by
// ch_en, so a channel with a package or bonding defect can be switched off.
// The source-synchronous channel clocks are not modelled: everything runs
// on the core clock.  Channel count, width and valid/ack signalling follow
// the published I/O block; byte order and channel choice are this design's.
module murn_io_block
  import murn_pkg::*;
#(
  parameter int NCH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NCH-1:0]      ch_en,
  // ring side (the node port of switch 0)
  input  logic                pkt_in_valid,
  output logic                pkt_in_ready,
  input  murn_pkt_t           pkt_in,
  output logic                pkt_out_valid,
  input  logic                pkt_out_ready,
  output murn_pkt_t           pkt_out,
  // off-chip channels
  output logic [NCH-1:0]      tx_valid,
  output logic [NCH-1:0][7:0] tx_data,
  input  logic [NCH-1:0]      tx_ack,
  input  logic [NCH-1:0]      rx_valid,
  input  logic [NCH-1:0][7:0] rx_data,
  output logic [NCH-1:0]      rx_ack
);
  logic [NCH-1:0]       tx_busy, rx_full;
  logic [NCH-1:0][79:0] tx_sr, rx_sr;
  logic [NCH-1:0][3:0]  tx_k, rx_k;

  // pick a transmit channel
  logic tx_free;
  int   tx_sel;
  always_comb begin
    tx_free = 1'b0; tx_sel = 0;
    for (int c = NCH - 1; c >= 0; c--)
      if (ch_en[c] && !tx_busy[c]) begin tx_free = 1'b1; tx_sel = c; end
  end
  assign pkt_in_ready = tx_free;

  // pick a full receive channel
  logic rx_any;
  int   rx_sel;
  always_comb begin
    rx_any = 1'b0; rx_sel = 0;
    for (int c = NCH - 1; c >= 0; c--)
      if (rx_full[c]) begin rx_any = 1'b1; rx_sel = c; end
  end
  assign pkt_out_valid = rx_any;
  assign pkt_out       = murn_pkt_t'(rx_sr[rx_sel]);

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    assign tx_valid[c] = tx_busy[c];
    assign tx_data[c]  = tx_sr[c][7:0];
    assign rx_ack[c]   = rx_valid[c] && ch_en[c] && !rx_full[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy <= '0; rx_full <= '0; tx_sr <= '0; rx_sr <= '0; tx_k <= '0; rx_k <= '0;
    end else begin
      for (int c = 0; c < NCH; c++) begin
        // transmit
        if (tx_busy[c] && tx_ack[c]) begin
          tx_sr[c] <= {8'd0, tx_sr[c][79:8]};
          tx_k[c]  <= tx_k[c] + 1'b1;
          if (tx_k[c] == 4'd9) tx_busy[c] <= 1'b0;
        end
        // receive
        if (rx_ack[c]) begin
          rx_sr[c] <= {rx_data[c], rx_sr[c][79:8]};
          rx_k[c]  <= rx_k[c] + 1'b1;
          if (rx_k[c] == 4'd9) begin rx_full[c] <= 1'b1; rx_k[c] <= '0; end
        end
      end
      if (pkt_in_valid && tx_free) begin
        tx_busy[tx_sel] <= 1'b1; tx_sr[tx_sel] <= pkt_in; tx_k[tx_sel] <= '0;
      end
      if (rx_any && pkt_out_ready) rx_full[rx_sel] <= 1'b0;
    end
  end
endmodule
