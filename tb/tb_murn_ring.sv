// tb_murn_ring: self-checking test of the MURN ring with its I/O block.
//
// The testbench drives the off-chip side of the four byte channels (it
// sends packets as ten bytes, least significant first, and acknowledges
// transmitted bytes after random delays) and models the two design nodes
// as echo nodes: every packet a node receives is answered with a packet to
// the I/O block (id 0) carrying the payload plus the node id.  Checked:
// off-chip packets reach the right node through the ring; every reply
// comes back off chip intact; a command packet from off chip powers node 2
// down, after which its data packets are dropped and counted while node 1
// still answers; a second command powers node 2 back up.
module tb_murn_ring;
  import murn_pkg::*;
  localparam int NCH = 4, NN = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  logic [NCH-1:0] ch_en, tx_valid, tx_ack, rx_valid, rx_ack;
  logic [NCH-1:0][7:0] tx_data, rx_data;
  logic [NN-1:0] node_rx_valid, node_rx_ready, node_tx_valid, node_tx_ready, node_pwr, node_rst, node_en;
  murn_pkt_t [NN-1:0] node_rx_pkt, node_tx_pkt;
  logic [15:0] drops;

  murn_ring #(.NNODES(NN), .NCH(NCH)) dut (.*);

  // off-chip receiver
  logic [79:0] tx_buf [NCH];
  int tx_n [NCH];
  murn_pkt_t got [$];
  always @(negedge clk) for (int c = 0; c < NCH; c++) tx_ack[c] = tx_valid[c] && ($urandom_range(0, 1) == 0);
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NCH; c++) if (tx_valid[c] && tx_ack[c]) begin
      tx_buf[c] = {tx_data[c], tx_buf[c][79:8]};
      tx_n[c]++;
      if (tx_n[c] == 10) begin got.push_back(murn_pkt_t'(tx_buf[c])); tx_n[c] = 0; end
    end

  // echo nodes
  murn_pkt_t pend [NN][$];
  int node_seen [NN];
  always @(posedge clk) if (rst_n)
    for (int n = 0; n < NN; n++) begin
      if (node_tx_valid[n] && node_tx_ready[n]) void'(pend[n].pop_front());
      if (node_rx_valid[n] && node_rx_ready[n]) begin
        murn_pkt_t r;
        r = node_rx_pkt[n];
        r.dest = 4'd0; r.src = 4'(n + 1); r.data = r.data + 64'(n + 1);
        pend[n].push_back(r);
        node_seen[n]++;
      end
    end
  always @(negedge clk)
    for (int n = 0; n < NN; n++) begin
      node_rx_ready[n] = $urandom_range(0, 3) != 0;
      node_tx_valid[n] = pend[n].size() > 0;
      node_tx_pkt[n]   = pend[n].size() > 0 ? pend[n][0] : '0;
    end

  // off-chip sender: one packet on channel c
  task automatic far_send(input int c, input murn_pkt_t p);
    for (int b = 0; b < 10; b++) begin
      rx_valid[c] = 1; rx_data[c] = p[b * 8 +: 8];
      do @(posedge clk); while (!rx_ack[c]);
      @(negedge clk);
      rx_valid[c] = 0;
    end
  endtask

  function automatic murn_pkt_t mk(input int dest, input logic cmd, input logic [6:0] op, input logic [63:0] d);
    murn_pkt_t p;
    p.src = 4'd0; p.dest = 4'(dest); p.cmd = cmd; p.opcode = op; p.data = d;
    return p;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    murn_pkt_t exp [$];
    int seen0, seen1, bad;
    rst_n = 0; ch_en = '1; rx_valid = '0; rx_data = '0; tx_ack = '0;
    node_rx_ready = '0; node_tx_valid = '0; node_tx_pkt = '0;
    for (int c = 0; c < NCH; c++) begin tx_n[c] = 0; tx_buf[c] = '0; end
    node_seen[0] = 0; node_seen[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: 24 packets to random nodes over random channels, four at a time
    for (int k = 0; k < 6; k++) begin
      murn_pkt_t p [NCH];
      for (int c = 0; c < NCH; c++) begin
        int d;
        d = $urandom_range(1, NN);
        p[c] = mk(d, 1'b0, 7'($urandom), {$urandom, $urandom});
        exp.push_back(mk(0, 1'b0, p[c].opcode, p[c].data + 64'(d)));
        exp[$].src = 4'(d);
      end
      fork
        far_send(0, p[0]); far_send(1, p[1]); far_send(2, p[2]); far_send(3, p[3]);
      join
    end
    repeat (600) @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("%0d replies, expected %0d", got.size(), exp.size()); end
    bad = 0;
    foreach (exp[i]) begin
      int f;
      f = 0;
      foreach (got[j]) if (got[j] == exp[i]) f = 1;
      if (!f) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d replies missing or corrupted", bad); end
    checks++;
    if (drops != 0) begin failures++; $display("drops %0d before power-down", drops); end
    // phase 2: power node 2 down from off chip
    far_send(0, mk(2, 1'b1, SW_POWER, 64'd0));
    repeat (30) @(negedge clk);
    checks++;
    if (node_pwr[1] !== 1'b0 || node_pwr[0] !== 1'b1) begin failures++; $display("power state %b", node_pwr); end
    got.delete();
    seen0 = node_seen[0]; seen1 = node_seen[1];
    for (int k = 0; k < 5; k++) begin
      far_send(1, mk(2, 1'b0, 7'd9, 64'(k)));
      far_send(2, mk(1, 1'b0, 7'd9, 64'(k)));
    end
    repeat (400) @(negedge clk);
    checks++;
    if (drops != 5) begin failures++; $display("drops %0d, expected 5", drops); end
    checks++;
    if (node_seen[1] != seen1 || node_seen[0] != seen0 + 5) begin failures++; $display("node deliveries %0d %0d", node_seen[0] - seen0, node_seen[1] - seen1); end
    checks++;
    if (got.size() != 5) begin failures++; $display("%0d replies after power-down, expected 5", got.size()); end
    // phase 3: power node 2 up again
    far_send(3, mk(2, 1'b1, SW_POWER, 64'd1));
    far_send(3, mk(2, 1'b0, 7'd3, 64'd100));
    repeat (200) @(negedge clk);
    checks++;
    if (node_pwr[1] !== 1'b1 || node_seen[1] != seen1 + 1) begin failures++; $display("node 2 not back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
