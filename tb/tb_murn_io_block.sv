// tb_murn_io_block: self-checking test of the MURN I/O block.
//
// The testbench plays the ring (switch 0's node port) and the far side of
// the four 8-bit off-chip channels, acknowledging transmitted bytes after
// random delays.  Checked: each packet from the ring leaves as ten bytes,
// least significant first, on an enabled channel, never on the disabled
// channel 0; several packets go out in parallel on different channels;
// ten bytes received on a channel become one packet on the ring, with
// every byte acknowledged; a disabled channel acknowledges nothing.
module tb_murn_io_block;
  import murn_pkg::*;
  localparam int NCH = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, pkt_in_valid, pkt_in_ready, pkt_out_valid, pkt_out_ready;
  logic [NCH-1:0] ch_en, tx_valid, tx_ack, rx_valid, rx_ack;
  logic [NCH-1:0][7:0] tx_data, rx_data;
  murn_pkt_t pkt_in, pkt_out;

  murn_io_block #(.NCH(NCH)) dut (.clk, .rst_n, .ch_en, .pkt_in_valid, .pkt_in_ready, .pkt_in,
    .pkt_out_valid, .pkt_out_ready, .pkt_out, .tx_valid, .tx_data, .tx_ack, .rx_valid, .rx_data, .rx_ack);

  // far side: collect transmitted bytes per channel
  logic [79:0] tx_buf [NCH];
  int tx_n [NCH];
  logic [79:0] tx_got [$];
  int used [NCH];
  always @(negedge clk) for (int c = 0; c < NCH; c++) tx_ack[c] = tx_valid[c] && ($urandom_range(0, 2) == 0);
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NCH; c++) if (tx_valid[c] && tx_ack[c]) begin
      tx_buf[c] = {tx_data[c], tx_buf[c][79:8]};
      tx_n[c]++;
      if (tx_n[c] == 10) begin tx_got.push_back(tx_buf[c]); tx_n[c] = 0; used[c]++; end
    end

  // ring side: collect received packets
  murn_pkt_t rx_got [$];
  always @(posedge clk) if (rst_n && pkt_out_valid && pkt_out_ready) rx_got.push_back(pkt_out);

  task automatic far_send(input int c, input logic [79:0] v);
    for (int b = 0; b < 10; b++) begin
      rx_valid[c] = 1; rx_data[c] = v[b * 8 +: 8];
      do @(posedge clk); while (!rx_ack[c]);
      @(negedge clk);
      rx_valid[c] = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    murn_pkt_t sent [$];
    rst_n = 0; ch_en = 4'b1110; pkt_in_valid = 0; pkt_in = '0; pkt_out_ready = 1;
    rx_valid = '0; rx_data = '0; tx_ack = '0;
    for (int c = 0; c < NCH; c++) begin tx_n[c] = 0; used[c] = 0; tx_buf[c] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // outbound: eight packets back to back
    for (int n = 0; n < 8; n++) begin
      murn_pkt_t p;
      p = murn_pkt_t'({$urandom, $urandom, 16'($urandom)});
      pkt_in_valid = 1; pkt_in = p;
      do @(negedge clk); while (!(pkt_in_ready_at_edge));
      sent.push_back(p);
    end
    pkt_in_valid = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (tx_got.size() != 8) begin failures++; $display("%0d packets transmitted, expected 8", tx_got.size()); end
    begin
      int bad;
      bad = 0;
      foreach (tx_got[i]) begin
        int f;
        f = 0;
        foreach (sent[j]) if (80'(sent[j]) == tx_got[i]) f = 1;
        if (!f) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("%0d transmitted packets corrupted", bad); end
    end
    checks++;
    if (used[0] != 0 || used[1] == 0 || used[2] == 0) begin failures++; $display("channel use %0d %0d %0d %0d", used[0], used[1], used[2], used[3]); end
    // inbound on channels 2 and 3; channel 0 disabled must not acknowledge
    begin
      logic [79:0] v2, v3;
      v2 = {$urandom, $urandom, 16'($urandom)};
      v3 = {$urandom, $urandom, 16'($urandom)};
      fork
        far_send(2, v2);
        far_send(3, v3);
      join
      rx_valid[0] = 1; rx_data[0] = 8'h55;
      repeat (5) @(negedge clk);
      checks++;
      if (rx_ack[0]) begin failures++; $display("disabled channel acknowledged"); end
      rx_valid[0] = 0;
      checks++;
      if (rx_got.size() != 2 || !((80'(rx_got[0]) == v2 && 80'(rx_got[1]) == v3) || (80'(rx_got[0]) == v3 && 80'(rx_got[1]) == v2))) begin
        failures++; $display("%0d packets received, wrong content", rx_got.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit pkt_in_ready_at_edge;
  always @(posedge clk) pkt_in_ready_at_edge = pkt_in_valid && pkt_in_ready;
endmodule
