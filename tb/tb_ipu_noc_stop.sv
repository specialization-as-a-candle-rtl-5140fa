// tb_ipu_noc_stop: self-checking test of the ring stop, as a whole ring.
//
// Five stops (the I/O block and four cores, reduced from eight) are joined
// into a bidirectional ring in the physical order 0,1,3,4,2.  Random flits
// are injected from every stop to every other stop.  The testbench checks
// that each flit arrives once, intact, at its destination, and with the
// ring otherwise idle that it takes one cycle per hop along the shorter
// direction plus one cycle to enter the ring and one to leave it.  Then one core is powered down: flits addressed to it must be
// dropped and counted, flits passing it must still be delivered, and it
// must refuse to inject.
module tb_ipu_noc_stop;
  import ipu_pkg::*;
  localparam int NC = 4, NS = NC + 1;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  logic [NS-1:0] pwr_on;
  // indexed by ring position
  logic  cw_v [NS], cw_r [NS], ccw_v [NS], ccw_r [NS];
  flit_t cw_f [NS], ccw_f [NS];
  // indexed by stop id
  logic  inj_v [NS], inj_r [NS], ej_v [NS];
  flit_t inj_f [NS], ej_f [NS];
  logic [15:0] drops [NS];

  for (genvar id = 0; id < NS; id++) begin : g_stop
    localparam int P  = ring_pos(id, NC);
    localparam int PN = (P + 1) % NS, PP = (P + NS - 1) % NS;
    ipu_noc_stop #(.ID(id), .NCORES(NC)) u (.clk, .rst_n, .pwr_on(pwr_on[id]),
      .cw_in_valid(cw_v[PP]), .cw_in_ready(cw_r[PP]), .cw_in(cw_f[PP]),
      .cw_out_valid(cw_v[P]), .cw_out_ready(cw_r[P]), .cw_out(cw_f[P]),
      .ccw_in_valid(ccw_v[PN]), .ccw_in_ready(ccw_r[PN]), .ccw_in(ccw_f[PN]),
      .ccw_out_valid(ccw_v[P]), .ccw_out_ready(ccw_r[P]), .ccw_out(ccw_f[P]),
      .inj_valid(inj_v[id]), .inj_ready(inj_r[id]), .inj(inj_f[id]),
      .ej_valid(ej_v[id]), .ej_ready(1'b1), .ej(ej_f[id]), .drop_cnt(drops[id]));
  end

  function automatic int pos(input int id);
    return (id == 0) ? 0 : (id % 2 == 1) ? (id + 1) / 2 : NC + 1 - id / 2;
  endfunction
  function automatic int hops(input int s, input int d);
    int f = (pos(d) - pos(s) + NS) % NS;
    return (f <= NS - f) ? f : NS - f;
  endfunction

  int cyc, sent, recvd, bad_lat;
  int pending [int];   // key: tag, value: expected destination
  bit accepted [NS];
  always @(posedge clk) begin
    cyc++;
    for (int s = 0; s < NS; s++) begin
      accepted[s] = inj_v[s] && inj_r[s];
      if (accepted[s]) begin
        sent++;
        if (pwr_on[inj_f[s].dest]) pending[int'(inj_f[s].data[0])] = int'(inj_f[s].dest);
      end
    end
  end
  always @(posedge clk) if (rst_n)
    for (int id = 0; id < NS; id++) if (ej_v[id]) begin
      int tag, d, sent_at, src;
      tag = int'(ej_f[id].data[0]);
      sent_at = int'(ej_f[id].data[1]);
      src = int'(ej_f[id].data[2]);
      checks++;
      if (!pending.exists(tag) || pending[tag] != id || int'(ej_f[id].dest) != id ||
          ej_f[id].data[3] !== 16'(tag * 3)) begin
        failures++;
        $display("stop %0d received unexpected flit tag %0d", id, tag);
      end else begin
        d = cyc - sent_at;
        if (d != hops(src, id) + 2) bad_lat++;
        pending.delete(tag);
        recvd++;
      end
    end

  task automatic send(input int s, input int d, input int tag);
    inj_v[s] = 1;
    inj_f[s] = '0;
    inj_f[s].dest = 4'(d);
    inj_f[s].data[0] = 16'(tag); inj_f[s].data[1] = 16'(cyc); inj_f[s].data[2] = 16'(s);
    inj_f[s].data[3] = 16'(tag * 3);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tag = 0;
    rst_n = 0; pwr_on = '1; cyc = 0; sent = 0; recvd = 0; bad_lat = 0;
    for (int i = 0; i < NS; i++) begin inj_v[i] = 0; inj_f[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // one flit at a time: one cycle per hop on the shorter side, plus one
  // cycle to enter the ring and one to leave it
    for (int s = 0; s < NS; s++)
      for (int d = 0; d < NS; d++) if (s != d) begin
        send(s, d, tag); tag++;
        @(negedge clk);
        inj_v[s] = 0;
        repeat (6) @(negedge clk);
      end
    checks++;
    if (bad_lat != 0) begin failures++; $display("%0d flits took longer than the shortest path", bad_lat); end
    // heavy random traffic
    for (int n = 0; n < 400; n++) begin
      for (int s = 0; s < NS; s++) begin
        if (accepted[s]) begin inj_v[s] = 0; accepted[s] = 0; end
        if (!inj_v[s] && $urandom_range(0, 1) == 1) begin
          int d = $urandom_range(0, NS - 1);
          if (d == s) d = (d + 1) % NS;
          send(s, d, tag); tag++;
        end
      end
      @(negedge clk);
    end
    for (int s = 0; s < NS; s++) inj_v[s] = 0;
    repeat (50) @(negedge clk);
    checks++;
    if (pending.size() != 0 || recvd != sent) begin
      failures++; $display("%0d sent, %0d received, %0d missing", sent, recvd, pending.size());
    end
    // power down core 3 (ring position 2, between cores 1 and 4)
    pwr_on[3] = 0;
    @(negedge clk);
    send(1, 3, tag); tag++;
    @(negedge clk);
    inj_v[1] = 0;
    send(1, 4, tag); tag++;   // passes through stop 3
    @(negedge clk);
    inj_v[1] = 0;
    send(3, 0, tag); tag++;
    #1;
    checks++;
    if (inj_r[3]) begin failures++; $display("powered-down stop accepted an injection"); end
    @(negedge clk);
    inj_v[3] = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (drops[3] !== 16'd1) begin failures++; $display("drop count %0d, expected 1", drops[3]); end
    checks++;
    if (pending.size() != 0) begin failures++; $display("flit through the powered-down stop lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
