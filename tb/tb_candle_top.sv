// tb_candle_top: end-to-end test of the whole design at a reduced IPU size
// (2 cores with 8x8 stencil arrays, 4 line buffers of 1024 words, 64-entry
// instruction RAMs, 4 DMA channels), a GreenDroid tile with two c-cores and
// the MURN ring with two design nodes.  The sizes are localparams: set
// them to the defaults (NC 8, ARR 16, NLB 8, LBW 8192, IRD 2048, NCH 16)
// to run the same test at full size.
//
// Three workloads run at the same time:
//   * IPU: a 3x3 box blur of an ARR x 4*ARR image as a two-stage pipeline.  DMA
//     channel 0 streams the image over the ring into line buffer 1 of core 1
//     (edge pixels repeated); core 1 computes horizontal 3-tap sums into
//     line buffer 2 of core 2 (mirrored edges); core 2 computes vertical
//     sums into line buffer 0 of the I/O block (zero border); DMA channel 1
//     writes them to memory.  The result is compared with a reference blur.
//     Core 2 is then powered down and traffic sent to it must be dropped.
//   * GreenDroid: the CPU stores an array through the tile's L1 port, passes
//     arguments to the array-sum c-core over the state tree and starts it;
//     the sum must match.  A second run marks the loop-exit transition as an
//     exception: the c-core must stop in its exception state.
//   * MURN: packets arrive over the byte channels for both nodes, which echo
//     them back off chip; a command packet powers node 2 down, after which
//     its packets are dropped.
// Each mechanism is counted; the test fails if one never happened.  The
// list is printed at the end.  The zero border, divider and c-core
// operator chains are not reached by these workloads; their unit
// testbenches cover them.  All checks are self-contained; the only
// design-specific timing checked here is the state-tree read latency of 6
// cycles (the unit testbenches check the others).
module tb_candle_top;
  import ipu_pkg::*;
  import ipu_prog_pkg::*;
  import murn_pkg::*;
  localparam int NC = 2, ARR = 8, HALO = 2, NLB = 4, LBW = 1024, IRD = 64, NCH = 4;
  localparam int CAP_CORE = $clog2(ARR) + 1, CAP_IO = $clog2(ARR);   // log2 of line-buffer rows
  localparam int IW = ARR, IH = 4 * ARR;
  localparam int IN_BASE = 'h100, OUT_BASE = 'h4000;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;

  logic ipu_csr_we, ipu_irq, ipu_mem_we;
  logic [15:0] ipu_csr_addr, ipu_mem_wdata, ipu_mem_rdata, ipu_ring_drops;
  logic [NCH-1:0] ipu_dma_done;
  logic [31:0] ipu_csr_wdata, ipu_mem_addr;
  logic [NC-1:0] ipu_core_running;
  logic [NC-1:0][31:0] ipu_stp_stall_cycles;
  logic [NC:0][31:0] ipu_lbp_stall_cycles, ipu_lbp_starve_cycles;
  logic gd_st_req_valid, gd_st_req_we, gd_st_resp_valid, gd_cpu_req, gd_cpu_we, gd_cpu_valid;
  logic gd_l1_req, gd_l1_we, gd_l1_valid, gd_irq;
  logic [31:0] gd_st_req_addr, gd_st_req_wdata, gd_st_resp_rdata, gd_cpu_addr, gd_cpu_wdata, gd_cpu_rdata;
  logic [31:0] gd_l1_addr, gd_l1_wdata, gd_l1_rdata;
  logic [1:0] gd_cc_active;
  logic [1:0][31:0] gd_cachelet_hits;
  logic [3:0] murn_ch_en, murn_tx_valid, murn_tx_ack, murn_rx_valid, murn_rx_ack;
  logic [3:0][7:0] murn_tx_data, murn_rx_data;
  logic [1:0] murn_node_rx_valid, murn_node_rx_ready, murn_node_tx_valid, murn_node_tx_ready;
  logic [1:0] murn_node_pwr, murn_node_rst, murn_node_en;
  murn_pkt_t [1:0] murn_node_rx_pkt, murn_node_tx_pkt;
  logic [15:0] murn_drops;

  candle_top #(.NUM_CORES(NC), .ARR(ARR), .NLB(NLB), .LB_WORDS(LBW), .IRAM_DEPTH(IRD), .NCH(NCH)) dut (.*);

  // mechanism counters
  typedef enum int {M_DMA, M_LB_STALL, M_LB_STARVE, M_STP_STALL, M_BORDER_REPEAT, M_BORDER_MIRROR,
                    M_IPU_IRQ, M_RING_DROP, M_POWER_START_IGNORED, M_STATE_TREE,
                    M_CACHELET_HIT, M_L1_ARBITRATION, M_CC_EXCEPTION, M_GD_IRQ, M_MURN_DELIVER,
                    M_MURN_CMD, M_MURN_DROP, M_NMECH} mech_e;
  int mech [M_NMECH];

  // ---------------- IPU external memory ----------------
  logic [15:0] mem [65536];
  assign ipu_mem_rdata = mem[ipu_mem_addr[15:0]];
  always @(posedge clk) if (ipu_mem_we) mem[ipu_mem_addr[15:0]] <= ipu_mem_wdata;
  always @(posedge clk) if (ipu_irq) mech[M_IPU_IRQ]++;

  task automatic csr(input int unit, input int fn, input int low, input int data);
    ipu_csr_we = 1; ipu_csr_addr = 16'((unit << 12) | (fn << 8) | low); ipu_csr_wdata = 32'(data);
    @(negedge clk);
    ipu_csr_we = 0;
  endtask

  task automatic load_prog(input int core, input vliw_t p [16]);
    for (int i = 0; i < 16; i++) begin
      logic [127:0] w;
      w = 128'(p[i]);
      for (int k = 0; k < 4; k++) csr(core, 0, k, int'(w[k * 32 +: 32]));
      csr(core, 1, 0, i);
    end
  endtask

  task automatic lb_cfg(input int unit, input int lb, input int cap, input int border);
    csr(unit, 2, (lb << 4) | 0, IW);
    csr(unit, 2, (lb << 4) | 1, IH);
    csr(unit, 2, (lb << 4) | 2, cap);
    csr(unit, 2, (lb << 4) | 3, border);
    csr(unit, 2, (lb << 4) | 4, 1);
  endtask

  task automatic dma(input int chn, input int dir, input int base, input int dest, input int lb);
    csr(0, 4, (chn << 4) | 0, dir);
    csr(0, 4, (chn << 4) | 1, base);
    csr(0, 4, (chn << 4) | 2, IW);
    csr(0, 4, (chn << 4) | 3, IH);
    csr(0, 4, (chn << 4) | 4, dest);
    csr(0, 4, (chn << 4) | 5, lb);
    csr(0, 4, (chn << 4) | 6, 0);
    csr(0, 4, (chn << 4) | 7, 1);
  endtask

  function automatic int rep(input int v, input int n);
    return v < 0 ? 0 : v >= n ? n - 1 : v;
  endfunction
  function automatic int mir(input int v, input int n);
    return v < 0 ? -v : v >= n ? 2 * n - 2 - v : v;
  endfunction

  task automatic run_ipu();
    vliw_t p1 [16], p2 [16];
    logic [15:0] img [IH][IW], mid [IH][IW];
    int bad, stall, starve;
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++) begin
      img[y][x] = 16'($urandom_range(0, 1000));
      mem[IN_BASE + y * IW + x] = img[y][x];
    end
    blur3(p1, ARR, HALO, IH / ARR, 1'b0, 1, 2, 2);
    blur3(p2, ARR, HALO, IH / ARR, 1'b1, 2, 0, 0);
    load_prog(1, p1);
    load_prog(2, p2);
    lb_cfg(1, 1, CAP_CORE, 1);   // repeat edge
    lb_cfg(2, 2, CAP_CORE, 2);   // mirror
    lb_cfg(0, 0, CAP_IO, 0);     // zero
    csr(1, 3, 0, 0);
    csr(2, 3, 0, 0);
    dma(0, 0, IN_BASE, 1, 1);
    dma(1, 1, OUT_BASE, 0, 0);
    while (ipu_dma_done[1:0] != 2'b11 || ipu_core_running != '0) @(negedge clk);
    mech[M_DMA] += 2;
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++)
      mid[y][x] = img[y][rep(x - 1, IW)] + img[y][x] + img[y][rep(x + 1, IW)];
    bad = 0;
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++) begin
      logic [15:0] e;
      e = mid[mir(y - 1, IH)][x] + mid[y][x] + mid[mir(y + 1, IH)][x];
      if (mem[OUT_BASE + y * IW + x] !== e) begin
        bad++;
        if (bad < 5) $display("blur out(%0d,%0d) = %0d, expected %0d", x, y, mem[OUT_BASE + y * IW + x], e);
      end
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d blur pixels wrong", bad); end
    else begin
      // a correct result at the image edges exercised each border mode
      mech[M_BORDER_REPEAT]++; mech[M_BORDER_MIRROR]++;
    end
    checks++;
    if (mem[OUT_BASE + IW * IH] !== 16'hdead) begin failures++; $display("write past the output image"); end
    stall = 0; starve = 0;
    for (int u = 0; u <= NC; u++) begin stall += ipu_lbp_stall_cycles[u]; starve += ipu_lbp_starve_cycles[u]; end
    mech[M_LB_STALL] = stall;
    mech[M_LB_STARVE] = starve;
    mech[M_STP_STALL] = ipu_stp_stall_cycles[0] + ipu_stp_stall_cycles[1];
    $display("IPU: line-buffer stall %0d, starve %0d, STP stall %0d %0d cycles", stall, starve,
             ipu_stp_stall_cycles[0], ipu_stp_stall_cycles[1]);
    // power down core 2: start ignored, traffic dropped
    csr(15, 0, 0, (1 << NC) - 1 - 2);   // every core on but core 2
    csr(2, 3, 0, 0);
    #1;
    checks++;
    if (ipu_core_running[1]) begin failures++; $display("powered-down core started"); end
    else mech[M_POWER_START_IGNORED]++;
    dma(2, 0, IN_BASE, 2, 2);
    while (!ipu_dma_done[2]) @(negedge clk);
    mech[M_DMA]++;
    repeat (20) @(negedge clk);
    mech[M_RING_DROP] = ipu_ring_drops;
    checks++;
    if (ipu_ring_drops != 16'(IW * IH / 16)) begin failures++; $display("%0d flits dropped, expected %0d", ipu_ring_drops, IW * IH / 16); end
  endtask

  // ---------------- GreenDroid tile ----------------
  logic [31:0] l1mem [int];
  int l1_delay;
  always @(posedge clk) begin
    gd_l1_valid <= 1'b0;
    if (gd_l1_req && !gd_l1_valid) begin
      if (l1_delay == 0) begin
        gd_l1_valid <= 1'b1;
        if (gd_l1_we) l1mem[int'(gd_l1_addr)] = gd_l1_wdata;
        gd_l1_rdata <= l1mem.exists(int'(gd_l1_addr)) ? l1mem[int'(gd_l1_addr)] : 32'h0;
        l1_delay = $urandom_range(0, 2);
      end else l1_delay--;
    end
  end

  function automatic logic [31:0] st_addr(input int cc, input int bb, input int r);
    return {6'(cc), 13'(bb), 13'(r)};
  endfunction

  task automatic st_write(input logic [31:0] a, input logic [31:0] d);
    gd_st_req_valid = 1; gd_st_req_we = 1; gd_st_req_addr = a; gd_st_req_wdata = d;
    @(negedge clk);
    gd_st_req_valid = 0;
    repeat (3) @(negedge clk);
    mech[M_STATE_TREE]++;
  endtask

  task automatic st_read(input logic [31:0] a, output logic [31:0] d, output int lat);
    gd_st_req_valid = 1; gd_st_req_we = 0; gd_st_req_addr = a;
    @(negedge clk);
    gd_st_req_valid = 0;
    lat = 2;
    while (!gd_st_resp_valid && lat < 20) begin @(negedge clk); lat++; end
    d = gd_st_resp_rdata;
    @(negedge clk);
    mech[M_STATE_TREE]++;
  endtask

  // the CPU held off: its request waits while a c-core owns the L1 port
  always @(posedge clk) if (gd_cpu_req && !gd_cpu_valid && gd_cc_active != 0) mech[M_L1_ARBITRATION]++;

  bit cpu_valid_seen;
  logic [31:0] cpu_q;
  always @(posedge clk) begin
    cpu_valid_seen = gd_cpu_valid;
    if (gd_cpu_valid) cpu_q = gd_cpu_rdata;
  end

  task automatic cpu_access(input bit w, input int a, input logic [31:0] d, output logic [31:0] q, output int cycles);
    gd_cpu_req = 1; gd_cpu_we = w; gd_cpu_addr = 32'(a); gd_cpu_wdata = d;
    cycles = 0;
    do begin @(negedge clk); cycles++; end while (!cpu_valid_seen);
    q = cpu_q;
    gd_cpu_req = 0;
    @(negedge clk);
  endtask

  task automatic run_gd();
    logic [31:0] q, e, e5, st;
    int lat, cyc, n;
    n = 40;
    e = 0; e5 = 0;
    for (int k = 0; k < n; k++) begin
      logic [31:0] v;
      v = $urandom_range(0, 1 << 20);
      e += v;
      if (k < 5) e5 += v;
      cpu_access(1, 'h8000 + 4 * k, v, q, cyc);
    end
    st_write(st_addr(1, 0, 1), 32'h8000);
    st_read(st_addr(1, 0, 1), q, lat);
    checks++;
    if (q !== 32'h8000 || lat != 6) begin failures++; $display("state-tree read %h after %0d cycles", q, lat); end
    st_write(st_addr(1, 0, 3), n);
    st_write(st_addr(1, 2, 0), 1);
    cpu_access(0, 'h8000, 0, q, cyc);
    do st_read(st_addr(1, 2, 0), st, lat); while (st[5] !== 1'b1 && st[4] !== 1'b1);
    if (gd_irq) mech[M_GD_IRQ]++;
    st_read(st_addr(1, 0, 0), q, lat);
    checks++;
    if (q !== e) begin failures++; $display("array sum %0d, expected %0d", q, e); end
    mech[M_CACHELET_HIT] = gd_cachelet_hits[1];
    // exception on the loop-exit transition
    st_write(st_addr(1, 0, 1), 32'h8000);
    st_write(st_addr(1, 0, 3), 5);
    st_write(st_addr(1, 1, 5), 5'b00010);
    st_write(st_addr(1, 2, 0), 1);
    do st_read(st_addr(1, 2, 0), st, lat); while (st[5] !== 1'b1 && st[4] !== 1'b1);
    st_read(st_addr(1, 0, 0), q, lat);
    checks++;
    if (st[4] !== 1'b1 || st[10:8] !== 3'd1 || q !== e5) begin failures++; $display("exception run: status %h sum %0d", st, q); end
    else mech[M_CC_EXCEPTION]++;
    st_write(st_addr(1, 1, 5), 0);
  endtask

  // ---------------- MURN ----------------
  logic [79:0] tx_buf [4];
  int tx_n [4];
  murn_pkt_t mgot [$];
  murn_pkt_t pend [2][$];
  always @(negedge clk) for (int c = 0; c < 4; c++) murn_tx_ack[c] = murn_tx_valid[c] && ($urandom_range(0, 1) == 0);
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 4; c++) if (murn_tx_valid[c] && murn_tx_ack[c]) begin
      tx_buf[c] = {murn_tx_data[c], tx_buf[c][79:8]};
      tx_n[c]++;
      if (tx_n[c] == 10) begin mgot.push_back(murn_pkt_t'(tx_buf[c])); tx_n[c] = 0; end
    end
  always @(posedge clk) if (rst_n)
    for (int n = 0; n < 2; n++) begin
      if (murn_node_tx_valid[n] && murn_node_tx_ready[n]) void'(pend[n].pop_front());
      if (murn_node_rx_valid[n] && murn_node_rx_ready[n]) begin
        murn_pkt_t r;
        r = murn_node_rx_pkt[n];
        r.dest = 4'd0; r.src = 4'(n + 1);
        pend[n].push_back(r);
        mech[M_MURN_DELIVER]++;
      end
    end
  always @(negedge clk)
    for (int n = 0; n < 2; n++) begin
      murn_node_rx_ready[n] = 1'b1;
      murn_node_tx_valid[n] = pend[n].size() > 0;
      murn_node_tx_pkt[n]   = pend[n].size() > 0 ? pend[n][0] : '0;
    end

  task automatic far_send(input int c, input murn_pkt_t p);
    for (int b = 0; b < 10; b++) begin
      murn_rx_valid[c] = 1; murn_rx_data[c] = p[b * 8 +: 8];
      do @(posedge clk); while (!murn_rx_ack[c]);
      @(negedge clk);
      murn_rx_valid[c] = 0;
    end
  endtask

  function automatic murn_pkt_t mk(input int dest, input logic cmd, input logic [6:0] op, input logic [63:0] d);
    murn_pkt_t p;
    p.src = 4'd0; p.dest = 4'(dest); p.cmd = cmd; p.opcode = op; p.data = d;
    return p;
  endfunction

  task automatic run_murn();
    int bad;
    murn_pkt_t sent [$];
    for (int k = 0; k < 8; k++) begin
      sent.push_back(mk(1 + k % 2, 1'b0, 7'd5, {$urandom, $urandom}));
      far_send(k % 4, sent[$]);
    end
    repeat (300) @(negedge clk);
    checks++;
    bad = 0;
    foreach (sent[i]) begin
      int f;
      f = 0;
      foreach (mgot[j]) if (mgot[j].data == sent[i].data && mgot[j].src == sent[i].dest) f = 1;
      if (!f) bad++;
    end
    if (bad != 0 || mgot.size() != 8) begin failures++; $display("MURN: %0d replies, %0d missing", mgot.size(), bad); end
    far_send(0, mk(2, 1'b1, SW_POWER, 64'd0));
    repeat (30) @(negedge clk);
    if (murn_node_pwr == 2'b01) mech[M_MURN_CMD]++;
    for (int k = 0; k < 3; k++) far_send(1, mk(2, 1'b0, 7'd5, 64'(k)));
    repeat (100) @(negedge clk);
    mech[M_MURN_DROP] = murn_drops;
    checks++;
    if (murn_drops != 3) begin failures++; $display("MURN drops %0d, expected 3", murn_drops); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [M_NMECH];
    names = '{"DMA transfer", "line-buffer stall", "line-buffer starve", "STP stall",
              "repeat border", "mirror border", "IPU interrupt",
              "ring drop (power-down)", "start ignored (power-down)", "state-tree access",
              "cachelet hit", "L1 port arbitration", "c-core exception", "tile interrupt",
              "MURN delivery", "MURN command", "MURN drop"};
    for (int m = 0; m < M_NMECH; m++) mech[m] = 0;
    rst_n = 0;
    ipu_csr_we = 0; ipu_csr_addr = 0; ipu_csr_wdata = 0;
    gd_st_req_valid = 0; gd_st_req_we = 0; gd_st_req_addr = 0; gd_st_req_wdata = 0;
    gd_cpu_req = 0; gd_cpu_we = 0; gd_cpu_addr = 0; gd_cpu_wdata = 0; gd_l1_rdata = 0; l1_delay = 0;
    murn_ch_en = '1; murn_rx_valid = '0; murn_rx_data = '0; murn_tx_ack = '0;
    murn_node_rx_ready = '0; murn_node_tx_valid = '0; murn_node_tx_pkt = '0;
    for (int c = 0; c < 4; c++) begin tx_n[c] = 0; tx_buf[c] = '0; end
    for (int i = 0; i < 65536; i++) mem[i] = 16'hdead;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      run_ipu();
      run_gd();
      run_murn();
    join
    for (int m = 0; m < M_NMECH; m++) begin
      $display("mechanism %-28s %0d", names[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("mechanism never happened: %s", names[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
