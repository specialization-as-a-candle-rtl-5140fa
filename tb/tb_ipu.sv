// tb_ipu: end-to-end test of the Image Processing Unit at reduced size.
//
// Two cores with 8x8 compute arrays.  A 3x3 box blur runs as a two-stage
// pipeline, the way the IPU maps an image pipeline onto its cores:
//   DMA channel 0: external memory -> line buffer 1 of core 1 (over the ring)
//   core 1: horizontal 3-tap sum, sheets stored to line buffer 2 of core 2
//   core 2: vertical 3-tap sum, sheets stored to line buffer 0 of the I/O block
//   DMA channel 1: line buffer 0 of the I/O block -> external memory
// Line buffer 1 repeats the edge pixel outside the image, line buffer 2
// mirrors.  The output image is compared with a blur computed in the
// testbench.  Buffers are sized so that producers run ahead of consumers:
// the test requires line-buffer stalls, starving reads and STP stalls to
// have happened.  Finally core 2 is powered down: a further DMA transfer
// addressed to it must be dropped by the ring and counted, and a start
// command to it ignored.
module tb_ipu;
  import ipu_pkg::*;
  import ipu_prog_pkg::*;
  localparam int NC = 2, ARR = 8, HALO = 2, NLB = 4, LBW = 1024, IRD = 64, NCH = 4;
  localparam int IW = ARR, IH = 4 * ARR;
  localparam int IN_BASE = 'h100, OUT_BASE = 'h4000;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, csr_we, irq, mem_we;
  logic [15:0] csr_addr, mem_wdata, mem_rdata, ring_drops;
  logic [31:0] csr_wdata, mem_addr;
  logic [NC-1:0] core_running;
  logic [NCH-1:0] dma_done;
  logic [NC-1:0][31:0] stp_stall_cycles;
  logic [NC:0][31:0] lbp_stall_cycles, lbp_starve_cycles;
  logic [15:0] mem [65536];

  ipu #(.NUM_CORES(NC), .ARR(ARR), .HALO(HALO), .NLB(NLB), .LB_WORDS(LBW), .IRAM_DEPTH(IRD), .NCH(NCH)) dut (
    .clk, .rst_n, .csr_we, .csr_addr, .csr_wdata, .irq, .core_running, .dma_done,
    .mem_addr, .mem_we, .mem_wdata, .mem_rdata, .stp_stall_cycles, .lbp_stall_cycles,
    .lbp_starve_cycles, .ring_drops);

  assign mem_rdata = mem[mem_addr[15:0]];
  always @(posedge clk) if (mem_we) mem[mem_addr[15:0]] <= mem_wdata;

  task automatic csr(input int unit, input int fn, input int low, input int data);
    csr_we = 1; csr_addr = 16'((unit << 12) | (fn << 8) | low); csr_wdata = 32'(data);
    @(negedge clk);
    csr_we = 0;
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

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vliw_t p1 [16], p2 [16];
    logic [15:0] img [IH][IW], mid [IH][IW];
    int bad;
    rst_n = 0; csr_we = 0; csr_addr = 0; csr_wdata = 0;
    for (int i = 0; i < 65536; i++) mem[i] = 16'hdead;
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++) begin
      img[y][x] = 16'($urandom_range(0, 1000));
      mem[IN_BASE + y * IW + x] = img[y][x];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    blur3(p1, ARR, HALO, IH / ARR, 1'b0, 1, 2, 2);
    blur3(p2, ARR, HALO, IH / ARR, 1'b1, 2, 0, 0);
    load_prog(1, p1);
    load_prog(2, p2);
    lb_cfg(1, 1, 4, 1);   // 16 rows, repeat edge
    lb_cfg(2, 2, 4, 2);   // 16 rows, mirror
    lb_cfg(0, 0, 3, 0);   // 8 rows, zero
    csr(1, 3, 0, 0);
    csr(2, 3, 0, 0);
    dma(0, 0, IN_BASE, 1, 1);
    dma(1, 1, OUT_BASE, 0, 0);
    while (dma_done[1:0] != 2'b11 || core_running != '0) @(negedge clk);
    // reference blur
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++)
      mid[y][x] = img[y][rep(x - 1, IW)] + img[y][x] + img[y][rep(x + 1, IW)];
    bad = 0;
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++) begin
      logic [15:0] e;
      e = mid[mir(y - 1, IH)][x] + mid[y][x] + mid[mir(y + 1, IH)][x];
      if (mem[OUT_BASE + y * IW + x] !== e) begin
        bad++;
        if (bad < 5) $display("out(%0d,%0d) = %0d, expected %0d", x, y, mem[OUT_BASE + y * IW + x], e);
      end
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d output pixels wrong", bad); end
    checks++;
    if (mem[OUT_BASE + IW * IH] !== 16'hdead) begin failures++; $display("write past the output image"); end
    $display("line-buffer stall cycles %0d %0d %0d, starve cycles %0d %0d %0d, STP stall cycles %0d %0d",
             lbp_stall_cycles[0], lbp_stall_cycles[1], lbp_stall_cycles[2],
             lbp_starve_cycles[0], lbp_starve_cycles[1], lbp_starve_cycles[2],
             stp_stall_cycles[0], stp_stall_cycles[1]);
    checks++;
    if (lbp_stall_cycles[0] + lbp_stall_cycles[1] + lbp_stall_cycles[2] == 0) begin failures++; $display("no line-buffer stall"); end
    checks++;
    if (lbp_starve_cycles[0] + lbp_starve_cycles[1] + lbp_starve_cycles[2] == 0) begin failures++; $display("no starving read"); end
    checks++;
    if (stp_stall_cycles[0] == 0 || stp_stall_cycles[1] == 0) begin failures++; $display("no STP stall"); end
    // power down core 2: its traffic is dropped, its start ignored
    csr(15, 0, 0, 1);
    csr(2, 3, 0, 0);
    #1;
    checks++;
    if (core_running[1]) begin failures++; $display("powered-down core started"); end
    dma(2, 0, IN_BASE, 2, 2);
    while (!dma_done[2]) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (ring_drops != 16'(IW * IH / 16)) begin failures++; $display("%0d flits dropped, expected %0d", ring_drops, IW * IH / 16); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
