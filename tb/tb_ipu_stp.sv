// tb_ipu_stp: self-checking test of one Stencil Processor.
//
// Reduced array (8x8 compute lanes, 2-lane halo).  The STP runs the
// horizontal 3-tap blur program over two sheets stacked vertically.  The
// testbench plays the local line buffer pool (each pixel a function of its
// coordinates, repeat-edge border at x < 0 and x >= 8, random starving) and
// the NoC (random back-pressure).  Checked: every output flit against the
// blur computed in the testbench, its destination core, line buffer and
// origin; the read-pointer advances; the halt interrupt; and that the
// processor stalled while a sheet transfer was outstanding.
module tb_ipu_stp;
  import ipu_pkg::*;
  import ipu_prog_pkg::*;
  localparam int ARR = 8, HALO = 2, NSH = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, iram_we, start, running, irq, lbp_rd_valid, lbp_rd_ready, rel_valid, flit_valid, flit_ready;
  logic [6:0] iram_addr;
  logic [118:0] iram_wdata;
  logic [2:0] lbp_rd_lb, rel_lb, rel_id;
  logic signed [12:0] lbp_rd_x, lbp_rd_y;
  logic [15:0][15:0] lbp_rd_data;
  logic [12:0] rel_row;
  flit_t flit;
  logic [31:0] stall_cycles;

  ipu_stp #(.ARR(ARR), .HALO(HALO), .IRAM_DEPTH(128)) dut (.clk, .rst_n, .iram_we, .iram_addr,
    .iram_wdata, .start, .running, .irq, .lbp_rd_valid, .lbp_rd_ready, .lbp_rd_lb, .lbp_rd_x,
    .lbp_rd_y, .lbp_rd_data, .rel_valid, .rel_lb, .rel_id, .rel_row, .flit_valid, .flit_ready,
    .flit, .stall_cycles);

  function automatic logic [15:0] pix(input int x, input int y);
    if (x < 0) x = 0;
    if (x > ARR - 1) x = ARR - 1;
    return 16'(x * 37 + y * 11 + 3);
  endfunction

  always_comb
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      lbp_rd_data[i * 4 + j] = pix(int'(lbp_rd_x) + j, int'(lbp_rd_y) + i);
  always @(negedge clk) begin
    lbp_rd_ready <= 1'($urandom_range(0, 3) != 0);
    flit_ready   <= 1'($urandom_range(0, 3) != 0);
  end

  int nflit, nrel, nirq, nbad;
  always @(posedge clk) if (rst_n) begin
    if (irq) nirq++;
    if (rel_valid) begin
      nrel++;
      checks++;
      if (rel_lb !== 3'd1 || rel_id !== 3'd0 || int'(rel_row) != nrel * ARR - HALO) begin
        failures++; $display("release %0d: lb %0d id %0d row %0d", nrel, rel_lb, rel_id, rel_row);
      end
    end
    if (flit_valid && flit_ready) begin
      int bad;
      bad = 0;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        int x, y;
        x = int'(flit.x) + j; y = int'(flit.y) + i;
        if (flit.data[i * 4 + j] !== 16'(pix(x - 1, y) + pix(x, y) + pix(x + 1, y))) begin bad++; if (bad == 1) $display("x %0d y %0d got %0d exp %0d", x, y, flit.data[i*4+j], 16'(pix(x - 1, y) + pix(x, y) + pix(x + 1, y))); end
      end
      checks++;
      if (bad != 0 || flit.dest !== 4'd6 || flit.lb !== 3'd2 || int'(flit.x) != 4 * (nflit % 2) ||
          int'(flit.y) != 4 * (nflit / 2)) begin
        failures++; $display("flit %0d (%0d,%0d) dest %0d lb %0d: %0d pixels wrong", nflit, flit.x, flit.y, flit.dest, flit.lb, bad);
      end
      nflit++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vliw_t prog [16];
    blur3(prog, ARR, HALO, NSH, 1'b0, 1, 6, 2);
    rst_n = 0; iram_we = 0; iram_addr = 0; iram_wdata = 0; start = 0; nflit = 0; nrel = 0; nirq = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      iram_we = 1; iram_addr = 7'(i); iram_wdata = prog[i]; @(negedge clk);
    end
    iram_we = 0;
    start = 1; @(negedge clk); start = 0;
    while (running) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (nflit != NSH * (ARR / 4) * (ARR / 4)) begin failures++; $display("%0d flits", nflit); end
    checks++;
    if (nrel != NSH) begin failures++; $display("%0d releases", nrel); end
    checks++;
    if (nirq != 1) begin failures++; $display("%0d interrupts", nirq); end
    checks++;
    if (stall_cycles == 0) begin failures++; $display("no stall cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
