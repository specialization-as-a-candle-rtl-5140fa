// tb_ipu_sheet_gen: self-checking test of the Sheet Generator.
//
// Reduced array: 8x8 compute lanes with a 2-lane halo, so a sheet load is
// 3x3 = 9 blocks and a sheet store 2x2 = 4 blocks.  The testbench plays the
// line buffer pool (pixel value a function of its image coordinates, with
// random starving) and the lane array (a block read returns a function of
// its block position) and the NoC (random back-pressure).  It checks
// that a load requests the right image block for every array block,
// including the halo offset, that a store emits one flit per compute block
// with the right destination, buffer, origin and data, and that with no
// back-pressure a load takes one cycle per block (9 here, 25 at full size)
// and a store one cycle per block.
module tb_ipu_sheet_gen;
  import ipu_pkg::*;
  localparam int ARR = 8, HALO = 2, NBL = 3, NBS = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, ld_req, st_req, busy;
  logic [11:0] org_x, org_y;
  logic [3:0] vreg, dest, arr_ld_reg, arr_rd_reg;
  logic [2:0] lb, lbp_rd_lb, arr_ld_br, arr_ld_bc, arr_rd_br, arr_rd_bc;
  logic lbp_rd_valid, lbp_rd_ready, arr_ld_we, flit_valid, flit_ready;
  logic signed [12:0] lbp_rd_x, lbp_rd_y;
  logic [15:0][15:0] lbp_rd_data, arr_ld_data, arr_rd_data;
  flit_t flit;
  bit random_bp;

  ipu_sheet_gen #(.ARR(ARR), .HALO(HALO)) dut (.clk, .rst_n, .ld_req, .st_req, .org_x, .org_y,
    .vreg, .lb, .dest, .busy, .lbp_rd_valid, .lbp_rd_ready, .lbp_rd_lb, .lbp_rd_x, .lbp_rd_y,
    .lbp_rd_data, .arr_ld_we, .arr_ld_reg, .arr_ld_br, .arr_ld_bc, .arr_ld_data, .arr_rd_reg,
    .arr_rd_br, .arr_rd_bc, .arr_rd_data, .flit_valid, .flit_ready, .flit);

  function automatic logic [15:0] pix(input int x, input int y);
    return 16'(x * 131 + y * 7 + 5);
  endfunction

  always_comb
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      lbp_rd_data[i * 4 + j] = pix(int'(lbp_rd_x) + j, int'(lbp_rd_y) + i);
      arr_rd_data[i * 4 + j] = 16'(int'(arr_rd_reg) * 1000 + int'(arr_rd_br) * 100 + int'(arr_rd_bc) * 10 + i * 4 + j);
    end

  always @(negedge clk) begin
    lbp_rd_ready <= random_bp ? 1'($urandom_range(0, 2) != 0) : 1'b1;
    flit_ready   <= random_bp ? 1'($urandom_range(0, 2) != 0) : 1'b1;
  end

  int loaded [NBL][NBL];
  int flits;
  // array side: check every written block
  always @(posedge clk) if (rst_n && arr_ld_we) begin
    int bad;
    bad = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      if (arr_ld_data[i * 4 + j] !== pix(int'(org_x) - HALO + 4 * int'(arr_ld_bc) + j,
                                         int'(org_y) - HALO + 4 * int'(arr_ld_br) + i)) bad++;
    checks++;
    if (bad != 0 || arr_ld_reg !== vreg || lbp_rd_lb !== lb) begin
      failures++;
      $display("load block (%0d,%0d): %0d pixels wrong", arr_ld_br, arr_ld_bc, bad);
    end
    loaded[arr_ld_br][arr_ld_bc]++;
  end
  // NoC side: check every accepted flit
  always @(posedge clk) if (rst_n && flit_valid && flit_ready) begin
    int bad, br, bc;
    bad = 0;
    br = flits / NBS; bc = flits % NBS;
    for (int k = 0; k < 16; k++)
      if (flit.data[k] !== 16'(int'(vreg) * 1000 + br * 100 + bc * 10 + k)) bad++;
    checks++;
    if (bad != 0 || flit.dest !== dest || flit.lb !== lb ||
        int'(flit.x) != int'(org_x) + 4 * bc || int'(flit.y) != int'(org_y) + 4 * br) begin
      failures++;
      $display("flit %0d wrong: dest %0d lb %0d x %0d y %0d bad %0d", flits, flit.dest, flit.lb, flit.x, flit.y, bad);
    end
    flits++;
  end

  task automatic run(input bit load, input int expect_cycles);
    int cyc = 0;
    foreach (loaded[i, j]) loaded[i][j] = 0;
    flits = 0;
    org_x = 12'($urandom_range(0, 50) * 4); org_y = 12'($urandom_range(0, 50) * 4);
    vreg = 4'($urandom_range(0, 9)); lb = 3'($urandom); dest = 4'($urandom_range(0, 8));
    ld_req = load; st_req = !load;
    @(negedge clk);
    ld_req = 0; st_req = 0;
    while (busy) begin @(negedge clk); cyc++; end
    if (load) begin
      int bad;
      bad = 0;
      foreach (loaded[i, j]) if (loaded[i][j] != 1) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("load: %0d blocks not written exactly once", bad); end
    end else begin
      checks++;
      if (flits != NBS * NBS) begin failures++; $display("store: %0d flits", flits); end
    end
    if (expect_cycles > 0) begin
      checks++;
      if (cyc != expect_cycles) begin failures++; $display("transfer took %0d cycles, expected %0d", cyc, expect_cycles); end
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
    rst_n = 0; ld_req = 0; st_req = 0; org_x = 0; org_y = 0; vreg = 0; lb = 0; dest = 0;
    random_bp = 0; lbp_rd_ready = 1; flit_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // one block per cycle
    run(1, NBL * NBL);
    run(0, NBS * NBS);
    random_bp = 1;
    for (int n = 0; n < 20; n++) run(n % 2 == 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
