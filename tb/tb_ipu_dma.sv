// tb_ipu_dma: self-checking test of the DMA engine.
//
// Reduced to 4 channels.  The testbench provides a word-addressed external
// memory, accepts NoC flits with random back-pressure and plays the I/O
// block's line buffer pool (a block read returns a function of its position,
// with random starving).  Two channels run together: channel 1 moves a
// 12x8 image from memory into a line buffer of core 3 as flits, channel 2
// moves an 8x8 image from a line buffer into memory.  Checked: every flit's
// destination, buffer, origin and pixels; every memory word written; the
// read-pointer advance after each finished band of the output; the done
// bits and the interrupt count.
module tb_ipu_dma;
  import ipu_pkg::*;
  localparam int NCH = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, cfg_we, irq, mem_we, flit_valid, flit_ready, lbp_rd_valid, lbp_rd_ready, rel_valid;
  logic [1:0] cfg_ch;
  logic [3:0] cfg_field;
  logic [31:0] cfg_wdata, mem_addr;
  logic [NCH-1:0] done;
  logic [15:0] mem_wdata, mem_rdata;
  flit_t flit;
  logic [2:0] lbp_rd_lb, rel_lb, rel_id;
  logic signed [12:0] lbp_rd_x, lbp_rd_y;
  logic [15:0][15:0] lbp_rd_data;
  logic [12:0] rel_row;
  logic [15:0] mem [65536];

  ipu_dma #(.NCH(NCH)) dut (.clk, .rst_n, .cfg_we, .cfg_ch, .cfg_field, .cfg_wdata, .done, .irq,
    .mem_addr, .mem_we, .mem_wdata, .mem_rdata, .flit_valid, .flit_ready, .flit,
    .lbp_rd_valid, .lbp_rd_ready, .lbp_rd_lb, .lbp_rd_x, .lbp_rd_y, .lbp_rd_data,
    .rel_valid, .rel_lb, .rel_id, .rel_row);

  function automatic logic [15:0] opix(input int x, input int y);
    return 16'(x * 17 + y * 301 + 9);
  endfunction

  assign mem_rdata = mem[mem_addr[15:0]];
  always @(posedge clk) if (mem_we) mem[mem_addr[15:0]] <= mem_wdata;
  always_comb
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      lbp_rd_data[i * 4 + j] = opix(int'(lbp_rd_x) + j, int'(lbp_rd_y) + i);
  always @(negedge clk) begin
    flit_ready   <= 1'($urandom_range(0, 3) != 0);
    lbp_rd_ready <= 1'($urandom_range(0, 3) != 0);
  end

  int nflit, nrel, nirq;
  always @(posedge clk) if (rst_n) begin
    if (irq) nirq++;
    if (flit_valid && flit_ready) begin
      int bad;
      bad = 0;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
        if (flit.data[i * 4 + j] !== 16'((int'(flit.y) + i) * 12 + int'(flit.x) + j + 7)) bad++;
      checks++;
      if (bad != 0 || flit.dest !== 4'd3 || flit.lb !== 3'd2 ||
          int'(flit.x) != 4 * (nflit % 3) || int'(flit.y) != 4 * (nflit / 3)) begin
        failures++; $display("flit %0d at (%0d,%0d): %0d pixels wrong", nflit, flit.x, flit.y, bad);
      end
      nflit++;
    end
    if (rel_valid) begin
      nrel++;
      checks++;
      if (rel_lb !== 3'd1 || rel_id !== 3'd2 || int'(rel_row) != 4 * nrel) begin
        failures++; $display("read-pointer advance %0d: lb %0d id %0d row %0d", nrel, rel_lb, rel_id, rel_row);
      end
    end
  end

  task automatic cfg(input int chn, input int f, input int v);
    cfg_we = 1; cfg_ch = 2'(chn); cfg_field = 4'(f); cfg_wdata = 32'(v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; cfg_we = 0; cfg_ch = 0; cfg_field = 0; cfg_wdata = 0; nflit = 0; nrel = 0; nirq = 0;
    for (int i = 0; i < 65536; i++) mem[i] = 16'hdead;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 12; x++) mem[16'h100 + y * 12 + x] = 16'(y * 12 + x + 7);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // channel 1: memory -> line buffer 2 of core 3
    cfg(1, 0, 0); cfg(1, 1, 'h100); cfg(1, 2, 12); cfg(1, 3, 8); cfg(1, 4, 3); cfg(1, 5, 2);
    // channel 2: line buffer 1 of the I/O block -> memory, reader 2
    cfg(2, 0, 1); cfg(2, 1, 'h2000); cfg(2, 2, 8); cfg(2, 3, 8); cfg(2, 5, 1); cfg(2, 6, 2);
    cfg(1, 7, 1); cfg(2, 7, 1);
    while (done[2:1] != 2'b11) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (nflit != 6) begin failures++; $display("%0d flits, expected 6", nflit); end
    checks++;
    if (nrel != 2) begin failures++; $display("%0d read-pointer advances, expected 2", nrel); end
    checks++;
    if (nirq != 2) begin failures++; $display("%0d interrupts, expected 2", nirq); end
    begin
      int bad;
      bad = 0;
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
        if (mem[16'h2000 + y * 8 + x] !== opix(x, y)) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("%0d output words wrong", bad); end
      checks++;
      if (mem[16'h2000 + 64] !== 16'hdead || mem[16'h1fff] !== 16'hdead) begin
        failures++; $display("write outside the output image");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
