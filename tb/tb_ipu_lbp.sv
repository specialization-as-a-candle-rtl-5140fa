// tb_ipu_lbp: self-checking test of a Line Buffer Pool.
//
// Four line buffers of 512 words each (reduced sizes).  Each buffer gets
// its own 16-pixel band of random data; reading every block back from every
// buffer checks that the port steering keeps the buffers apart.  Holding a
// refused write (buffer full) and a refused read (row not written) for a
// known number of cycles checks the stall and starve cycle counters.
module tb_ipu_lbp;
  import ipu_pkg::*;
  localparam int NLB = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, cfg_we, wr_valid, wr_ready, rd_valid, rd_ready, rel_valid;
  logic [2:0] cfg_lb, wr_lb, rd_lb, rel_lb, rel_id;
  logic [3:0] cfg_field;
  logic [15:0] cfg_wdata;
  logic [11:0] wr_x, wr_y;
  logic signed [12:0] rd_x, rd_y;
  logic [15:0][15:0] wr_data, rd_data;
  logic [12:0] rel_row;
  logic [31:0] stall_cnt, starve_cnt;
  logic [15:0] img [NLB][4][16];

  ipu_lbp #(.NLB(NLB), .LB_WORDS(512)) dut (.clk, .rst_n, .cfg_we, .cfg_lb, .cfg_field, .cfg_wdata,
    .wr_valid, .wr_ready, .wr_lb, .wr_x, .wr_y, .wr_data,
    .rd_valid, .rd_ready, .rd_lb, .rd_x, .rd_y, .rd_data,
    .rel_valid, .rel_lb, .rel_id, .rel_row, .stall_cnt, .starve_cnt);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; cfg_we = 0; cfg_lb = 0; cfg_field = 0; cfg_wdata = 0; wr_valid = 0; wr_lb = 0;
    wr_x = 0; wr_y = 0; wr_data = '0; rd_valid = 0; rd_lb = 0; rd_x = 0; rd_y = 0;
    rel_valid = 0; rel_lb = 0; rel_id = 0; rel_row = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // every buffer: 16 wide, 16 high, 4 rows of storage, reader 0 enabled
    for (int b = 0; b < NLB; b++) begin
      cfg_we = 1; cfg_lb = 3'(b);
      cfg_field = 2; cfg_wdata = 2; @(negedge clk);
      cfg_field = 4; cfg_wdata = 1; @(negedge clk);
      cfg_we = 0;
    end
    // starve: read buffer 2 before anything is written, for 5 cycles
    rd_valid = 1; rd_lb = 2; rd_x = 0; rd_y = 0;
    repeat (5) @(negedge clk);
    rd_valid = 0;
    checks++;
    if (starve_cnt !== 32'd5) begin failures++; $display("starve_cnt %0d, expected 5", starve_cnt); end
    for (int b = 0; b < NLB; b++)
      for (int bx = 0; bx < 16; bx += 4) begin
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
          img[b][i][bx + j] = 16'($urandom); wr_data[i * 4 + j] = img[b][i][bx + j];
        end
        wr_valid = 1; wr_lb = 3'(b); wr_x = 12'(bx); wr_y = 0;
        #1;
        checks++;
        if (!wr_ready) begin failures++; $display("write to buffer %0d refused", b); end
        @(negedge clk);
      end
    wr_valid = 0;
    for (int b = 0; b < NLB; b++)
      for (int bx = 0; bx < 16; bx += 4) begin
        int bad;
        bad = 0;
        rd_valid = 1; rd_lb = 3'(b); rd_x = 13'(bx); rd_y = 0;
        #1;
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
          if (rd_data[i * 4 + j] !== img[b][i][bx + j]) bad++;
        checks++;
        if (bad != 0 || !rd_ready) begin failures++; $display("buffer %0d block %0d: %0d wrong", b, bx, bad); end
        @(negedge clk);
      end
    rd_valid = 0;
    // stall: buffer 1 holds 4 rows, reader 0 still at row 0; hold for 7 cycles
    wr_valid = 1; wr_lb = 1; wr_x = 0; wr_y = 4;
    repeat (7) @(negedge clk);
    wr_valid = 0;
    checks++;
    if (stall_cnt !== 32'd7) begin failures++; $display("stall_cnt %0d, expected 7", stall_cnt); end
    // release in buffer 1 lets the write in
    rel_valid = 1; rel_lb = 1; rel_id = 0; rel_row = 4; @(negedge clk); rel_valid = 0;
    wr_valid = 1; wr_lb = 1; wr_x = 0; wr_y = 4; #1;
    checks++;
    if (!wr_ready) begin failures++; $display("write refused after release"); end
    @(negedge clk);
    wr_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
