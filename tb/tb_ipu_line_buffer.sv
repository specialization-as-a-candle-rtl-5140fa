// tb_ipu_line_buffer: self-checking test of one line buffer.
//
// A 16-pixel-wide, 12-row image goes through a buffer of 8 rows (cap_log2 =
// 3) with two readers enabled.  The test checks:
//   * starve: a read of a row not yet written is refused;
//   * write pointer: wr_rows advances by four rows when the last block of a
//     band is written;
//   * stall: a band that would overwrite rows a reader still holds is
//     refused until both readers release them;
//   * reads at random origins, including outside the image, for each of
//     the three border modes (zero, repeat, mirror), against the image held
//     in the testbench;
//   * the ring wraps: after the release, rows 8..11 reuse the storage of
//     rows 0..3 and read back correctly.
module tb_ipu_line_buffer;
  import ipu_pkg::*;
  localparam int WID = 16, HGT = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, cfg_we, wr_valid, wr_ready, rd_valid, rd_ready, rel_valid;
  logic [3:0] cfg_field;
  logic [15:0] cfg_wdata;
  logic [11:0] wr_x, wr_y;
  logic signed [12:0] rd_x, rd_y;
  logic [15:0][15:0] wr_data, rd_data;
  logic [2:0] rel_id;
  logic [12:0] rel_row, wr_rows;
  logic [15:0] img [HGT][WID];

  ipu_line_buffer #(.WORDS(1024)) dut (.clk, .rst_n, .cfg_we, .cfg_field, .cfg_wdata,
    .wr_valid, .wr_ready, .wr_x, .wr_y, .wr_data, .rd_valid, .rd_ready, .rd_x, .rd_y, .rd_data,
    .rel_valid, .rel_id, .rel_row, .wr_rows);

  task automatic cfg(input int f, input int v);
    cfg_we = 1; cfg_field = 4'(f); cfg_wdata = 16'(v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic write_band(input int y0);
    for (int bx = 0; bx < WID; bx += 4) begin
      wr_valid = 1; wr_x = 12'(bx); wr_y = 12'(y0);
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) wr_data[i * 4 + j] = img[y0 + i][bx + j];
      @(negedge clk);
    end
    wr_valid = 0;
  endtask

  function automatic int ref_map(input int v, input int size, input int mode, output bit out);
    out = 0;
    if (v >= 0 && v < size) return v;
    if (mode == 0) begin out = 1; return 0; end
    if (mode == 1) return (v < 0) ? 0 : size - 1;
    return (v < 0) ? -v : 2 * size - 2 - v;
  endfunction

  task automatic check_read(input int x0, input int y0, input int mode, input int ylo);
    int bad = 0;
    rd_valid = 1; rd_x = 13'(x0); rd_y = 13'(y0);
    #1;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        bit ox, oy;
        int xr, yr;
        logic [15:0] e;
        xr = ref_map(x0 + j, WID, mode, ox);
        yr = ref_map(y0 + i, HGT, mode, oy);
        e = (ox || oy) ? 16'h0 : img[yr][xr];
        if (rd_data[i * 4 + j] !== e) bad++;
      end
    checks++;
    if (bad != 0 || !rd_ready) begin
      failures++;
      if (failures < 10) $display("read (%0d,%0d) mode %0d: %0d wrong, ready %b", x0, y0, mode, bad, rd_ready);
    end
    rd_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; cfg_we = 0; cfg_field = 0; cfg_wdata = 0; wr_valid = 0; wr_x = 0; wr_y = 0;
    wr_data = '0; rd_valid = 0; rd_x = 0; rd_y = 0; rel_valid = 0; rel_id = 0; rel_row = 0;
    for (int r = 0; r < HGT; r++) for (int c = 0; c < WID; c++) img[r][c] = 16'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg(0, WID); cfg(1, HGT); cfg(2, 3); cfg(3, 0); cfg(4, 3);
    // starve: nothing written yet
    rd_x = 0; rd_y = 0; #1;
    checks++;
    if (rd_ready) begin failures++; $display("read of unwritten row accepted"); end
    write_band(0);
    checks++;
    if (wr_rows !== 13'd4) begin failures++; $display("wr_rows %0d after first band", wr_rows); end
    rd_x = 0; rd_y = 2; #1;
    checks++;
    if (rd_ready) begin failures++; $display("read across rows 4,5 accepted before written"); end
    write_band(4);
    checks++;
    if (wr_rows !== 13'd8) begin failures++; $display("wr_rows %0d after second band", wr_rows); end
    // stall: rows 8..11 would overwrite rows 0..3, still held by both readers
    wr_x = 0; wr_y = 8; #1;
    checks++;
    if (wr_ready) begin failures++; $display("overwriting write accepted"); end
    // reads at random origins in every border mode (rows 0..7 available)
    for (int mode = 0; mode < 3; mode++) begin
      cfg(3, mode);
      for (int n = 0; n < 60; n++)
        check_read($urandom_range(0, WID + 5) - 3, $urandom_range(0, 6) - 3, mode, 0);
    end
    // release rows 0..3 by one reader: still stalled
    rel_valid = 1; rel_id = 0; rel_row = 4; @(negedge clk); rel_valid = 0;
    wr_x = 0; wr_y = 8; #1;
    checks++;
    if (wr_ready) begin failures++; $display("write accepted with reader 1 holding row 0"); end
    rel_valid = 1; rel_id = 1; rel_row = 4; @(negedge clk); rel_valid = 0;
    wr_y = 8; #1;
    checks++;
    if (!wr_ready) begin failures++; $display("write refused after both releases"); end
    write_band(8);
    for (int mode = 0; mode < 3; mode++) begin
      cfg(3, mode);
      for (int n = 0; n < 40; n++)
        check_read($urandom_range(0, WID + 5) - 3, $urandom_range(4, 11), mode, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
