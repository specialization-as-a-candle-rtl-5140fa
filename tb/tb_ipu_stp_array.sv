// tb_ipu_stp_array: self-checking test of the lane array and shift network.
//
// Runs a reduced 8x8 array with a 2-lane halo (12x12 lanes, 3x3 blocks).
// Random pixels are loaded block by block through the Sheet Generator
// port; then, for every direction and every distance from 1 to 4 hops, a
// neighbour-read instruction is issued and the whole compute region is
// read back and compared with a torus rotation of the loaded image
// computed in the testbench.  Also checks a SIMD add with a broadcast
// operand and the coordinate status read.
module tb_ipu_stp_array;
  import ipu_pkg::*;
  localparam int ARR = 8, HALO = 2, S = ARR + 2 * HALO, NB = S / 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, issue, ld_we;
  vmath_instr_t vm;
  vmem_instr_t vmem;
  logic [9:0] mimm;
  logic [15:0] bcast;
  logic [3:0] ld_reg, rd_reg;
  logic [2:0] ld_br, ld_bc, rd_br, rd_bc;
  logic [15:0][15:0] ld_data, rd_data;
  logic [15:0] img [S][S];

  ipu_stp_array #(.ARR(ARR), .HALO(HALO)) dut (.clk, .rst_n, .issue, .vm, .vmem, .mimm, .bcast,
    .ld_we, .ld_reg, .ld_br, .ld_bc, .ld_data, .rd_reg, .rd_br, .rd_bc, .rd_data);

  task automatic idle();
    issue = 0; vm = '0; vmem = '0; mimm = '0; ld_we = 0;
  endtask

  function automatic logic [15:0] expect_nbr(int r, int c, int dir, int h);
    case (dir)
      DIR_N: return img[(r - h + S) % S][c];
      DIR_S: return img[(r + h) % S][c];
      DIR_E: return img[r][(c + h) % S];
      default: return img[r][(c - h + S) % S];
    endcase
  endfunction

  // compare register `reg_i` of the compute region with fn(kind)
  task automatic check_region(input logic [3:0] reg_i, input int kind, input int dir, input int h);
    int bad = 0;
    rd_reg = reg_i;
    for (int br = 0; br < ARR / 4; br++)
      for (int bc = 0; bc < ARR / 4; bc++) begin
        rd_br = 3'(br); rd_bc = 3'(bc);
        #1;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            int r = HALO + br * 4 + i, c = HALO + bc * 4 + j;
            logic [15:0] e;
            case (kind)
              0: e = expect_nbr(r, c, dir, h);
              1: e = img[r][c] + bcast;
              default: e = 16'(c - HALO);
            endcase
            if (rd_data[i * 4 + j] !== e) bad++;
          end
      end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("kind %0d dir %0d hops %0d: %0d lanes wrong", kind, dir, h, bad);
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
    rst_n = 0; idle(); bcast = 0; ld_reg = 0; ld_br = 0; ld_bc = 0; ld_data = '0;
    rd_reg = 0; rd_br = 0; rd_bc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < S; r++) for (int c = 0; c < S; c++) img[r][c] = 16'($urandom);
    // one 4x4 block per cycle into register 0 of all lanes, halo included
    for (int br = 0; br < NB; br++)
      for (int bc = 0; bc < NB; bc++) begin
        ld_we = 1; ld_reg = 0; ld_br = 3'(br); ld_bc = 3'(bc);
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) ld_data[i * 4 + j] = img[br * 4 + i][bc * 4 + j];
        @(negedge clk);
      end
    idle();
    check_region(0, 0, 0, 0);
    for (int dir = 0; dir < 4; dir++)
      for (int h = 1; h <= 4; h++) begin
        issue = 1; vmem.op = VMEM_RDNXY; vmem.dst0 = 1; vmem.src0 = 0; mimm = 10'({h[2:0], dir[1:0]});
        @(negedge clk);
        idle();
        check_region(1, 0, dir, h);
      end
    // SIMD add with the broadcast value
    bcast = 16'($urandom);
    issue = 1; vm.mode = VM_INDEP; vm.op0 = OP_ADD; vm.src0 = 0; vm.src1 = SRC_BCAST; vm.dst0 = 2;
    @(negedge clk);
    idle();
    check_region(2, 1, 0, 0);
    // status read of the x coordinate
    issue = 1; vmem.op = VMEM_STAT; vmem.dst0 = 3; mimm = 10'd0;
    @(negedge clk);
    idle();
    check_region(3, 2, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
