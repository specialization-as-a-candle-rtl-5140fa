// tb_ipu_scalar_lane: self-checking test of the Stencil Processor's scalar
// lane.
//
// A 14-instruction program is written through the instruction RAM port and
// started.  It sums 5+4+3+2+1 in a counted loop (ALU with immediates,
// branch-if-non-zero), divides the sum by 4, requests a sheet load and a
// sheet store, waits for the Sheet Generator, raises an interrupt and
// halts.  Register values are made visible through read-pointer advance
// instructions, whose row operand is a scalar register.  The testbench
// models a Sheet Generator that stays busy for 10 cycles per request and
// checks: the values, the number of issued instructions, the 8-cycle gap
// after a divide, stalls while the Sheet Generator is busy, the sheet
// request fields, the interrupts and the halt.
module tb_ipu_scalar_lane;
  import ipu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, iram_we, start, running, irq, issue, shg_ld_req, shg_st_req, shg_busy, rel_valid;
  logic [6:0] iram_addr, start_pc;
  logic [118:0] iram_wdata;
  vmath_instr_t vm;
  vmem_instr_t vmem;
  logic [9:0] mimm;
  logic [15:0] bcast;
  logic [11:0] shg_x, shg_y;
  logic [3:0] shg_vreg, shg_dest;
  logic [2:0] shg_lb, rel_lb, rel_id;
  logic [12:0] rel_row;
  logic [31:0] stall_cycles;

  ipu_scalar_lane #(.IRAM_DEPTH(128)) dut (.clk, .rst_n, .iram_we, .iram_addr, .iram_wdata,
    .start, .start_pc, .running, .irq, .issue, .vm, .vmem, .mimm, .bcast,
    .shg_ld_req, .shg_st_req, .shg_x, .shg_y, .shg_vreg, .shg_lb, .shg_dest, .shg_busy,
    .rel_valid, .rel_lb, .rel_id, .rel_row, .stall_cycles);

  vliw_t prog [14];

  function automatic vliw_t alu(input logic [5:0] op, input int d, input int a, input int b, input int imm, input bit use_imm);
    vliw_t v = '0;
    v.sc.op0 = op; v.sc.dst0 = 4'(d); v.sc.src0 = 4'(a); v.sc.src1 = 4'(b);
    v.sc.mode = {1'b0, use_imm, 1'b0}; v.imm = 16'(imm);
    return v;
  endfunction

  function automatic vliw_t ctl(input logic [5:0] op, input int s2, input int s3, input int d1, input int imm, input int mi);
    vliw_t v = '0;
    v.sc.op1 = op; v.sc.src2 = 4'(s2); v.sc.src3 = 4'(s3); v.sc.dst1 = 4'(d1);
    v.imm = 16'(imm); v.mimm = 10'(mi);
    return v;
  endfunction

  // Sheet Generator model: busy for 10 cycles after each request
  int shg_left;
  assign shg_busy = shg_left != 0;
  int n_ld, n_st, n_irq, n_issue, div_issue, rel_cnt, ld_seen_busy_gap;
  logic [15:0] rels [3];
  int cyc, div_at, after_div;
  always @(posedge clk) begin
    cyc++;
    if (shg_left != 0) shg_left--;
    if (shg_ld_req || shg_st_req) begin
      checks++;
      if (shg_busy) begin failures++; $display("sheet request while busy"); end
      shg_left = 10;
    end
    if (shg_ld_req) begin
      n_ld++;
      checks++;
      if (shg_x !== 12'd15 || shg_y !== 12'd3 || shg_vreg !== 4'd2 || shg_lb !== 3'd1) begin
        failures++; $display("sheet load fields %0d %0d %0d %0d", shg_x, shg_y, shg_vreg, shg_lb);
      end
    end
    if (shg_st_req) begin
      n_st++;
      checks++;
      if (shg_dest !== 4'd3 || shg_vreg !== 4'd5) begin failures++; $display("sheet store fields"); end
    end
    if (irq) n_irq++;
    if (issue) n_issue++;
    if (issue && vm.op0 == OP_DIV) div_at = cyc;
    if (rel_valid) begin
      if (rel_cnt < 3) rels[rel_cnt] = 16'(rel_row);
      if (rel_cnt == 1) after_div = cyc - div_at;
      rel_cnt++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shg_left = 0; cyc = 0; n_ld = 0; n_st = 0; n_irq = 0; n_issue = 0; rel_cnt = 0; div_at = 0; after_div = 0;
    prog[0]  = alu(OP_ADD, 1, 0, 0, 5, 1);           // s1 = 5
    prog[1]  = alu(OP_ADD, 2, 2, 1, 0, 0);           // s2 += s1
    prog[2]  = alu(OP_SUB, 1, 1, 0, 1, 1);           // s1 -= 1
    prog[3]  = ctl(SC_BNZ, 1, 0, 0, 1, 0);           // if s1 goto 1
    prog[4]  = ctl(SC_REL, 2, 0, 0, 0, 0);           // show s2
    prog[5]  = alu(OP_DIV, 3, 2, 0, 4, 1);           // s3 = s2 / 4
    prog[5].vm.op0 = OP_DIV;                         // a vector divide too
    prog[6]  = ctl(SC_REL, 3, 0, 0, 0, 0);           // show s3
    prog[7]  = ctl(SC_SHLD, 2, 3, 0, 0, (1 << 4) | 2);
    prog[8]  = ctl(SC_SHST, 2, 3, 3, 0, (1 << 4) | 5);
    prog[9]  = ctl(SC_WAIT, 0, 0, 0, 0, 0);
    prog[10] = alu(OP_ADD, 4, 0, 0, 16'h1234, 1);    // s4 = 0x1234
    prog[11] = ctl(SC_REL, 4, 0, 0, 0, 0);           // show s4
    prog[12] = ctl(SC_INT, 0, 0, 0, 0, 0);
    prog[13] = ctl(SC_HALT, 0, 0, 0, 0, 0);
    rst_n = 0; iram_we = 0; iram_addr = 0; iram_wdata = 0; start = 0; start_pc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 14; i++) begin
      iram_we = 1; iram_addr = 7'(i); iram_wdata = prog[i];
      @(negedge clk);
    end
    iram_we = 0;
    start = 1; @(negedge clk); start = 0;
    while (running) @(negedge clk);
    @(negedge clk);
    checks++;
    if (rel_cnt != 3 || rels[0] !== 16'd15 || rels[1] !== 16'd3 || rels[2] !== 16'h1234) begin
      failures++; $display("values %0d %0d %h (%0d shown)", rels[0], rels[1], rels[2], rel_cnt);
    end
    checks++;
    if (n_issue != 1 + 5 * 3 + 10) begin failures++; $display("%0d instructions issued", n_issue); end
    checks++;
    if (after_div != 8) begin failures++; $display("next instruction %0d cycles after divide, expected 8", after_div); end
    checks++;
    if (n_ld != 1 || n_st != 1) begin failures++; $display("sheet requests %0d %0d", n_ld, n_st); end
    checks++;
    if (n_irq != 2) begin failures++; $display("%0d interrupts, expected 2", n_irq); end
    // stalls: 7 for the divide, 10 for the store, up to 10 for the wait
    checks++;
    if (stall_cycles < 17) begin failures++; $display("only %0d stall cycles", stall_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
