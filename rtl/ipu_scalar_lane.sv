// ipu_scalar_lane: the Scalar Lane, the control processor of a Stencil
// Processor.
//
// Each cycle it fetches one 119-bit VLIW from its instruction RAM (2048
// entries, 32 KB of 128-bit padded words), executes the scalar part and
// issues the vector-math and vector-memory parts to the lane array, together
// with the memory immediate and a 16-bit broadcast value (an immediate or a
// scalar register).  It has sixteen 16-bit scalar registers (the 4-bit
// register fields), an ALU identical to a lane ALU and its own 8-cycle
// divider.  Control operations (scalar op1): branch if non-zero, jump, halt
// (raises the done interrupt), sheet load, sheet store, read-pointer
// advance, wait for the Sheet Generator, and interrupt.
//
// Stalls: the lane holds its PC and issues nothing while a divide (scalar or
// vector) is in flight (the 7 cycles after it issues, so the next
// instruction issues 8 cycles after the divide and can use its result), while a
// sheet load/store finds the Sheet Generator busy, and while SC_WAIT finds it
// busy.  Sheet transfers otherwise overlap with computation.
//
// Interface: iram_* writes one instruction (used by the control CPU or DMA
// to program the STP); start begins execution at start_pc; running is high
// until a halt.  Register s0 is an ordinary register.  The VLIW layout
// follows the published pISA format; the opcode encoding, register count
// and the stall rules are this design's.
module ipu_scalar_lane
  import ipu_pkg::*;
#(
  parameter int IRAM_DEPTH = 2048
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    iram_we,
  input  logic [$clog2(IRAM_DEPTH)-1:0] iram_addr,
  input  logic [VLIW_W-1:0]       iram_wdata,
  input  logic                    start,
  input  logic [$clog2(IRAM_DEPTH)-1:0] start_pc,
  output logic                    running,
  output logic                    irq,
  // issue to the lane array
  output logic                    issue,
  output vmath_instr_t            vm,
  output vmem_instr_t             vmem,
  output logic [9:0]              mimm,
  output logic [W-1:0]            bcast,
  // Sheet Generator
  output logic                    shg_ld_req,
  output logic                    shg_st_req,
  output logic [COORD_W-1:0]      shg_x,
  output logic [COORD_W-1:0]      shg_y,
  output logic [3:0]              shg_vreg,
  output logic [2:0]              shg_lb,
  output logic [3:0]              shg_dest,
  input  logic                    shg_busy,
  // read-pointer advance to the local LBP
  output logic                    rel_valid,
  output logic [2:0]              rel_lb,
  output logic [2:0]              rel_id,
  output logic [COORD_W:0]        rel_row,
  output logic [31:0]             stall_cycles
);
  localparam int PW = $clog2(IRAM_DEPTH);

  logic [VLIW_W-1:0] iram [IRAM_DEPTH];
  logic [W-1:0]      s    [16];
  logic [PW-1:0]     pc;
  logic [3:0]        div_wait;
  logic [3:0]        div_dst;
  vliw_t             ins;
  logic              stall;

  always_ff @(posedge clk) begin
    if (iram_we) iram[iram_addr] <= iram_wdata;
  end
  assign ins = vliw_t'(iram[pc]);

  // ---------------- decode -----------------------------------------------------
  logic [W-1:0] sa, sb, salu_y;
  logic         salu_c;
  logic         is_sheet, sc_div, vec_div;
  assign sa = s[ins.sc.src0];
  assign sb = ins.sc.mode[1] ? ins.imm : s[ins.sc.src1];
  ipu_alu u_salu (.op(ins.sc.op0), .a(sa), .b(sb), .use_cin(1'b0), .cin(1'b0),
                  .y(salu_y), .cout(salu_c));

  assign is_sheet = (ins.sc.op1 == SC_SHLD) || (ins.sc.op1 == SC_SHST);
  assign sc_div   = (ins.sc.op0 == OP_DIV);
  assign vec_div  = (ins.vm.mode == VM_INDEP) && (ins.vm.op0 == OP_DIV);
  assign stall    = running && ((div_wait != 0) ||
                                ((is_sheet || ins.sc.op1 == SC_WAIT) && shg_busy));
  assign issue    = running && !stall;

  logic         div_done, div_busy;
  logic [W-1:0] div_q;
  ipu_div u_sdiv (.clk, .rst_n, .start(issue && sc_div), .a(sa), .b(sb),
                  .busy(div_busy), .done(div_done), .q(div_q));

  assign vm    = issue ? ins.vm   : '0;
  assign vmem  = issue ? ins.vmem : '0;
  assign mimm  = ins.mimm;
  assign bcast = ins.sc.mode[0] ? ins.imm : s[ins.sc.bcast0];

  assign shg_ld_req = issue && ins.sc.op1 == SC_SHLD;
  assign shg_st_req = issue && ins.sc.op1 == SC_SHST;
  assign shg_x      = s[ins.sc.src2][COORD_W-1:0];
  assign shg_y      = s[ins.sc.src3][COORD_W-1:0];
  assign shg_vreg   = ins.mimm[3:0];
  assign shg_lb     = ins.mimm[6:4];
  assign shg_dest   = s[ins.sc.dst1][3:0];
  assign rel_valid  = issue && ins.sc.op1 == SC_REL;
  assign rel_lb     = ins.mimm[6:4];
  assign rel_id     = ins.mimm[9:7];
  assign rel_row    = s[ins.sc.src2][COORD_W:0];

  // ---------------- execute ----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; running <= 1'b0; irq <= 1'b0; div_wait <= '0; div_dst <= '0;
      stall_cycles <= '0;
      for (int i = 0; i < 16; i++) s[i] <= '0;
    end else begin
      irq <= 1'b0;
      if (stall) stall_cycles <= stall_cycles + 1;
      if (div_wait != 0) div_wait <= div_wait - 1'b1;
      if (div_done) s[div_dst] <= div_q;
      if (start && !running) begin
        running <= 1'b1; pc <= start_pc;
      end else if (issue) begin
        pc <= pc + 1'b1;
        if (ins.sc.op0 != OP_NOP && !sc_div) s[ins.sc.dst0] <= salu_y;
        if (sc_div) div_dst <= ins.sc.dst0;
        if (sc_div || vec_div) div_wait <= 4'd7;
        unique case (ins.sc.op1)
          SC_BNZ:  if (s[ins.sc.src2] != '0) pc <= ins.imm[PW-1:0];
          SC_JMP:  pc <= ins.imm[PW-1:0];
          SC_HALT: begin running <= 1'b0; irq <= 1'b1; end
          SC_INT:  irq <= 1'b1;
          default: ;
        endcase
      end
    end
  end
endmodule
