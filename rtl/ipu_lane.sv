// ipu_lane: one lane of the Stencil Processor array.
//
// A compute lane (IS_HALO = 0) holds a 10-entry register file of 16-bit
// words, two ALUs, a multiply-add unit, an 8-cycle divider and a private
// slice of scratchpad memory.  A halo lane (IS_HALO = 1) holds only four
// registers and half the scratchpad; it executes vector-memory instructions
// and receives Sheet Generator data but does no arithmetic.
//
// Registers 0..3 are the shift-visible registers: they are exported on `sh`
// so that the array's shift network can hand any of them to a lane up to
// four hops away.  Everything is single-cycle: operands are read from the
// register file combinationally and results are written at the next clock
// edge, as in the published single-cycle lane pipeline.
//
// Vector math modes (vm.mode): independent (two 16-bit ops), chained (the
// second ALU takes the first ALU's result, the mux between the ALUs), paired
// (one 32-bit op: low half src0 op src1, high half src2 op
// src3 with the carry, result in dst1:dst0) and MAD (32-bit result in dst1:dst0,
// op0 = OP_SUB subtracts, op1[3:0] is the fractional shift).  An OP_DIV in
// op0 starts the divider; its quotient lands in dst0 eight cycles later.
// When several results target one register in the same cycle the Sheet
// Generator wins, then vector memory, then the divider, then vector math.
// Source code 15 selects the scalar lane's broadcast value.
module ipu_lane
  import ipu_pkg::*;
#(
  parameter bit IS_HALO    = 1'b0,
  parameter int NREG       = IS_HALO ? 4 : 10,
  parameter int SPAD_WORDS = IS_HALO ? 32 : 64,
  parameter int X          = 0,     // position in compute-array coordinates
  parameter int Y          = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               issue,
  input  vmath_instr_t       vm,
  input  vmem_instr_t        vmem,
  input  logic [9:0]         mimm,
  input  logic [W-1:0]       bcast,
  input  logic [W-1:0]       nbr,        // neighbour value from the shift network
  output logic [3:0][W-1:0]  sh,         // shift-visible registers 0..3
  input  logic               shg_we,
  input  logic [3:0]         shg_reg,
  input  logic [W-1:0]       shg_wdata,
  input  logic [3:0]         rd_reg,
  output logic [W-1:0]       rd_data
);
  localparam int AW = $clog2(SPAD_WORDS);

  logic [W-1:0] rf   [NREG];
  logic [W-1:0] spad [SPAD_WORDS];

  function automatic logic [W-1:0] rsrc(input logic [3:0] code);
    if (code == SRC_BCAST)         return bcast;
    else if (int'(code) < NREG)    return rf[code];
    else                           return '0;
  endfunction

  for (genvar i = 0; i < 4; i++) begin : g_sh
    assign sh[i] = (i < NREG) ? rf[i] : '0;
  end
  assign rd_data = rsrc(rd_reg);

  // ---------------- arithmetic (compute lanes only) -------------------------
  logic [W-1:0]   a0, b0, a1, b1, y0, y1;
  logic           c0, c1;
  logic [2*W-1:0] mad_y;
  logic           vm_we0, vm_we1;
  logic [W-1:0]   vm_wd0, vm_wd1;
  logic           div_start, div_busy, div_done;
  logic [W-1:0]   div_q;
  logic [3:0]     div_dst;

  if (IS_HALO) begin : g_halo
    assign vm_we0 = 1'b0; assign vm_we1 = 1'b0;
    assign vm_wd0 = '0;   assign vm_wd1 = '0;
    assign div_done = 1'b0; assign div_q = '0; assign div_busy = 1'b0;
    assign div_start = 1'b0;
    assign {a0, b0, a1, b1, y0, y1, c0, c1, mad_y} = '0;
  end else begin : g_compute
    assign a0 = rsrc(vm.src0);
    assign b0 = rsrc(vm.src1);
    assign a1 = (vm.mode == VM_CHAIN) ? y0 : rsrc(vm.src2);
    assign b1 = rsrc(vm.src3);

    ipu_alu u_alu0 (.op(vm.op0), .a(a0), .b(b0), .use_cin(1'b0), .cin(1'b0), .y(y0), .cout(c0));
    // paired mode: the second ALU is the high half of op0
    ipu_alu u_alu1 (.op(vm.mode == VM_PAIR ? vm.op0 : vm.op1),
                    .a(a1), .b(b1),
                    .use_cin(vm.mode == VM_PAIR), .cin(c0), .y(y1), .cout(c1));
    ipu_mad u_mad (.a(a0), .b(b0), .c({rsrc(vm.src3), rsrc(vm.src2)}),
                   .sub(vm.op0 == OP_SUB), .fshift(vm.op1[3:0]), .y(mad_y));

    assign div_start = issue && vm.mode == VM_INDEP && vm.op0 == OP_DIV;
    ipu_div u_div (.clk, .rst_n, .start(div_start), .a(a0), .b(b0),
                   .busy(div_busy), .done(div_done), .q(div_q));

    always_comb begin
      vm_we0 = 1'b0; vm_we1 = 1'b0; vm_wd0 = y0; vm_wd1 = y1;
      if (issue) begin
        unique case (vm.mode)
          VM_INDEP: begin
            vm_we0 = vm.op0 != OP_NOP && vm.op0 != OP_DIV;
            vm_we1 = vm.op1 != OP_NOP;
          end
          VM_CHAIN: begin vm_we0 = vm.op0 != OP_NOP; vm_we1 = vm.op1 != OP_NOP; end
          VM_PAIR:  begin vm_we0 = vm.op0 != OP_NOP; vm_we1 = vm.op0 != OP_NOP; end
          VM_MAD:   begin vm_we0 = 1'b1; vm_we1 = 1'b1;
                          vm_wd0 = mad_y[W-1:0]; vm_wd1 = mad_y[2*W-1:W]; end
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_dst <= '0;
    else if (div_start) div_dst <= vm.dst0;
  end

  // ---------------- register file writes ------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
    end else begin
      if (vm_we0 && int'(vm.dst0) < NREG) rf[vm.dst0] <= vm_wd0;
      if (vm_we1 && int'(vm.dst1) < NREG) rf[vm.dst1] <= vm_wd1;
      if (div_done && int'(div_dst) < NREG) rf[div_dst] <= div_q;
      if (issue && int'(vmem.dst0) < NREG) begin
        unique case (vmem.op)
          VMEM_RDNXY: rf[vmem.dst0] <= nbr;
          VMEM_LD:    rf[vmem.dst0] <= spad[mimm[AW-1:0]];
          VMEM_STAT:  rf[vmem.dst0] <= mimm[0] ? W'(Y) : W'(X);
          default: ;
        endcase
      end
      if (shg_we && int'(shg_reg) < NREG) rf[shg_reg] <= shg_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (issue && vmem.op == VMEM_ST) spad[mimm[AW-1:0]] <= rsrc(vmem.src0);
  end
endmodule
