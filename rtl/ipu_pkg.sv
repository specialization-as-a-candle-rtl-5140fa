// ipu_pkg: types and constants shared by the Image Processing Unit (IPU).
//
// The 119-bit VLIW instruction word is split exactly as the physical ISA
// lays it out: a 43-bit scalar-lane instruction in bits 118:76, a 38-bit
// vector-math instruction in 75:38, a 12-bit vector-memory instruction in
// 37:26, a 16-bit general immediate in 25:10 and a 10-bit memory immediate in
// 9:0.  Field widths and positions follow the published pISA format; the
// opcode numbers below are this design's own encoding, since no encoding was
// published.
//
// The package also defines the NoC flit, which carries one 4x4 block of
// 16-bit pixels (32 bytes) to a line buffer of any Line Buffer Pool.
package ipu_pkg;

  localparam int W        = 16;   // native lane word
  localparam int VLIW_W   = 119;
  localparam int PIX_BLK  = 16;   // pixels in a 4x4 block
  localparam int COORD_W  = 12;   // image coordinate width (images up to 4095)

  // ---------------- ALU opcodes (6 bits, lanes and scalar lane) -------------
  typedef enum logic [5:0] {
    OP_NOP = 6'd0,  OP_ADD = 6'd1,  OP_SUB = 6'd2,  OP_AND = 6'd3,
    OP_OR  = 6'd4,  OP_XOR = 6'd5,  OP_NOT = 6'd6,  OP_SHL = 6'd7,
    OP_SHR = 6'd8,  OP_SRA = 6'd9,  OP_SEQ = 6'd10, OP_SLT = 6'd11,
    OP_MAX = 6'd12, OP_MIN = 6'd13, OP_ABS = 6'd14, OP_CLZ = 6'd15,
    OP_MOV = 6'd16, OP_DIV = 6'd17
  } alu_op_e;

  // ---------------- vector math modes (2 bits) ------------------------------
  typedef enum logic [1:0] {
    VM_INDEP = 2'd0,   // dst0 = op0(src0,src1); dst1 = op1(src2,src3)
    VM_CHAIN = 2'd1,   // t = op0(src0,src1); dst0 = t; dst1 = op1(t,src3)
    VM_PAIR  = 2'd2,   // {dst1,dst0} = op0({src2,src0},{src3,src1}) 32-bit
    VM_MAD   = 2'd3    // {dst1,dst0} = src0*src1 +/- {src3,src2} >>> op1[3:0]
  } vm_mode_e;

  // Lane source code 15 selects the broadcast value instead of a register.
  localparam logic [3:0] SRC_BCAST = 4'd15;

  // ---------------- vector memory opcodes (4 bits) --------------------------
  typedef enum logic [3:0] {
    VMEM_NOP   = 4'd0,
    VMEM_RDNXY = 4'd1,  // dst0 = shift reg src0[1:0] of lane mimm[4:2] hops toward mimm[1:0]
    VMEM_LD    = 4'd2,  // dst0 = scratchpad[mimm]
    VMEM_ST    = 4'd3,  // scratchpad[mimm] = src0
    VMEM_STAT  = 4'd4   // dst0 = mimm[0] ? lane y : lane x (compute-array coordinates)
  } vmem_op_e;

  // Shift-network directions in mimm[1:0]
  localparam logic [1:0] DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3;

  // ---------------- scalar control operations (scalar op1) ------------------
  typedef enum logic [5:0] {
    SC_NONE  = 6'd0,
    SC_BNZ   = 6'd1,  // if s[src2] != 0 : pc = imm
    SC_JMP   = 6'd2,  // pc = imm
    SC_HALT  = 6'd3,  // stop and raise the done interrupt
    SC_SHLD  = 6'd4,  // sheet load : origin (s[src2], s[src3]) from local lb mimm[6:4] into vreg mimm[3:0]
    SC_SHST  = 6'd5,  // sheet store: vreg mimm[3:0] to core s[dst1], lb mimm[6:4], origin (s[src2], s[src3])
    SC_REL   = 6'd6,  // advance read pointer mimm[9:7] of local lb mimm[6:4] to row s[src2]
    SC_WAIT  = 6'd7,  // stall until the Sheet Generator is idle
    SC_INT   = 6'd8   // raise a one-cycle interrupt, keep running
  } sc_op_e;

  typedef struct packed {
    logic [2:0] mode;     // [0] bcast from imm, [1] ALU src1 from imm
    logic [5:0] op0;      // scalar ALU operation
    logic [5:0] op1;      // scalar control operation
    logic [3:0] dst0, dst1, src0, src1, src2, src3, bcast0;
  } scalar_instr_t;       // 43 bits

  typedef struct packed {
    logic [1:0] mode;
    logic [5:0] op0, op1;
    logic [3:0] dst0, dst1, src0, src1, src2, src3;
  } vmath_instr_t;        // 38 bits

  typedef struct packed {
    logic [3:0] op;
    logic [3:0] dst0, src0;
  } vmem_instr_t;         // 12 bits

  typedef struct packed {
    scalar_instr_t sc;    // 118:76
    vmath_instr_t  vm;    // 75:38
    vmem_instr_t   vmem;  // 37:26
    logic [15:0]   imm;   // 25:10
    logic [9:0]    mimm;  // 9:0
  } vliw_t;

  // ---------------- NoC flit: one 4x4 block written to a line buffer --------
  typedef struct packed {
    logic [3:0]               dest;   // core id, 0 = I/O block
    logic [2:0]               lb;     // line buffer within the LBP
    logic [COORD_W-1:0]       x, y;   // block origin, multiples of 4
    logic [PIX_BLK-1:0][W-1:0] data;  // row-major, data[r*4+c]
  } flit_t;

  // Ring position of a core id: clockwise the ids run 0, 1, 3, 5, .., then
  // the even ids downward, so that powering off the highest pairs leaves a
  // contiguous numbering.
  function automatic int ring_pos(input int id, input int ncores);
    if (id == 0)          return 0;
    else if (id % 2 == 1) return (id + 1) / 2;
    else                  return ncores + 1 - id / 2;
  endfunction

endpackage
