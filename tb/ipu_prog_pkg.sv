// ipu_prog_pkg: instruction builders and a 3-tap blur program for the
// Stencil Processor testbenches.
//
// The builders assemble 119-bit VLIW words field by field (scalar ALU op
// with register or immediate operand, scalar control op, vector math op,
// vector memory op).  blur3() returns the program one STP runs for a
// separable 3x3 box blur stage: for each of `nsheets` sheets stacked
// vertically it loads the sheet from its input line buffer (halo included),
// reads the two neighbours one hop away in the given axis through the
// shift network, adds the three values in the lanes, stores the result
// sheet to a line buffer of another core, releases the input rows it no
// longer needs and moves down one sheet height.
package ipu_prog_pkg;
  import ipu_pkg::*;

  function automatic vliw_t sc_alu(input vliw_t v, input logic [5:0] op, input int d, input int a,
                                   input int b, input int imm, input bit use_imm);
    v.sc.op0 = op; v.sc.dst0 = 4'(d); v.sc.src0 = 4'(a); v.sc.src1 = 4'(b);
    v.sc.mode[1] = use_imm; v.imm = 16'(imm);
    return v;
  endfunction

  function automatic vliw_t sc_ctl(input vliw_t v, input logic [5:0] op, input int s2, input int s3,
                                   input int d1, input int imm, input int mi);
    v.sc.op1 = op; v.sc.src2 = 4'(s2); v.sc.src3 = 4'(s3); v.sc.dst1 = 4'(d1);
    if (op == SC_BNZ || op == SC_JMP) v.imm = 16'(imm);
    v.mimm = 10'(mi);
    return v;
  endfunction

  function automatic vliw_t v_alu(input vliw_t v, input logic [5:0] op, input int d, input int a, input int b);
    v.vm.mode = VM_INDEP; v.vm.op0 = op; v.vm.dst0 = 4'(d); v.vm.src0 = 4'(a); v.vm.src1 = 4'(b);
    return v;
  endfunction

  function automatic vliw_t v_nbr(input vliw_t v, input int d, input int s, input logic [1:0] dir, input int hops);
    v.vmem.op = VMEM_RDNXY; v.vmem.dst0 = 4'(d); v.vmem.src0 = 4'(s);
    v.mimm = 10'({3'(hops), dir});
    return v;
  endfunction

  // scalar registers: s1 y origin, s2 x origin (0), s3 sheets left,
  // s4 destination core, s5 input row to release
  function automatic void blur3(output vliw_t p [16], input int arr, input int halo, input int nsheets,
                                input bit vertical, input int lb_in, input int dest, input int lb_out);
    vliw_t z = '0;
    logic [1:0] d0 = vertical ? DIR_N : DIR_W;
    logic [1:0] d1 = vertical ? DIR_S : DIR_E;
    p[0]  = sc_alu(z, OP_ADD, 1, 0, 0, 0, 1);
    p[1]  = sc_alu(z, OP_ADD, 2, 0, 0, 0, 1);
    p[2]  = sc_alu(z, OP_ADD, 3, 0, 0, nsheets, 1);
    p[3]  = sc_alu(z, OP_ADD, 4, 0, 0, dest, 1);
    p[4]  = sc_ctl(z, SC_SHLD, 2, 1, 0, 0, (lb_in << 4) | 0);            // v0 <- sheet
    p[5]  = sc_ctl(z, SC_WAIT, 0, 0, 0, 0, 0);
    p[6]  = sc_alu(v_nbr(z, 1, 0, d0, 1), OP_ADD, 5, 1, 0, arr - halo, 1);
    p[7]  = v_nbr(z, 2, 0, d1, 1);
    p[8]  = v_alu(z, OP_ADD, 3, 0, 1);
    p[9]  = v_alu(z, OP_ADD, 3, 3, 2);
    p[10] = sc_ctl(z, SC_SHST, 2, 1, 4, 0, (lb_out << 4) | 3);           // v3 -> core s4
    p[11] = sc_alu(sc_ctl(z, SC_REL, 5, 0, 0, 0, (0 << 7) | (lb_in << 4)), OP_SUB, 3, 3, 0, 1, 1);
    p[12] = sc_alu(z, OP_ADD, 1, 1, 0, arr, 1);
    p[13] = sc_ctl(z, SC_BNZ, 3, 0, 0, 4, 0);
    p[14] = sc_ctl(z, SC_WAIT, 0, 0, 0, 0, 0);
    p[15] = sc_ctl(z, SC_HALT, 0, 0, 0, 0, 0);
  endfunction
endpackage
