// tb_ipu_lane: self-checking test of one compute lane and one halo lane.
//
// The testbench keeps its own copy of the compute lane's ten registers and
// scratchpad and predicts the effect of every instruction it issues:
// random independent ALU pairs, chained ALU operations, paired 32-bit adds,
// multiply-add with a fractional shift, scratchpad store and load, the
// neighbour read, the coordinate status read, broadcast operands and Sheet
// Generator writes.  A divide is issued and its quotient must land in its
// destination register exactly 8 cycles later, with other instructions
// issuing in between.  The halo lane must hold four registers and ignore
// arithmetic.
module tb_ipu_lane;
  import ipu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, issue, shg_we;
  vmath_instr_t vm;
  vmem_instr_t vmem;
  logic [9:0] mimm;
  logic [15:0] bcast, nbr, shg_wdata, rd_data, hrd_data;
  logic [3:0] shg_reg, rd_reg, hrd_reg;
  logic [3:0][15:0] sh, hsh;
  logic [15:0] m [10];
  logic [15:0] sp [64];

  ipu_lane #(.X(5), .Y(9)) dut (.clk, .rst_n, .issue, .vm, .vmem, .mimm, .bcast, .nbr, .sh,
    .shg_we, .shg_reg, .shg_wdata, .rd_reg, .rd_data);
  ipu_lane #(.IS_HALO(1'b1)) halo (.clk, .rst_n, .issue, .vm, .vmem, .mimm, .bcast, .nbr, .sh(hsh),
    .shg_we, .shg_reg, .shg_wdata, .rd_reg(hrd_reg), .rd_data(hrd_data));

  function automatic logic [15:0] src(input logic [3:0] c);
    return (c == SRC_BCAST) ? bcast : m[c];
  endfunction

  function automatic logic [15:0] aluref(input logic [5:0] o, input logic [15:0] x, input logic [15:0] z);
    case (o)
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_XOR: return x ^ z;
      OP_SHL: return x << z[3:0];
      OP_MAX: return ($signed(x) > $signed(z)) ? x : z;
      default: return x;  // OP_MOV
    endcase
  endfunction

  task automatic idle();
    vm = '0; vmem = '0; mimm = '0; issue = 0; shg_we = 0;
  endtask

  task automatic step();
    @(negedge clk);
    idle();
  endtask

  task automatic check_all(input string what);
    for (int r = 0; r < 10; r++) begin
      rd_reg = 4'(r);
      #1;
      checks++;
      if (rd_data !== m[r]) begin
        failures++;
        if (failures < 10) $display("%s: r%0d = %h, expected %h", what, r, rd_data, m[r]);
      end
    end
  endtask

  logic [5:0] ops [6] = '{OP_ADD, OP_SUB, OP_XOR, OP_SHL, OP_MAX, OP_MOV};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; idle(); bcast = 0; nbr = 0; shg_reg = 0; shg_wdata = 0; rd_reg = 0; hrd_reg = 0;
    foreach (m[i]) m[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load the registers through the Sheet Generator port
    for (int r = 0; r < 10; r++) begin
      shg_we = 1; shg_reg = 4'(r); shg_wdata = 16'($urandom); m[r] = shg_wdata;
      step();
    end
    check_all("sheet generator writes");
    // independent ALU pairs
    for (int n = 0; n < 300; n++) begin
      logic [15:0] r0, r1;
      vm.mode = VM_INDEP;
      vm.op0 = ops[$urandom_range(0, 5)]; vm.op1 = ops[$urandom_range(0, 5)];
      vm.src0 = 4'($urandom_range(0, 9)); vm.src1 = (n % 5 == 0) ? SRC_BCAST : 4'($urandom_range(0, 9));
      vm.src2 = 4'($urandom_range(0, 9)); vm.src3 = 4'($urandom_range(0, 9));
      vm.dst0 = 4'($urandom_range(0, 4)); vm.dst1 = 4'($urandom_range(5, 9));
      bcast = 16'($urandom); issue = 1;
      r0 = aluref(vm.op0, src(vm.src0), src(vm.src1));
      r1 = aluref(vm.op1, src(vm.src2), src(vm.src3));
      m[vm.dst0] = r0; m[vm.dst1] = r1;
      step();
      check_all("independent");
    end
    // chained: dst0 = a op0 b; dst1 = (a op0 b) op1 d
    for (int n = 0; n < 100; n++) begin
      logic [15:0] t;
      vm.mode = VM_CHAIN; vm.op0 = ops[$urandom_range(0, 4)]; vm.op1 = ops[$urandom_range(0, 4)];
      vm.src0 = 4'($urandom_range(0, 9)); vm.src1 = 4'($urandom_range(0, 9));
      vm.src3 = 4'($urandom_range(0, 9)); vm.dst0 = 4'($urandom_range(0, 4)); vm.dst1 = 4'($urandom_range(5, 9));
      issue = 1;
      t = aluref(vm.op0, src(vm.src0), src(vm.src1));
      m[vm.dst1] = aluref(vm.op1, t, src(vm.src3));
      m[vm.dst0] = t;
      step();
      check_all("chained");
    end
    // paired 32-bit add/sub
    for (int n = 0; n < 100; n++) begin
      logic [31:0] x, z, r;
      vm.mode = VM_PAIR; vm.op0 = (n % 2) ? 6'(OP_SUB) : 6'(OP_ADD);
      vm.src0 = 0; vm.src2 = 1; vm.src1 = 2; vm.src3 = 3; vm.dst0 = 4; vm.dst1 = 5;
      x = {m[1], m[0]}; z = {m[3], m[2]};
      r = (n % 2) ? x - z : x + z;
      issue = 1;
      {m[5], m[4]} = r;
      step();
      check_all("paired");
      for (int k = 0; k < 4; k++) begin
        shg_we = 1; shg_reg = 4'(k); shg_wdata = 16'($urandom); m[k] = shg_wdata; step();
      end
    end
    // multiply-add with fractional shift
    for (int n = 0; n < 100; n++) begin
      longint p;
      vm.mode = VM_MAD; vm.op0 = (n % 3 == 0) ? 6'(OP_SUB) : 6'(OP_ADD); vm.op1 = 6'($urandom_range(0, 15));
      vm.src0 = 4'($urandom_range(0, 9)); vm.src1 = 4'($urandom_range(0, 9));
      vm.src2 = 6; vm.src3 = 7; vm.dst0 = 8; vm.dst1 = 9;
      issue = 1;
      p = longint'($signed(src(vm.src0))) * longint'($signed(src(vm.src1)));
      p = (vm.op0 == OP_SUB) ? p - longint'($signed({m[7], m[6]})) : p + longint'($signed({m[7], m[6]}));
      p = longint'($signed(32'(p))) >>> vm.op1[3:0];
      {m[9], m[8]} = 32'(p);
      step();
      check_all("mad");
    end
    // scratchpad store then load
    for (int n = 0; n < 64; n++) begin
      vmem.op = VMEM_ST; vmem.src0 = 4'($urandom_range(0, 9)); mimm = 10'(n); issue = 1;
      sp[n] = m[vmem.src0];
      step();
      shg_we = 1; shg_reg = 4'(n % 10); shg_wdata = 16'($urandom); m[n % 10] = shg_wdata; step();
    end
    for (int n = 0; n < 64; n++) begin
      vmem.op = VMEM_LD; vmem.dst0 = 4'($urandom_range(0, 9)); mimm = 10'(n); issue = 1;
      m[vmem.dst0] = sp[n];
      step();
      check_all("scratchpad load");
    end
    // neighbour read and status read
    for (int n = 0; n < 20; n++) begin
      vmem.op = VMEM_RDNXY; vmem.dst0 = 4'($urandom_range(0, 9)); nbr = 16'($urandom); issue = 1;
      m[vmem.dst0] = nbr;
      step();
      vmem.op = VMEM_STAT; vmem.dst0 = 4'($urandom_range(0, 9)); mimm = 10'(n % 2); issue = 1;
      m[vmem.dst0] = (n % 2) ? 16'd9 : 16'd5;
      step();
      check_all("rdnxy/stat");
    end
    // shift-visible registers
    checks++;
    if (sh !== {m[3], m[2], m[1], m[0]}) begin failures++; $display("sh mismatch"); end
    // divide: quotient lands 8 cycles after issue, other work meanwhile
    for (int n = 0; n < 20; n++) begin
      int lat;
      logic [15:0] q;
      shg_we = 1; shg_reg = 0; shg_wdata = 16'($urandom); m[0] = shg_wdata; step();
      shg_we = 1; shg_reg = 1; shg_wdata = 16'($urandom_range(1, 300)); m[1] = shg_wdata; step();
      vm.mode = VM_INDEP; vm.op0 = OP_DIV; vm.src0 = 0; vm.src1 = 1; vm.dst0 = 7; issue = 1;
      q = m[0] / m[1];
      step();
      lat = 1;
      rd_reg = 7;
      // an unrelated add while the divider runs
      vm.mode = VM_INDEP; vm.op0 = OP_ADD; vm.src0 = 2; vm.src1 = 3; vm.dst0 = 4; issue = 1;
      m[4] = m[2] + m[3];
      step();
      lat++;
      rd_reg = 7; #1;
      while (rd_data !== q && lat < 20) begin step(); lat++; rd_reg = 7; #1; end
      m[7] = q;
      checks++;
      if (lat != 8) begin failures++; $display("divide result after %0d cycles, expected 8", lat); end
      check_all("divide");
    end
    // halo lane: four registers, arithmetic ignored
    shg_we = 1; shg_reg = 2; shg_wdata = 16'h5a5a; step();
    vm.mode = VM_INDEP; vm.op0 = OP_ADD; vm.src0 = 2; vm.src1 = 2; vm.dst0 = 2; issue = 1; step();
    hrd_reg = 2; #1;
    checks++;
    if (hrd_data !== 16'h5a5a || hsh[2] !== 16'h5a5a) begin failures++; $display("halo lane r2 %h", hrd_data); end
    hrd_reg = 6; #1;
    checks++;
    if (hrd_data !== 16'h0) begin failures++; $display("halo lane has register 6"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
