// cc_array_sum: a conservation core (c-core) for the leaf function
//   int computeArraySum(int *a, int n) { sum = 0; for (i = 0; i < n; i++) sum += a[i]; return sum; }
//
// The datapath mirrors the function's data-flow graph: registers only for
// the values live across basic blocks (sum, a, i, n), an adder per addition,
// a comparator for i < n, and a load unit on the cache interface.  The
// control unit is a state machine copied from the control-flow graph:
// sInit (i = 0, sum = 0) -> s1 (test i < n) -> s2 (issue the load of a[i])
// -> s3 (wait for the load's valid, then sum += a[i], i++) -> s1, and
// s1 -> sRet when the test fails.
//
// Patching support, so the core still runs newer versions of the code:
//   * the constants (initial i, initial sum, loop step) are configurable
//     constants with their low 8 bits programmable;
//   * the sum and induction adders are add/subtract units and the loop test
//     is a generalized comparator (any of the six relations);
//   * each of the five control transitions has an exception bit; taking a
//     marked transition stops the core in sExc and raises exc so the CPU can
//     run the changed code, rewrite registers, and resume at any state.
//
// State-tree leaf map (basic-block id, register id): (0,0..3) sum, a, i, n;
// (1,0) comparator relation, (1,1) sum subtract bit, (1,2) step subtract
// bit, (1,3) initial-i low byte, (1,4) step low byte, (1,5) exception mask
// [4:0] for transitions init->s1, s1->ret, s1->s2, s2->s3, s3->s1,
// (1,6) initial-sum low byte; (2,0) write = start, read = status
// {exc_edge[10:8], done[5], exc[4], state[3:0]}; (2,1) write = resume at
// state wdata[3:0].  Reads are combinational, writes take effect at the
// clock edge.  The datapath, the FSM with its load-wait self-loop and the
// patching mechanisms follow the published example; the register map,
// the word scaling of the address (a + 4*i) and the exception handshake
// are this design's choices.
module cc_array_sum (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        leaf_we,
  input  logic        leaf_re,
  input  logic [25:0] leaf_addr,
  input  logic [31:0] leaf_wdata,
  output logic [31:0] leaf_rdata,
  output logic        ld_en,
  output logic [31:0] ld_addr,
  input  logic        ld_valid,
  input  logic [31:0] ld_value,
  output logic        active,
  output logic        done,
  output logic        exc
);
  typedef enum logic [3:0] {S_IDLE = 4'd0, S_INIT = 4'd1, S_1 = 4'd2, S_2 = 4'd3,
                            S_3 = 4'd4, S_RET = 4'd5, S_EXC = 4'd6} state_e;
  state_e      state;
  logic [31:0] sum, a, i, n;
  logic [2:0]  cfg_rel;
  logic        cfg_sum_sub, cfg_i_sub;
  logic [4:0]  exc_mask;
  logic [2:0]  exc_edge;

  logic [12:0] bb, rg;
  assign bb = leaf_addr[25:13];
  assign rg = leaf_addr[12:0];
  function automatic logic wr(input int b, input int r);
    return leaf_we && int'(bb) == b && int'(rg) == r;
  endfunction

  // ---------------- patchable operators --------------------------------------
  logic [31:0] c_i0, c_step, c_sum0, sum_next, i_next, elem_addr;
  logic        cond;
  cc_cfg_const #(.ORIG(32'd0)) u_i0   (.clk, .rst_n, .we(wr(1, 3)), .wdata(leaf_wdata[7:0]), .value(c_i0));
  cc_cfg_const #(.ORIG(32'd1)) u_step (.clk, .rst_n, .we(wr(1, 4)), .wdata(leaf_wdata[7:0]), .value(c_step));
  cc_cfg_const #(.ORIG(32'd0)) u_sum0 (.clk, .rst_n, .we(wr(1, 6)), .wdata(leaf_wdata[7:0]), .value(c_sum0));
  cc_addsub  u_sum_add (.cfg_sub(cfg_sum_sub), .a(sum), .b(ld_value), .y(sum_next));
  cc_addsub  u_i_add   (.cfg_sub(cfg_i_sub),   .a(i),   .b(c_step),   .y(i_next));
  cc_addsub  u_addr    (.cfg_sub(1'b0),        .a(a),   .b({i[29:0], 2'b00}), .y(elem_addr));
  cc_gen_cmp u_cmp     (.cfg_rel, .a(i), .b(n), .y(cond));

  assign ld_en   = (state == S_2);
  assign ld_addr = elem_addr;
  assign active  = (state != S_IDLE) && (state != S_RET) && (state != S_EXC);
  assign done    = (state == S_RET);
  assign exc     = (state == S_EXC);

  // next state of the CFG, and which transition (edge) it is
  state_e     nxt;
  logic       take;
  logic [2:0] edge_id;
  always_comb begin
    nxt = state; take = 1'b0; edge_id = '0;
    unique case (state)
      S_INIT: begin nxt = S_1; take = 1'b1; edge_id = 3'd0; end
      S_1:    begin take = 1'b1; nxt = cond ? S_2 : S_RET; edge_id = cond ? 3'd2 : 3'd1; end
      S_2:    begin nxt = S_3; take = 1'b1; edge_id = 3'd3; end
      S_3:    if (ld_valid) begin nxt = S_1; take = 1'b1; edge_id = 3'd4; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; sum <= '0; a <= '0; i <= '0; n <= '0;
      cfg_rel <= 3'd0; cfg_sum_sub <= 1'b0; cfg_i_sub <= 1'b0; exc_mask <= '0; exc_edge <= '0;
    end else begin
      // datapath work of the current basic block
      if (state == S_INIT) begin sum <= c_sum0; i <= c_i0; end
      if (state == S_3 && ld_valid) begin sum <= sum_next; i <= i_next; end
      // control: a marked transition becomes an exception
      if (take) begin
        if (exc_mask[edge_id]) begin state <= S_EXC; exc_edge <= edge_id; end
        else state <= nxt;
      end
      // state-tree writes (the CPU has priority)
      if (wr(0, 0)) sum <= leaf_wdata;
      if (wr(0, 1)) a   <= leaf_wdata;
      if (wr(0, 2)) i   <= leaf_wdata;
      if (wr(0, 3)) n   <= leaf_wdata;
      if (wr(1, 0)) cfg_rel     <= leaf_wdata[2:0];
      if (wr(1, 1)) cfg_sum_sub <= leaf_wdata[0];
      if (wr(1, 2)) cfg_i_sub   <= leaf_wdata[0];
      if (wr(1, 5)) exc_mask    <= leaf_wdata[4:0];
      if (wr(2, 0)) state <= S_INIT;
      if (wr(2, 1)) state <= state_e'(leaf_wdata[3:0]);
    end
  end

  always_comb begin
    leaf_rdata = '0;
    if (leaf_re) begin
      unique case ({bb[1:0], rg[2:0]})
        {2'd0, 3'd0}: leaf_rdata = sum;
        {2'd0, 3'd1}: leaf_rdata = a;
        {2'd0, 3'd2}: leaf_rdata = i;
        {2'd0, 3'd3}: leaf_rdata = n;
        {2'd1, 3'd0}: leaf_rdata = 32'(cfg_rel);
        {2'd1, 3'd5}: leaf_rdata = 32'(exc_mask);
        {2'd2, 3'd0}: leaf_rdata = {21'd0, exc_edge, 2'b00, done, exc, state};
        default: ;
      endcase
    end
  end
endmodule
