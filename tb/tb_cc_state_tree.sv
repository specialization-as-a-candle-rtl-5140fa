// tb_cc_state_tree: self-checking test of the state tree.
//
// Four c-core leaves, each modelled as a register store indexed by the
// 26-bit (basic block, register) address.  Random writes and reads are
// sent back to back.  Checked: each write reaches exactly the addressed
// c-core, with its address and data, in the 3rd cycle counting the request
// cycle as the 1st; each read returns the leaf's value in the 6th cycle;
// requests can be issued every cycle (the tree is pipelined).
module tb_cc_state_tree;
  localparam int NCC = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, req_valid, req_we, resp_valid;
  logic [31:0] req_addr, req_wdata, resp_rdata, leaf_wdata;
  logic [NCC-1:0] leaf_we, leaf_re;
  logic [25:0] leaf_addr;
  logic [NCC-1:0][31:0] leaf_rdata;
  logic [31:0] store [NCC][int];

  cc_state_tree #(.NCC(NCC)) dut (.clk, .rst_n, .req_valid, .req_we, .req_addr, .req_wdata,
    .resp_valid, .resp_rdata, .leaf_we, .leaf_re, .leaf_addr, .leaf_wdata, .leaf_rdata);

  always_comb
    for (int i = 0; i < NCC; i++)
      leaf_rdata[i] = store[i].exists(int'(leaf_addr)) ? store[i][int'(leaf_addr)] : 32'h0;

  // expected events, indexed by the cycle in which they must happen
  typedef struct { bit we; int cc; int addr; logic [31:0] data; } ev_t;
  ev_t leaf_ev [int];
  ev_t resp_ev [int];
  int cyc;

  always @(posedge clk) if (rst_n) begin
    // leaf side
    if (leaf_ev.exists(cyc)) begin
      ev_t e;
      e = leaf_ev[cyc];
      checks++;
      if (e.we) begin
        if (leaf_we !== NCC'(1 << e.cc) || int'(leaf_addr) != e.addr || leaf_wdata !== e.data) begin
          failures++; $display("cycle %0d: write to c-core %0d not seen (we %b)", cyc, e.cc, leaf_we);
        end
      end else if (leaf_re !== NCC'(1 << e.cc) || int'(leaf_addr) != e.addr) begin
        failures++; $display("cycle %0d: read of c-core %0d not seen", cyc, e.cc);
      end
      leaf_ev.delete(cyc);
    end else if (leaf_we != 0 || leaf_re != 0) begin
      failures++; checks++; $display("cycle %0d: unexpected leaf access", cyc);
    end
    if (leaf_we != 0)
      for (int i = 0; i < NCC; i++) if (leaf_we[i]) store[i][int'(leaf_addr)] = leaf_wdata;
    // response side
    if (resp_ev.exists(cyc)) begin
      checks++;
      if (!resp_valid || resp_rdata !== resp_ev[cyc].data) begin
        failures++; $display("cycle %0d: read response %b %h, expected %h", cyc, resp_valid, resp_rdata, resp_ev[cyc].data);
      end
      resp_ev.delete(cyc);
    end else if (resp_valid) begin
      failures++; checks++; $display("cycle %0d: unexpected response", cyc);
    end
    cyc++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shadow copy to predict read data
  logic [31:0] shadow [NCC][int];
  initial begin
    rst_n = 0; req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int cc, a;
      ev_t e;
      // the request is presented in cycle `cyc` (counted as the 1st)
      req_valid = ($urandom_range(0, 4) != 0);
      cc = $urandom_range(0, NCC - 1);
      a = $urandom_range(0, 15) | ($urandom_range(0, 3) << 13);
      req_we = (n < 100) ? 1'b1 : 1'($urandom);
      req_addr = {6'(cc), 26'(a)};
      req_wdata = $urandom;
      if (req_valid) begin
        e.we = req_we; e.cc = cc; e.addr = a; e.data = req_wdata;
        leaf_ev[cyc + 2] = e;
        if (req_we) shadow[cc][a] = req_wdata;
        else begin
          e.data = shadow[cc].exists(a) ? shadow[cc][a] : 32'h0;
          resp_ev[cyc + 5] = e;
        end
      end
      @(negedge clk);
    end
    req_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (leaf_ev.size() != 0 || resp_ev.size() != 0) begin failures++; $display("events missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
