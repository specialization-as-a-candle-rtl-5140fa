// tb_greendroid_tile: self-checking test of the c-core tile.
//
// The testbench plays the tile's CPU (state-tree instructions and data
// accesses) and its L1 data cache (a memory answering each held request
// after a random delay).  The CPU writes an array through the L1 port,
// passes arguments to c-core 1 over the state tree, starts it, and polls
// its status until it returns; the sum read back over the state tree must
// equal the sum computed in the testbench.  Checked as well: a state-tree
// read answers in its 6th cycle; CPU data accesses are held off while the
// c-core owns the L1 port; the cachelet served hits; the interrupt rises
// when the c-core finishes; c-core 0 stays idle.
module tb_greendroid_tile;
  localparam int NCC = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, st_req_valid, st_req_we, st_resp_valid, cpu_req, cpu_we, cpu_valid;
  logic l1_req, l1_we, l1_valid, irq;
  logic [31:0] st_req_addr, st_req_wdata, st_resp_rdata, cpu_addr, cpu_wdata, cpu_rdata;
  logic [31:0] l1_addr, l1_wdata, l1_rdata;
  logic [NCC-1:0] cc_active;
  logic [NCC-1:0][31:0] cachelet_hits;
  logic [31:0] l1mem [int];

  greendroid_tile #(.NCC(NCC)) dut (.clk, .rst_n, .st_req_valid, .st_req_we, .st_req_addr,
    .st_req_wdata, .st_resp_valid, .st_resp_rdata, .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata,
    .cpu_valid, .cpu_rdata, .l1_req, .l1_we, .l1_addr, .l1_wdata, .l1_valid, .l1_rdata,
    .irq, .cc_active, .cachelet_hits);

  int delay;
  always @(posedge clk) begin
    l1_valid <= 1'b0;
    if (l1_req && !l1_valid) begin
      if (delay == 0) begin
        l1_valid <= 1'b1;
        if (l1_we) l1mem[int'(l1_addr)] = l1_wdata;
        l1_rdata <= l1mem.exists(int'(l1_addr)) ? l1mem[int'(l1_addr)] : 32'h0;
        delay = $urandom_range(0, 2);
      end else delay--;
    end
  end

  function automatic logic [31:0] st_addr(input int cc, input int bb, input int r);
    return {6'(cc), 13'(bb), 13'(r)};
  endfunction

  task automatic st_write(input logic [31:0] a, input logic [31:0] d);
    st_req_valid = 1; st_req_we = 1; st_req_addr = a; st_req_wdata = d;
    @(negedge clk);
    st_req_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic st_read(input logic [31:0] a, output logic [31:0] d, output int lat);
    st_req_valid = 1; st_req_we = 0; st_req_addr = a;
    @(negedge clk);
    st_req_valid = 0;
    lat = 2;
    while (!st_resp_valid && lat < 20) begin @(negedge clk); lat++; end
    d = st_resp_rdata;
    @(negedge clk);
  endtask

  task automatic cpu_access(input bit w, input int a, input logic [31:0] d, output logic [31:0] q, output int cycles);
    cpu_req = 1; cpu_we = w; cpu_addr = 32'(a); cpu_wdata = d;
    cycles = 0;
    do begin @(negedge clk); cycles++; end while (!cpu_valid_seen);
    q = cpu_q;
    cpu_req = 0;
    @(negedge clk);
  endtask

  // capture the CPU's response at the clock edge
  bit cpu_valid_seen;
  logic [31:0] cpu_q;
  always @(posedge clk) begin
    cpu_valid_seen = cpu_valid;
    if (cpu_valid) cpu_q = cpu_rdata;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, e, st;
    int lat, cyc, n;
    rst_n = 0; st_req_valid = 0; st_req_we = 0; st_req_addr = 0; st_req_wdata = 0;
    cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; delay = 0; l1_rdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // CPU stores the array
    n = 25;
    e = 0;
    for (int k = 0; k < n; k++) begin
      logic [31:0] v;
      v = $urandom_range(0, 1 << 20);
      e += v;
      cpu_access(1, 'h8000 + 4 * k, v, q, cyc);
    end
    // state-tree read latency
    st_write(st_addr(1, 0, 1), 32'h8000);
    st_read(st_addr(1, 0, 1), q, lat);
    checks++;
    if (q !== 32'h8000 || lat != 6) begin failures++; $display("state-tree read %h after %0d cycles", q, lat); end
    st_write(st_addr(1, 0, 3), n);
    st_write(st_addr(1, 2, 0), 1);        // start c-core 1
    checks++;
    if (cc_active !== 2'b10) begin failures++; $display("c-core 1 not active: %b", cc_active); end
    // the CPU's access waits while the c-core owns the L1 port
    begin
      int waited;
      cpu_access(0, 'h8000, 0, q, waited);
      checks++;
      if (cc_active != 0 && waited < 2) begin failures++; $display("CPU access not held off"); end
    end
    do st_read(st_addr(1, 2, 0), st, lat); while (st[5] !== 1'b1 && st[4] !== 1'b1);
    checks++;
    if (!irq) begin failures++; $display("no interrupt after return"); end
    st_read(st_addr(1, 0, 0), q, lat);
    checks++;
    if (q !== e) begin failures++; $display("sum %0d, expected %0d", q, e); end
    checks++;
    if (cachelet_hits[1] == 0 || cachelet_hits[0] != 0) begin failures++; $display("cachelet hits %0d %0d", cachelet_hits[0], cachelet_hits[1]); end
    st_read(st_addr(0, 2, 0), st, lat);
    checks++;
    if (st[3:0] !== 4'd0) begin failures++; $display("c-core 0 not idle: %h", st); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
