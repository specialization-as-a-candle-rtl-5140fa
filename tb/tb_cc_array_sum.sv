// tb_cc_array_sum: self-checking test of the computeArraySum c-core.
//
// The testbench drives the c-core's state-tree leaf port directly and
// models memory: each load is answered after a random 1..4 cycle delay.
// Runs checked against sums computed in the testbench:
//   * the original function, sum of a[0..n-1], for random arrays and n;
//   * patched versions: comparator changed from < to <= (one more element),
//     accumulate by subtraction, loop step constant 2, start index 1;
//   * an exception bit on the loop-exit transition: the c-core stops in
//     the exception state, reports the edge in its status word, and the
//     CPU resumes it by writing the return state;
//   * state-tree reads of the argument and status registers.
module tb_cc_array_sum;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, leaf_we, leaf_re, ld_en, ld_valid, active, done, exc;
  logic [25:0] leaf_addr;
  logic [31:0] leaf_wdata, leaf_rdata, ld_addr, ld_value;
  logic [31:0] mem [int];

  cc_array_sum dut (.clk, .rst_n, .leaf_we, .leaf_re, .leaf_addr, .leaf_wdata, .leaf_rdata,
    .ld_en, .ld_addr, .ld_valid, .ld_value, .active, .done, .exc);

  // memory with a random response delay
  int wait_left;
  logic [31:0] pend_addr;
  always @(posedge clk) begin
    ld_valid <= 1'b0;
    if (ld_en) begin wait_left = $urandom_range(0, 3); pend_addr = ld_addr; end
    else if (wait_left >= 0) begin
      if (wait_left == 0) begin
        ld_valid <= 1'b1;
        ld_value <= mem.exists(int'(pend_addr)) ? mem[int'(pend_addr)] : 32'h0;
      end
      wait_left--;
    end
  end

  task automatic wr(input int bb, input int r, input logic [31:0] d);
    leaf_we = 1; leaf_addr = {13'(bb), 13'(r)}; leaf_wdata = d;
    @(negedge clk);
    leaf_we = 0;
  endtask

  task automatic rd(input int bb, input int r, output logic [31:0] d);
    leaf_re = 1; leaf_addr = {13'(bb), 13'(r)};
    #1 d = leaf_rdata;
    @(negedge clk);
    leaf_re = 0;
  endtask

  task automatic run(input int base, input int n, output logic [31:0] sum);
    logic [31:0] st;
    wr(0, 1, base); wr(0, 3, n);
    wr(2, 0, 1);
    while (!done && !exc) @(negedge clk);
    rd(0, 0, sum);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] got, st, e;
    rst_n = 0; leaf_we = 0; leaf_re = 0; leaf_addr = 0; leaf_wdata = 0; wait_left = -1;
    ld_valid = 0; ld_value = 0;
    for (int k = 0; k < 64; k++) mem['h1000 + 4 * k] = $urandom_range(0, 100000);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // original function
    for (int t = 0; t < 10; t++) begin
      int n;
      n = $urandom_range(0, 30);
      e = 0;
      for (int k = 0; k < n; k++) e += mem['h1000 + 4 * k];
      run('h1000, n, got);
      checks++;
      if (got !== e) begin failures++; $display("n=%0d: sum %0d, expected %0d", n, got, e); end
    end
    rd(0, 1, got);
    checks++;
    if (got !== 32'h1000) begin failures++; $display("argument a read back as %h", got); end
    // patch 1: i < n becomes i <= n
    wr(1, 0, 1);
    e = 0;
    for (int k = 0; k <= 10; k++) e += mem['h1000 + 4 * k];
    run('h1000, 10, got);
    checks++;
    if (got !== e) begin failures++; $display("<= patch: %0d, expected %0d", got, e); end
    wr(1, 0, 0);
    // patch 2: subtract, step 2, start at index 1
    wr(1, 1, 1); wr(1, 4, 2); wr(1, 3, 1);
    e = 0;
    for (int k = 1; k < 20; k += 2) e -= mem['h1000 + 4 * k];
    run('h1000, 20, got);
    checks++;
    if (got !== e) begin failures++; $display("sub/step/start patch: %0d, expected %0d", got, e); end
    wr(1, 1, 0); wr(1, 4, 1); wr(1, 3, 0);
    // exception on the loop exit edge (s1 -> return, edge 1)
    wr(1, 5, 5'b00010);
    e = 0;
    for (int k = 0; k < 5; k++) e += mem['h1000 + 4 * k];
    run('h1000, 5, got);
    rd(2, 0, st);
    checks++;
    if (!exc || st[4] !== 1'b1 || st[10:8] !== 3'd1 || got !== e) begin
      failures++; $display("exception: exc %b status %h sum %0d", exc, st, got);
    end
    // the CPU finishes the function and resumes the c-core at its return
    wr(2, 1, 5);
    checks++;
    if (!done) begin failures++; $display("resume to return state failed"); end
    wr(1, 5, 0);
    // exception on the loop back edge (s3 -> s1, edge 4) stops after one element
    wr(1, 5, 5'b10000);
    run('h1000, 5, got);
    rd(2, 0, st);
    checks++;
    if (!exc || st[10:8] !== 3'd4 || got !== mem['h1000]) begin
      failures++; $display("back-edge exception: status %h sum %0d", st, got);
    end
    wr(1, 5, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
