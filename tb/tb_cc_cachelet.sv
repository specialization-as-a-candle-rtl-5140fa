// tb_cc_cachelet: self-checking test of the cachelet (L0 cache of a c-core).
//
// Two lines of four words, against an L1 model that answers each held
// request after a random delay.  A random mix of reads and writes over a
// small address range is compared with a flat memory image kept by the
// testbench (writes go through to L1).  Also checked: a hit answers in the
// cycle after the request without touching L1; a stream of four
// consecutive words costs one miss and three hits; the hit and miss
// counters agree with the testbench's own count.
module tb_cc_cachelet;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, req, we, valid, l1_req, l1_we, l1_valid;
  logic [31:0] addr, wdata, rdata, l1_addr, l1_wdata, l1_rdata, hits, misses;
  logic [31:0] l1mem [int];
  logic [31:0] model [int];

  cc_cachelet #(.LINES(2), .WORDS(4)) dut (.clk, .rst_n, .req, .we, .addr, .wdata, .valid, .rdata,
    .l1_req, .l1_we, .l1_addr, .l1_wdata, .l1_valid, .l1_rdata, .hits, .misses);

  // L1: a held request is answered after 0..2 idle cycles
  int delay;
  int l1_accesses;
  always @(posedge clk) begin
    l1_valid <= 1'b0;
    if (l1_req && !l1_valid) begin
      if (delay == 0) begin
        l1_valid <= 1'b1;
        l1_accesses++;
        if (l1_we) l1mem[int'(l1_addr)] = l1_wdata;
        l1_rdata <= l1mem.exists(int'(l1_addr)) ? l1mem[int'(l1_addr)] : 32'(l1_addr) ^ 32'h5a5a_0000;
        delay = $urandom_range(0, 2);
      end else delay--;
    end
  end

  function automatic logic [31:0] mval(input int a);
    return model.exists(a) ? model[a] : 32'(a) ^ 32'h5a5a_0000;
  endfunction

  // one access; returns the number of cycles until valid
  task automatic access(input bit w, input int a, input logic [31:0] d, output logic [31:0] q, output int lat);
    req = 1; we = w; addr = 32'(a); wdata = d;
    @(negedge clk);
    req = 0;
    lat = 1;
    while (!valid) begin @(negedge clk); lat++; end
    q = rdata;
    @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    int lat, h0, m0, l1a;
    rst_n = 0; req = 0; we = 0; addr = 0; wdata = 0; delay = 0; l1_accesses = 0; l1_rdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // a stream of four words: one miss, three hits of one cycle each
    for (int k = 0; k < 4; k++) begin
      l1a = l1_accesses;
      access(0, 'h2000 + 4 * k, 0, q, lat);
      checks++;
      if (q !== mval('h2000 + 4 * k)) begin failures++; $display("stream word %0d = %h", k, q); end
      if (k > 0) begin
        checks++;
        if (lat != 1 || l1_accesses != l1a) begin failures++; $display("hit took %0d cycles, %0d L1 accesses", lat, l1_accesses - l1a); end
      end
    end
    checks++;
    if (hits !== 32'd3 || misses !== 32'd1) begin failures++; $display("hits %0d misses %0d", hits, misses); end
    // random traffic
    h0 = 0; m0 = 0;
    for (int n = 0; n < 1000; n++) begin
      int a;
      bit w;
      logic [31:0] d;
      a = 'h2000 + 4 * $urandom_range(0, 15);
      w = ($urandom_range(0, 3) == 0);
      d = $urandom;
      access(w, a, d, q, lat);
      if (w) model[a] = d;
      else begin
        checks++;
        if (q !== mval(a)) begin failures++; if (failures < 10) $display("read %h = %h, expected %h", a, q, mval(a)); end
      end
    end
    // every write reached L1
    begin
      int bad;
      bad = 0;
      foreach (model[a]) if (!l1mem.exists(a) || l1mem[a] !== model[a]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("%0d written words missing in L1", bad); end
    end
    checks++;
    if (hits == 0 || misses == 0) begin failures++; $display("random traffic: hits %0d misses %0d", hits, misses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
