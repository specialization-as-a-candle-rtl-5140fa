// ipu_div: 8-cycle iterative unsigned integer divider.
//
// Radix-4 restoring division: each cycle retires two quotient bits, so a
// 16-bit quotient takes 8 cycles.  The first two bits are produced in the
// cycle that start is raised (from the a / b inputs directly); the last two
// in the 8th cycle, when done is high and q carries the finished quotient
// (combinationally), so a register file can store it at the end of that
// cycle: a result written 8 cycles after issue, against 1 cycle for an ALU
// operation.  A divide by zero returns all ones.  The 8-cycle latency
// follows the published instruction set; the radix-4 scheme and the
// unsigned operands are this design's choices.
// Interface: start (one cycle, ignored while busy), a / b sampled with start.
module ipu_div
  import ipu_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] q
);
  logic [W-1:0] rem, div, dvd, qr;
  logic [W-1:0] c_rem, c_div, c_dvd, c_q;
  logic [2:0]   cnt;
  logic         run;

  assign run   = busy || start;
  assign c_rem = busy ? rem : '0;
  assign c_div = busy ? div : b;
  assign c_dvd = busy ? dvd : a;
  assign c_q   = busy ? qr  : '0;

  // two restoring steps per cycle
  logic [W+1:0] r1, r2;
  logic         q1, q0;
  always_comb begin
    r1 = {1'b0, c_rem, c_dvd[W-1]};
    q1 = (r1 >= {2'b0, c_div});
    if (q1) r1 = r1 - {2'b0, c_div};
    r2 = {r1[W:0], c_dvd[W-2]};
    q0 = (r2 >= {2'b0, c_div});
    if (q0) r2 = r2 - {2'b0, c_div};
  end

  assign done = busy && cnt == 3'd7;
  assign q    = (c_div == '0) ? {W{1'b1}} : {c_q[W-3:0], q1, q0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0;
      rem <= '0; div <= '0; dvd <= '0; qr <= '0;
    end else if (run) begin
      rem  <= r2[W-1:0];
      div  <= c_div;
      dvd  <= {c_dvd[W-3:0], 2'b00};
      qr   <= {c_q[W-3:0], q1, q0};
      cnt  <= busy ? cnt + 1'b1 : 3'd1;
      busy <= !(busy && cnt == 3'd7);
    end
  end
endmodule
