// ipu_flit_fifo: two-entry flit queue used at every NoC stop output.
//
// push is accepted when `space` is high; space depends only on the stored
// count, so ready never depends combinationally on the downstream side and
// a ring of stops has no combinational loop.  With one flit stored, a push
// and a pop in the same cycle sustain one flit per cycle.  The head flit is
// on out/out_valid and leaves when out_ready is high.
module ipu_flit_fifo
  import ipu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t in,
  output logic  space,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out
);
  flit_t      q [2];
  logic [1:0] cnt;
  logic       pop;

  assign space     = (cnt < 2'd2);
  assign out_valid = (cnt != 2'd0);
  assign out       = q[0];
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      q[0] <= '0; q[1] <= '0;
    end else begin
      if (pop) q[0] <= q[1];
      if (push && space) begin
        if (pop) q[0] <= in;
        else     q[cnt == 2'd0 ? 0 : 1] <= in;
      end
      cnt <= cnt + {1'b0, push && space} - {1'b0, pop};
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(push && !space)) else $error("flit fifo overflow");
  end
endmodule
