// ipu_noc_stop: one stop of the IPU's bidirectional ring network-on-chip.
//
// Each STP/LBP core and the I/O block own one stop.  A stop forwards
// clockwise (cw) and counter-clockwise (ccw) traffic, ejects flits addressed
// to its own core id, and injects local flits in the direction with the
// shorter ring distance (clockwise on a tie).  Ring positions follow the
// published numbering: clockwise the ids run 0 (I/O block), 1, 3, 5, ...
// then the even ids downward, so that switching off the highest-numbered
// core pairs leaves ids 1..N contiguous.
//
// Every output (cw, ccw, eject) is a two-entry queue; through traffic has
// priority over injection, and on the eject port cw beats ccw beats local
// loop-back.  One hop costs one cycle.  With pwr_on low the core behind the
// stop is powered down and the stop acts as a bypass: through traffic still
// flows, injection is refused and flits addressed to the core are dropped
// (drop_cnt counts them).  Link handshake: valid/ready per hop.
module ipu_noc_stop
  import ipu_pkg::*;
#(
  parameter int ID     = 1,
  parameter int NCORES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pwr_on,
  input  logic        cw_in_valid,
  output logic        cw_in_ready,
  input  flit_t       cw_in,
  output logic        cw_out_valid,
  input  logic        cw_out_ready,
  output flit_t       cw_out,
  input  logic        ccw_in_valid,
  output logic        ccw_in_ready,
  input  flit_t       ccw_in,
  output logic        ccw_out_valid,
  input  logic        ccw_out_ready,
  output flit_t       ccw_out,
  input  logic        inj_valid,
  output logic        inj_ready,
  input  flit_t       inj,
  output logic        ej_valid,
  input  logic        ej_ready,
  output flit_t       ej,
  output logic [15:0] drop_cnt
);
  localparam int NSTOP = NCORES + 1;
  localparam int POS   = ring_pos(ID, NCORES);

  logic  cw_sp, ccw_sp, ej_sp;
  logic  cw_push, ccw_push, ej_push;
  flit_t cw_d, ccw_d, ej_d;

  logic cw_here, ccw_here, inj_here, inj_cw;
  assign cw_here  = (int'(cw_in.dest) == ID);
  assign ccw_here = (int'(ccw_in.dest) == ID);
  assign inj_here = (int'(inj.dest) == ID);
  assign inj_cw   = ((ring_pos(int'(inj.dest), NCORES) - POS + NSTOP) % NSTOP) <= NSTOP / 2;

  // a flit addressed to a powered-down core is consumed and dropped
  logic cw_drop, ccw_drop;
  assign cw_drop  = cw_in_valid && cw_here && !pwr_on;
  assign ccw_drop = ccw_in_valid && ccw_here && !pwr_on;

  always_comb begin
    cw_in_ready = 1'b0; ccw_in_ready = 1'b0; inj_ready = 1'b0;
    cw_push = 1'b0; ccw_push = 1'b0; ej_push = 1'b0;
    cw_d = cw_in; ccw_d = ccw_in; ej_d = cw_in;
    // clockwise input
    if (cw_drop)                     cw_in_ready = 1'b1;
    else if (cw_in_valid && cw_here) begin cw_in_ready = ej_sp; ej_push = ej_sp; ej_d = cw_in; end
    else if (cw_in_valid)            begin cw_in_ready = cw_sp; cw_push = cw_sp; end
    // counter-clockwise input
    if (ccw_drop)                      ccw_in_ready = 1'b1;
    else if (ccw_in_valid && ccw_here) begin
      if (!ej_push) begin ccw_in_ready = ej_sp; ej_push = ej_sp; ej_d = ccw_in; end
    end else if (ccw_in_valid)         begin ccw_in_ready = ccw_sp; ccw_push = ccw_sp; end
    // local injection
    if (inj_valid && pwr_on) begin
      if (inj_here) begin
        if (!ej_push && ej_sp) begin inj_ready = 1'b1; ej_push = 1'b1; ej_d = inj; end
      end else if (inj_cw) begin
        if (!cw_push && cw_sp) begin inj_ready = 1'b1; cw_push = 1'b1; cw_d = inj; end
      end else begin
        if (!ccw_push && ccw_sp) begin inj_ready = 1'b1; ccw_push = 1'b1; ccw_d = inj; end
      end
    end
  end

  ipu_flit_fifo u_cw  (.clk, .rst_n, .push(cw_push),  .in(cw_d),  .space(cw_sp),
                       .out_valid(cw_out_valid),  .out_ready(cw_out_ready),  .out(cw_out));
  ipu_flit_fifo u_ccw (.clk, .rst_n, .push(ccw_push), .in(ccw_d), .space(ccw_sp),
                       .out_valid(ccw_out_valid), .out_ready(ccw_out_ready), .out(ccw_out));
  ipu_flit_fifo u_ej  (.clk, .rst_n, .push(ej_push),  .in(ej_d),  .space(ej_sp),
                       .out_valid(ej_valid),      .out_ready(ej_ready),      .out(ej));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drop_cnt <= '0;
    else drop_cnt <= drop_cnt + 16'(cw_drop) + 16'(ccw_drop);
  end
endmodule
