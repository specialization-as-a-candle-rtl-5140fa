// tb_murn_switch: self-checking test of one MURN ring switch (ID 2).
//
// Checked: packets for other switches pass through in order, one per
// cycle; data packets for this switch reach the node port; command packets
// change the node's power, reset and enable outputs and are not delivered;
// data for a node that is off, held in reset or disabled is dropped and
// counted; the node can inject only while it is on; ring traffic is never
// lost under random back-pressure on the ring output.
module tb_murn_switch;
  import murn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, in_valid, in_ready, out_valid, out_ready, node_valid, node_ready, inj_valid, inj_ready;
  logic node_pwr, node_rst, node_en;
  murn_pkt_t in_pkt, out_pkt, node_pkt, inj_pkt;
  logic [15:0] drop_cnt;

  murn_switch #(.ID(4'd2)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_pkt, .out_valid, .out_ready,
    .out_pkt, .node_valid, .node_ready, .node_pkt, .inj_valid, .inj_ready, .inj_pkt,
    .node_pwr, .node_rst, .node_en, .drop_cnt);

  murn_pkt_t exp_out [$], exp_node [$];
  bit in_acc, inj_acc, rand_bp;
  always @(posedge clk) if (rst_n) begin
    in_acc  = in_valid && in_ready;
    inj_acc = inj_valid && inj_ready;
    if (in_acc && in_pkt.dest != 4'd2) exp_out.push_back(in_pkt);
    if (inj_acc) exp_out.push_back(inj_pkt);
    if (out_valid && out_ready) begin
      checks++;
      if (exp_out.size() == 0 || out_pkt !== exp_out[0]) begin failures++; $display("unexpected ring output %h", out_pkt); end
      else void'(exp_out.pop_front());
    end
    if (node_valid && node_ready) begin
      checks++;
      if (exp_node.size() == 0 || node_pkt !== exp_node[0]) begin failures++; $display("unexpected node packet"); end
      else void'(exp_node.pop_front());
    end
  end

  function automatic murn_pkt_t mk(input int dest, input bit cmd, input logic [6:0] op, input logic [63:0] d);
    murn_pkt_t p;
    p.src = 4'd0; p.dest = 4'(dest); p.cmd = cmd; p.opcode = op; p.data = d;
    return p;
  endfunction

  task automatic send(input murn_pkt_t p);
    in_valid = 1; in_pkt = p;
    do @(negedge clk); while (!in_acc);
    in_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rand_bp) out_ready = 1'($urandom_range(0, 1));

  initial begin
    murn_pkt_t p;
    rst_n = 0; rand_bp = 0; in_valid = 0; in_pkt = '0; out_ready = 1; node_ready = 1; inj_valid = 0; inj_pkt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (!node_pwr || node_rst || !node_en) begin failures++; $display("reset state of node controls"); end
    // pass-through at full rate
    for (int n = 0; n < 20; n++) begin
      p = mk($urandom_range(3, 9), 0, 7'd0, {$urandom, $urandom});
      in_valid = 1; in_pkt = p;
      @(negedge clk);
      checks++;
      if (!in_ready && n > 0) begin failures++; $display("pass-through not at one per cycle"); end
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    // delivery to the node
    for (int n = 0; n < 5; n++) begin p = mk(2, 0, 7'd9, {$urandom, $urandom}); exp_node.push_back(p); send(p); end
    repeat (2) @(negedge clk);
    // injection while on
    inj_valid = 1; inj_pkt = mk(5, 0, 7'd3, 64'h1234);
    do @(negedge clk); while (!inj_acc);
    inj_valid = 0;
    // power off, reset, disable by command packets; data then dropped
    send(mk(2, 1, SW_POWER, 64'd0));
    checks++;
    if (node_pwr) begin failures++; $display("power command ignored"); end
    send(mk(2, 0, 7'd9, 64'd1));
    inj_valid = 1; inj_pkt = mk(5, 0, 7'd3, 64'h1);
    #1;
    checks++;
    if (inj_ready) begin failures++; $display("powered-off node injected"); end
    inj_valid = 0;
    send(mk(2, 1, SW_POWER, 64'd1));
    send(mk(2, 1, SW_RESET, 64'd1));
    checks++;
    if (!node_rst) begin failures++; $display("reset command ignored"); end
    send(mk(2, 0, 7'd9, 64'd2));
    send(mk(2, 1, SW_RESET, 64'd0));
    send(mk(2, 1, SW_ENABLE, 64'd0));
    checks++;
    if (node_en) begin failures++; $display("enable command ignored"); end
    send(mk(2, 0, 7'd9, 64'd3));
    send(mk(2, 1, SW_ENABLE, 64'd1));
    checks++;
    if (drop_cnt !== 16'd3) begin failures++; $display("drop count %0d, expected 3", drop_cnt); end
    // random back-pressure on the ring output
    rand_bp = 1;
    for (int n = 0; n < 300; n++) begin
      p = mk($urandom_range(3, 9), 0, 7'd0, {$urandom, $urandom});
      send(p);
    end
    rand_bp = 0;
    out_ready = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_out.size() != 0 || exp_node.size() != 0) begin failures++; $display("%0d ring / %0d node packets missing", exp_out.size(), exp_node.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
