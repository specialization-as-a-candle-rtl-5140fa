// murn_pkg: packet format of the MURN on-chip ring network (MiniDroid).
//
// An 80-bit packet: source id [3:0], destination id [7:4], command bit [8]
// (0 = for the design node, 1 = for the ring switch), 7-bit opcode [15:9]
// and a 64-bit data payload [79:16], as published.  Id 0 is the I/O block.
// Switch opcodes are this design's own encoding.
package murn_pkg;
  typedef struct packed {
    logic [63:0] data;
    logic [6:0]  opcode;
    logic        cmd;
    logic [3:0]  dest;
    logic [3:0]  src;
  } murn_pkt_t;

  localparam logic [6:0] SW_POWER  = 7'd1;   // data[0]: node power on
  localparam logic [6:0] SW_RESET  = 7'd2;   // data[0]: hold node in reset
  localparam logic [6:0] SW_ENABLE = 7'd3;   // data[0]: node enabled
endpackage
