// router_pkg: types, constants and small functions shared by the router and
// its CDMA physical layer.
//
// Port numbering follows the order in which the router block diagram lists
// the arbiter inputs and crossbar outputs: C (local), N, S, E, W. Flits are
// 8-bit words, as stated for the crossbar. Each flit carries a 2-bit output
// select: the crossbar has a select of two lines giving four choices, read
// here as the four ports other than the one the flit arrived on (no U-turn).
// The mapping dest = (src + 1 + sel) mod 5 is this design's own choice.
//
// The CDMA spreading codes are Walsh-Hadamard rows: chip i of row r is the
// parity of (r & i). Rows 1..SF-1 are balanced and mutually orthogonal,
// which is what the zero/one accumulator decoder relies on.
package router_pkg;

  localparam int unsigned DATA_W = 8;  // flit data width
  localparam int unsigned NPORTS = 5;  // C, N, S, E, W
  localparam int unsigned SEL_W  = 2;  // output select lines
  localparam int unsigned PORT_W = 3;  // bits to number a port

  typedef enum logic [PORT_W-1:0] {
    PORT_LOC = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_SOUTH = 3'd2,
    PORT_EAST = 3'd3,
    PORT_WEST = 3'd4
  } port_e;

  // One flit as held in an input FIFO: select plus payload.
  typedef struct packed {
    logic [SEL_W-1:0]  sel;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Output port reached from input port `src` with select `sel`.
  function automatic logic [PORT_W-1:0] dest_port(input logic [PORT_W-1:0] src,
                                                  input logic [SEL_W-1:0]  sel);
    logic [PORT_W:0] s;
    s = {1'b0, src} + {2'b00, sel} + 4'd1;
    if (s >= 4'(NPORTS)) s = s - 4'(NPORTS);
    return s[PORT_W-1:0];
  endfunction

  // Chip `idx` of Walsh-Hadamard row `row` (0 or 1).
  function automatic logic walsh_chip(input int unsigned row, input int unsigned idx);
    return ^(row & idx);
  endfunction

endpackage
