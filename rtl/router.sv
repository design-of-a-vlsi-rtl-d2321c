// router: five-port (C, N, S, E, W) buffered router with round-robin
// arbitration and an added buffer at every output port.
//
// Each input port writes flits (8-bit data plus a 2-bit output select) into
// its own input FIFO. An input FIFO requests the crossbar when it holds a
// flit and the output buffer that flit is headed for has room. The
// round-robin arbiter grants one request per cycle; the crossbar carries the
// granted head flit's data to its output buffer, and the grant pops the input
// FIFO. Output buffers are drained by the next stage with a valid/ready
// handshake (out_valid = buffer not empty, a word moves when out_valid and
// out_ready are both high).
//
// Timing: a flit accepted at an idle router in cycle t (in_valid and
// in_ready high) is in the output buffer at cycle t+2 and is shown on
// out_data with out_valid high from then on. With all inputs busy the
// router moves one flit per cycle in total. Reset is synchronous and active
// high and empties all buffers.
//
// Following the document: five FIFOs, an arbiter running round robin, a
// crossbar with one link at a time, 8-bit data, and a buffer added at each
// output port. This design's own choices: the buffer depths, the handshake,
// the select encoding and the rule that a request waits while its output
// buffer is full.
module router
  import router_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 8,
  parameter int unsigned OUT_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst,
  // input ports
  input  logic              in_valid [NPORTS],
  output logic              in_ready [NPORTS],
  input  logic [DATA_W-1:0] in_data  [NPORTS],
  input  logic [SEL_W-1:0]  in_sel   [NPORTS],
  // output ports
  output logic              out_valid [NPORTS],
  input  logic              out_ready [NPORTS],
  output logic [DATA_W-1:0] out_data  [NPORTS]
);
  flit_t             head     [NPORTS];
  logic [NPORTS-1:0] in_empty, in_full, ob_full, ob_empty, req, grant;
  logic [PORT_W-1:0] head_dest [NPORTS];
  logic [DATA_W-1:0] head_data [NPORTS];
  logic [SEL_W-1:0]  head_sel  [NPORTS];
  logic [DATA_W-1:0] xb_data   [NPORTS];
  logic [NPORTS-1:0] xb_wr;
  logic [PORT_W-1:0] grant_idx, xb_port;
  logic              grant_valid;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    fifo #(.WIDTH($bits(flit_t)), .DEPTH(IN_DEPTH)) u_in_fifo (
      .clk, .rst,
      .wr_en   (in_valid[p]),
      .wr_data (flit_t'{sel: in_sel[p], data: in_data[p]}),
      .rd_en   (grant[p]),
      .rd_data (head[p]),
      .full    (in_full[p]),
      .empty   (in_empty[p]),
      .count   ()
    );
    assign in_ready[p]  = !in_full[p];
    assign head_data[p] = head[p].data;
    assign head_sel[p]  = head[p].sel;
    assign head_dest[p] = dest_port(PORT_W'(p), head[p].sel);
    assign req[p]       = !in_empty[p] && !ob_full[head_dest[p]];

    fifo #(.WIDTH(DATA_W), .DEPTH(OUT_DEPTH)) u_out_buf (
      .clk, .rst,
      .wr_en   (xb_wr[p]),
      .wr_data (xb_data[p]),
      .rd_en   (out_ready[p]),
      .rd_data (out_data[p]),
      .full    (ob_full[p]),
      .empty   (ob_empty[p]),
      .count   ()
    );
    assign out_valid[p] = !ob_empty[p];
  end

  rr_arbiter #(.N(NPORTS)) u_arbiter (
    .clk, .rst,
    .req, .grant, .grant_idx, .grant_valid
  );

  crossbar u_crossbar (
    .in_data     (head_data),
    .in_sel      (head_sel),
    .grant_valid,
    .grant_idx,
    .out_data    (xb_data),
    .out_wr      (xb_wr),
    .out_port    (xb_port)
  );

  a_no_write_to_full: assert property (@(posedge clk) disable iff (rst) (xb_wr & ob_full) == '0);
  a_one_link: assert property (@(posedge clk) disable iff (rst) grant_valid |-> xb_wr == (NPORTS'(1) << xb_port));
endmodule
