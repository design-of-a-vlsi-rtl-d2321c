// cdma_router_top: the buffered five-port router with its CDMA physical
// layer.
//
// Flits enter at the five input ports and are switched by the router into
// its five output buffers. The local port (C) is delivered directly from its
// output buffer. The four neighbour ports (N, S, E, W) share one CDMA
// channel: their output buffers are users 1..4 of the CDMA transmitter,
// which spreads each word with the user's code and adds all users into the
// channel sum. A CDMA receiver at the far end of the channel separates the
// four streams again. The channel (chan_sum, chan_sync) is brought out so the
// link can be observed or cut.
//
// Timing: router latency is 2 clocks; a word then waits for the next CDMA
// frame (64 clocks with 8-bit words and 8-chip codes) and arrives at the
// receiver 67 clocks after the transmitter takes it. The output buffers
// absorb the rate difference between the one-flit-per-clock router and the
// one-word-per-64-clocks link.
//
// Following the document: router with input FIFOs, round-robin arbiter,
// crossbar and output buffers; CDMA transmitter and receiver as the router's
// physical layer. This design's own choice: which ports use the CDMA link
// (the four neighbour ports, one user each, matching four users).
module cdma_router_top
  import router_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 8,
  parameter int unsigned OUT_DEPTH = 8,
  parameter int unsigned SF        = 8,
  localparam int unsigned N_USERS  = NPORTS - 1,
  localparam int unsigned CH_W     = $clog2(N_USERS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  // router input ports C, N, S, E, W
  input  logic              in_valid [NPORTS],
  output logic              in_ready [NPORTS],
  input  logic [DATA_W-1:0] in_data  [NPORTS],
  input  logic [SEL_W-1:0]  in_sel   [NPORTS],
  // local output port
  output logic              local_valid,
  input  logic              local_ready,
  output logic [DATA_W-1:0] local_data,
  // CDMA channel
  output logic [CH_W-1:0]   chan_sum,
  output logic              chan_sync,
  // words recovered from the channel for N, S, E, W
  output logic              rx_valid [N_USERS],
  output logic [DATA_W-1:0] rx_data  [N_USERS]
);
  logic              r_out_valid [NPORTS];
  logic              r_out_ready [NPORTS];
  logic [DATA_W-1:0] r_out_data  [NPORTS];
  logic              tx_valid    [N_USERS];
  logic              tx_ready    [N_USERS];
  logic [DATA_W-1:0] tx_data     [N_USERS];

  router #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_router (
    .clk, .rst,
    .in_valid, .in_ready, .in_data, .in_sel,
    .out_valid (r_out_valid),
    .out_ready (r_out_ready),
    .out_data  (r_out_data)
  );

  assign local_valid    = r_out_valid[PORT_LOC];
  assign local_data     = r_out_data[PORT_LOC];
  assign r_out_ready[0] = local_ready;

  for (genvar u = 0; u < N_USERS; u++) begin : g_link
    assign tx_valid[u]        = r_out_valid[u + 1];
    assign tx_data[u]         = r_out_data[u + 1];
    assign r_out_ready[u + 1] = tx_ready[u];
  end

  cdma_tx #(.N_USERS(N_USERS), .SF(SF), .DATA_W(DATA_W)) u_tx (
    .clk, .rst,
    .usr_valid (tx_valid),
    .usr_data  (tx_data),
    .usr_ready (tx_ready),
    .chan_sum, .chan_sync
  );

  cdma_rx #(.N_USERS(N_USERS), .SF(SF), .DATA_W(DATA_W)) u_rx (
    .clk, .rst,
    .chan_sum, .chan_sync,
    .rx_valid, .rx_data
  );
endmodule
