// rr_arbiter: round-robin arbiter that decides which input FIFO may send a
// flit through the crossbar in the current cycle.
//
// The arbiter visits the requesters in cyclic order, as in the round-robin
// scheduling loop: the requester after the one served last has the highest
// priority, so each requester is served at most once before any other
// waiting requester is served again. The grant is combinational from req and
// the stored pointer; when a grant is given the pointer moves to the port
// after the granted one. At most one grant per cycle, since the crossbar
// carries one link at a time.
//
// Interface: req[i] from requester i; grant is one-hot (or zero), grant_idx
// its index, grant_valid high when any grant is given. Reset (synchronous,
// active high) gives requester 0 the highest priority.
//
// The round-robin policy is the document's; one grant per cycle and the
// pointer update rule are this design's choices.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         req,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 grant_valid
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr;  // highest-priority requester this cycle

  always_comb begin
    grant       = '0;
    grant_idx   = '0;
    grant_valid = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (!grant_valid && req[i]) begin
        grant[i]    = 1'b1;
        grant_idx   = IW'(i);
        grant_valid = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
    end else if (grant_valid) begin
      ptr <= (grant_idx == IW'(N - 1)) ? '0 : grant_idx + 1'b1;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(grant));
  a_granted_requested: assert property (@(posedge clk) disable iff (rst) (grant & ~req) == '0);
endmodule
