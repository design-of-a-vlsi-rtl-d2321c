// fifo: synchronous first-in first-out buffer, used both as the input buffer
// of every router port and as the buffer added at every output port.
//
// A circular array of DEPTH words with a write pointer, a read pointer and an
// occupancy counter, from which the full and empty flags are derived. The
// head word is always visible on rd_data (show-ahead), so a consumer looks at
// it while empty is low and pops it with rd_en. A write while full and a read
// while empty are ignored. A write and a read in the same cycle are both
// performed. Reset is synchronous and active high and empties the buffer,
// matching the described behaviour that data is deleted while reset is 1.
//
// Timing: a word written in cycle t is visible on rd_data, with empty low, in
// cycle t+1.
//
// Following the description: two pointers, full/empty flags and a counter.
// This design's own choices: the depth (not given), show-ahead reads, one
// clock domain.
module fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) int'(count) <= DEPTH);
endmodule
