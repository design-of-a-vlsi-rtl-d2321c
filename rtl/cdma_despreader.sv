// cdma_despreader: recovers one user's data bits from the CDMA channel sum.
//
// For each chip of a bit, the channel sample is routed by the user's
// de-spreading code chip into one of two accumulators: the zero accumulator
// when the chip is 0, the one accumulator when it is 1. With balanced,
// mutually orthogonal codes every other user adds the same amount to both
// accumulators, while this user adds SF/2 to the one accumulator when its bit
// is 0 (its chips equal the code) and to the zero accumulator when its bit is
// 1. At the last chip a comparator decides: bit = (zero > one). Equal sums
// mean the user sent nothing, reported as present = 0.
//
// Timing: samples are consumed one per clock; first_chip/last_chip mark the
// ends of a bit. bit_strobe is high for one clock, the clock after last_chip,
// with bit_out and present valid in that clock.
//
// Following the document: demultiplexer driven by the de-spreading code, zero
// and one accumulators, comparator. This design's own choice: the presence
// flag for an idle user.
module cdma_despreader #(
  parameter int unsigned N_USERS = 4,
  parameter int unsigned SF      = 8,
  localparam int unsigned CH_W   = $clog2(N_USERS + 1),
  localparam int unsigned ACC_W  = $clog2(N_USERS * SF + 1)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [CH_W-1:0] sample,
  input  logic            chip,
  input  logic            first_chip,
  input  logic            last_chip,
  output logic            bit_out,
  output logic            present,
  output logic            bit_strobe
);
  logic [ACC_W-1:0] zero_acc, one_acc, zero_nxt, one_nxt, zero_base, one_base;

  assign zero_base = first_chip ? '0 : zero_acc;
  assign one_base  = first_chip ? '0 : one_acc;
  assign zero_nxt  = zero_base + (chip ? '0 : ACC_W'(sample));
  assign one_nxt   = one_base  + (chip ? ACC_W'(sample) : '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      zero_acc   <= '0;
      one_acc    <= '0;
      bit_out    <= 1'b0;
      present    <= 1'b0;
      bit_strobe <= 1'b0;
    end else begin
      zero_acc   <= zero_nxt;
      one_acc    <= one_nxt;
      bit_strobe <= last_chip;
      if (last_chip) begin
        bit_out <= (zero_nxt > one_nxt);
        present <= (zero_nxt != one_nxt);
      end
    end
  end
endmodule
