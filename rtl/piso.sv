// piso: parallel-in serial-out shift register of a CDMA transmitter user.
//
// `load` captures a WIDTH-bit word; each `shift` moves it one place towards
// the MSB, so sout gives the word MSB first. Load has priority over shift.
// Synchronous active-high reset clears the register.
//
// Following the document: one PISO per user feeding the spreader, 8-bit
// words. This design's own choice: MSB first.
module piso #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  input  logic             shift,
  output logic             sout
);
  logic [WIDTH-1:0] sr;

  assign sout = sr[WIDTH-1];

  always_ff @(posedge clk) begin
    if (rst)        sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= {sr[WIDTH-2:0], 1'b0};
  end
endmodule
