// sipo: serial-in parallel-out shift register of a CDMA receiver user.
//
// Each `shift` moves sin in at the LSB, so after WIDTH shifts the first bit
// received is the MSB of dout, undoing the transmitter's MSB-first PISO.
// Synchronous active-high reset clears the register.
//
// Following the document: SIPO stages turn the serial decoded stream back
// into 8-bit words. This design's own choice: bit order.
module sipo #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             shift,
  input  logic             sin,
  output logic [WIDTH-1:0] dout
);
  always_ff @(posedge clk) begin
    if (rst)        dout <= '0;
    else if (shift) dout <= {dout[WIDTH-2:0], sin};
  end
endmodule
