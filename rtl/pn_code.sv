// pn_code: spreading-code sequencer for the CDMA link.
//
// Counts chips within a data bit (0..SF-1) and bits within a word
// (0..BITS-1), and gives, for the current chip, one code chip per user.
// User u (0-based) gets Walsh-Hadamard row u+1 of order SF, so the codes are
// balanced and mutually orthogonal. `sync` marks the current cycle as chip 0
// of bit 0, which lets a receiver lock onto the transmitter's frame.
//
// Interface: chip_idx, bit_idx of the current cycle; code[u] is user u's
// chip; first_chip/last_chip mark the ends of a bit, frame_last the final
// chip of a word. One chip per clock, so one data bit takes SF clocks
// (transaction rate = clock rate / SF).
//
// Following the document: one code generator per user and chip-rate
// spreading with orthogonal Walsh-Hadamard codes. This design's own choices:
// the code length SF = 8, the row assignment and the shared counter.
module pn_code #(
  parameter int unsigned N_USERS = 4,
  parameter int unsigned SF      = 8,
  parameter int unsigned BITS    = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    sync,
  output logic [$clog2(SF)-1:0]   chip_idx,
  output logic [$clog2(BITS)-1:0] bit_idx,
  output logic [N_USERS-1:0]      code,
  output logic                    first_chip,
  output logic                    last_chip,
  output logic                    frame_last
);
  localparam int unsigned CW = $clog2(SF);
  localparam int unsigned BW = $clog2(BITS);

  logic [CW-1:0] chip_q;
  logic [BW-1:0] bit_q;

  assign chip_idx   = sync ? '0 : chip_q;
  assign bit_idx    = sync ? '0 : bit_q;
  assign first_chip = (chip_idx == '0);
  assign last_chip  = (chip_idx == CW'(SF - 1));
  assign frame_last = last_chip && (bit_idx == BW'(BITS - 1));

  always_comb begin
    for (int unsigned u = 0; u < N_USERS; u++) begin
      code[u] = router_pkg::walsh_chip(u + 1, int'(chip_idx));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      chip_q <= '0;
      bit_q  <= '0;
    end else begin
      chip_q <= last_chip ? '0 : chip_idx + 1'b1;
      if (last_chip) bit_q <= frame_last ? '0 : bit_idx + 1'b1;
      else           bit_q <= bit_idx;
    end
  end

  initial begin
    assert (N_USERS < SF) else $error("pn_code: needs N_USERS < SF for balanced orthogonal codes");
    assert ((SF & (SF - 1)) == 0) else $error("pn_code: SF must be a power of two");
  end
endmodule
