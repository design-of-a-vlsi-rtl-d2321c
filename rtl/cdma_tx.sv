// cdma_tx: CDMA transmitter that lets N_USERS senders share one channel.
//
// Every user has a PISO that serialises its 8-bit word MSB first. Each data
// bit is held for SF clocks; in each clock it is XORed with the user's
// current spreading-code chip, and the encoded chips of all users are added
// into the channel value S(i) = sum over users of d(j) XOR C(j,i). A user
// with nothing to send in a frame contributes 0 to every chip, so it adds no
// interference for the others.
//
// Timing: transmission runs in fixed frames of DATA_W*SF clocks. In the
// frame's last clock usr_ready is high for every user; a user whose usr_valid
// is high then hands over usr_data (valid/ready handshake) and that word is
// spread over the whole next frame. chan_sum and chan_sync are registered:
// chan_sync is high with the first chip of each frame, so a receiver can
// align its code generator. The first frame after reset is empty.
//
// Channel width: the sum of N_USERS one-bit chips needs
// $clog2(N_USERS+1) bits (3 bits for 4 users).
//
// Following the document: PISO, per-user PN/spreading code, XOR spreading and
// a summing adder (Eq. 1), four users, 8-bit words. This design's own
// choices: Walsh codes of length SF = 8, framing, the sync output, and idle
// users sending nothing.
module cdma_tx #(
  parameter int unsigned N_USERS = 4,
  parameter int unsigned SF      = 8,
  parameter int unsigned DATA_W  = 8,
  localparam int unsigned CH_W   = $clog2(N_USERS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              usr_valid [N_USERS],
  input  logic [DATA_W-1:0] usr_data  [N_USERS],
  output logic              usr_ready [N_USERS],
  output logic [CH_W-1:0]   chan_sum,
  output logic              chan_sync
);
  logic [$clog2(SF)-1:0]     chip_idx;
  logic [$clog2(DATA_W)-1:0] bit_idx;
  logic [N_USERS-1:0]        code, active, dbit, enc;
  logic                      first_chip, last_chip, frame_last;
  logic [CH_W-1:0]           sum;

  pn_code #(.N_USERS(N_USERS), .SF(SF), .BITS(DATA_W)) u_code (
    .clk, .rst,
    .sync       (1'b0),
    .chip_idx, .bit_idx, .code,
    .first_chip, .last_chip, .frame_last
  );

  for (genvar u = 0; u < N_USERS; u++) begin : g_user
    piso #(.WIDTH(DATA_W)) u_piso (
      .clk, .rst,
      .load  (frame_last),
      .din   (usr_data[u]),
      .shift (last_chip && !frame_last),
      .sout  (dbit[u])
    );
    assign usr_ready[u] = frame_last;
    assign enc[u]       = active[u] & (dbit[u] ^ code[u]);

    always_ff @(posedge clk) begin
      if (rst)             active[u] <= 1'b0;
      else if (frame_last) active[u] <= usr_valid[u];
    end
  end

  // Channel adder.
  always_comb begin
    sum = '0;
    for (int unsigned u = 0; u < N_USERS; u++) sum = sum + CH_W'(enc[u]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      chan_sum  <= '0;
      chan_sync <= 1'b0;
    end else begin
      chan_sum  <= sum;
      chan_sync <= first_chip && (bit_idx == '0);
    end
  end

  a_handover_at_frame_end: assert property (@(posedge clk) disable iff (rst)
    frame_last |-> (chip_idx == ($clog2(SF))'(SF - 1)));
endmodule
