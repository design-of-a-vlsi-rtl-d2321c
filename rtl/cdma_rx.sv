// cdma_rx: CDMA receiver that recovers every user's 8-bit words from the
// shared channel.
//
// A code generator, aligned to the transmitter by chan_sync, gives each
// user's de-spreading chip. Per user, a despreader (zero/one accumulators and
// comparator) decides one bit every SF clocks, and a SIPO gathers the bits
// into a word. A word is delivered only if every one of its bits showed the
// user's signal; a user that sent nothing in a frame delivers nothing.
//
// Timing: chan_sum/chan_sync come from cdma_tx's registered outputs. The last
// chip of a frame is consumed in clock t; the bit decision appears at t+1 and
// the word, with rx_valid high for one clock, at t+2. From the clock the
// transmitter takes a word to rx_valid is DATA_W*SF + 2 clocks.
//
// Following the document: per-user PN sequence, despreading, SIPO and
// comparator. This design's own choices: the sync input and the all-bits-
// present rule.
module cdma_rx #(
  parameter int unsigned N_USERS = 4,
  parameter int unsigned SF      = 8,
  parameter int unsigned DATA_W  = 8,
  localparam int unsigned CH_W   = $clog2(N_USERS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [CH_W-1:0]   chan_sum,
  input  logic              chan_sync,
  output logic              rx_valid [N_USERS],
  output logic [DATA_W-1:0] rx_data  [N_USERS]
);
  logic [$clog2(SF)-1:0]     chip_idx;
  logic [$clog2(DATA_W)-1:0] bit_idx;
  logic [N_USERS-1:0]        code;
  logic                      first_chip, last_chip, frame_last;
  logic                      strobe_first, strobe_last;

  pn_code #(.N_USERS(N_USERS), .SF(SF), .BITS(DATA_W)) u_code (
    .clk, .rst,
    .sync       (chan_sync),
    .chip_idx, .bit_idx, .code,
    .first_chip, .last_chip, .frame_last
  );

  // Which bit of the frame the despreaders' next strobe belongs to.
  always_ff @(posedge clk) begin
    if (rst) begin
      strobe_first <= 1'b0;
      strobe_last  <= 1'b0;
    end else begin
      strobe_first <= last_chip && (bit_idx == '0);
      strobe_last  <= frame_last;
    end
  end

  for (genvar u = 0; u < N_USERS; u++) begin : g_user
    logic bit_val, present, strobe, all_present;

    cdma_despreader #(.N_USERS(N_USERS), .SF(SF)) u_desp (
      .clk, .rst,
      .sample     (chan_sum),
      .chip       (code[u]),
      .first_chip,
      .last_chip,
      .bit_out    (bit_val),
      .present,
      .bit_strobe (strobe)
    );

    sipo #(.WIDTH(DATA_W)) u_sipo (
      .clk, .rst,
      .shift (strobe),
      .sin   (bit_val),
      .dout  (rx_data[u])
    );

    always_ff @(posedge clk) begin
      if (rst) begin
        all_present <= 1'b0;
        rx_valid[u] <= 1'b0;
      end else begin
        if (strobe) all_present <= (strobe_first ? 1'b1 : all_present) && present;
        rx_valid[u] <= strobe && strobe_last && (strobe_first || all_present) && present;
      end
    end
  end
endmodule
