// cdma_rx_tb: self-checking test of the CDMA receiver.
// The testbench plays the transmitter: after a random idle gap it sends
// frames of 64 chips (8 bits x 8 chips) with chan_sync on the first chip,
// four users spread with Walsh rows 1..4 and some users idle per frame. Each
// user's word must come out once, with rx_valid for one clock, 2 clocks
// after the frame's last chip; idle users must deliver nothing.
module cdma_rx_tb;
  localparam int NU = 4, SF = 8, DW = 8, FRAME = DW * SF;
  logic clk = 0, rst = 1;
  logic [2:0] chan_sum = '0;
  logic chan_sync = 0;
  logic rx_valid [NU];
  logic [DW-1:0] rx_data [NU];
  int checks = 0, failures = 0, n_words = 0, n_idle = 0;
  int h [SF][SF];

  cdma_rx #(.N_USERS(NU), .SF(SF), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [DW-1:0] w; int due; } exp_t;
  exp_t exp_q [NU][$];
  int cyc = 0;

  always @(posedge clk) cyc++;

  // Compare every clock, after the driver has settled.
  always begin
    @(negedge clk); #1;
    for (int u = 0; u < NU; u++) begin
      if (rx_valid[u]) begin
        if (exp_q[u].size() == 0) check(0, "unexpected word");
        else begin
          exp_t e;
          e = exp_q[u].pop_front();
          check(e.due == cyc, "word latency: 2 clocks after last chip");
          check(rx_data[u] == e.w, "word data");
          n_words++;
        end
      end else if (exp_q[u].size() > 0 && exp_q[u][0].due < cyc) begin
        check(0, "word missing");
        void'(exp_q[u].pop_front());
      end
    end
  end

  initial begin
    int n, s, b, c;
    logic [DW-1:0] w [NU];
    bit a [NU];
    h[0][0] = 0; n = 1;
    while (n < SF) begin
      for (int r = 0; r < n; r++)
        for (int cc = 0; cc < n; cc++) begin
          h[r][cc + n] = h[r][cc]; h[r + n][cc] = h[r][cc]; h[r + n][cc + n] = 1 - h[r][cc];
        end
      n = n * 2;
    end
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat ($urandom_range(3, 40)) @(negedge clk);   // receiver not yet aligned
    for (int f = 0; f < 40; f++) begin
      for (int u = 0; u < NU; u++) begin
        w[u] = DW'($urandom);
        a[u] = ($urandom_range(0, 99) < 75);
        if (!a[u]) n_idle++;
      end
      for (int i = 0; i < FRAME; i++) begin
        b = i / SF; c = i % SF;
        s = 0;
        for (int u = 0; u < NU; u++) if (a[u]) s += int'(w[u][DW-1-b]) ^ h[u + 1][c];
        chan_sum = 3'(s); chan_sync = (i == 0);
        if (i == FRAME - 1)
          for (int u = 0; u < NU; u++) if (a[u]) exp_q[u].push_back('{w: w[u], due: cyc + 2});
        @(negedge clk);
      end
      // An occasional idle gap between frames.
      if (f % 7 == 3) begin
        chan_sum = '0; chan_sync = 0;
        repeat ($urandom_range(1, 20)) @(negedge clk);
      end
    end
    chan_sum = '0; chan_sync = 0;
    repeat (FRAME + 10) @(negedge clk);
    for (int u = 0; u < NU; u++) check(exp_q[u].size() == 0, "all words delivered");
    check(n_words > 80 && n_idle > 0, "words and idle users seen");
    $display("words=%0d idle=%0d", n_words, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
