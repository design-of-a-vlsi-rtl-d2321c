// cdma_tx_tb: self-checking test of the CDMA transmitter.
// Random words, with random users idle, are offered every frame. A reference
// model spreads each taken word with Walsh rows built by Sylvester doubling
// and predicts every channel sample S(i) = sum d(j) XOR C(j,i) over active
// users. Also checked: usr_ready every 64 clocks (8 bits x 8 chips, one
// chip per clock), chan_sync 2 clocks after the hand-over.
module cdma_tx_tb;
  localparam int NU = 4, SF = 8, DW = 8, FRAME = DW * SF;
  logic clk = 0, rst = 1;
  logic usr_valid [NU];
  logic [DW-1:0] usr_data [NU];
  logic usr_ready [NU];
  logic [2:0] chan_sum;
  logic chan_sync;
  int checks = 0, failures = 0;
  int h [SF][SF];
  logic [DW-1:0] pend_w [NU], cur_w [NU];
  bit pend_a [NU], cur_a [NU];
  int idx = -1, last_ready = -1, cyc = 0, frames = 0, multi = 0, idle = 0;

  cdma_tx #(.N_USERS(NU), .SF(SF), .DATA_W(DW)) dut (.*);

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

  // Record the words handed over (sampled after the driver has settled).
  always begin
    @(negedge clk); #2;
    if (!rst && usr_ready[0]) begin
      if (last_ready >= 0) check(cyc - last_ready == FRAME, "ready period");
      last_ready = cyc;
      for (int u = 0; u < NU; u++) begin
        check(usr_ready[u], "all users ready together");
        pend_a[u] = usr_valid[u];
        pend_w[u] = usr_data[u];
      end
    end
  end

  // Check every channel sample.
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (chan_sync) begin
      if (last_ready >= 0) check(cyc - last_ready == 2, "sync 2 clocks after hand-over");
      cur_a = pend_a; cur_w = pend_w; idx = 0; frames++;
      begin
        int n;
        n = 0;
        for (int u = 0; u < NU; u++) n += int'(cur_a[u]);
        if (n > 1) multi++;
        if (n < NU) idle++;
      end
    end
    if (idx >= 0) begin
      int s, b, c;
      s = 0;
      b = idx / SF; c = idx % SF;
      for (int u = 0; u < NU; u++)
        if (cur_a[u]) s += int'(cur_w[u][DW-1-b]) ^ h[u + 1][c];
      check(int'(chan_sum) == s, "channel sum");
      if (int'(chan_sum) != s && failures < 4) $display("idx=%0d got=%0d exp=%0d a=%p w=%p", idx, chan_sum, s, cur_a, cur_w);
      check(chan_sync == (idx == 0), "sync only at frame start");
      idx = (idx + 1) % FRAME;
    end
  end

  initial begin
    int n;
    h[0][0] = 0; n = 1;
    while (n < SF) begin
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c + n] = h[r][c]; h[r + n][c] = h[r][c]; h[r + n][c + n] = 1 - h[r][c];
        end
      n = n * 2;
    end
    for (int u = 0; u < NU; u++) begin usr_valid[u] = 0; usr_data[u] = '0; pend_a[u] = 0; pend_w[u] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (30 * FRAME) begin
      @(negedge clk);
      for (int u = 0; u < NU; u++) begin
        usr_valid[u] = ($urandom_range(0, 99) < 75);
        usr_data[u]  = DW'($urandom);
      end
    end
    check(frames >= 29 && multi > 0 && idle > 0, "frames with several and with idle users");
    $display("frames=%0d multi=%0d idle=%0d", frames, multi, idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
