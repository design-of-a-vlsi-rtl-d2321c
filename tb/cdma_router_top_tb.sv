// cdma_router_top_tb: end-to-end test of the buffered router with its CDMA
// link, at the default sizes.
//
// Flits carry their source port in bits 7:5 and a sequence number in bits
// 4:0. A reference model keeps one queue per (source, destination) pair,
// using a hand-written select table, and checks every word leaving the
// local port and every word the CDMA receiver recovers for N, S, E and W:
// right port, right order, nothing lost. The CDMA link must deliver a word
// exactly 67 clocks after the transmitter takes it (64-clock frame plus three
// register stages: one in the transmitter, two in the receiver).
//
// Phases: (1) the data pattern 1010_1110 is sent from N to the local port
// and must appear 2 clocks later; (2) several users share one CDMA frame;
// (3) random traffic with local back-pressure, filling the output buffers
// and the input FIFOs; (4) reset while data is buffered deletes it.
// The testbench counts how often each mechanism occurred and fails if one
// never did.
module cdma_router_top_tb;
  import router_pkg::*;
  localparam int NU = NPORTS - 1;
  localparam int FRAME = 64;
  logic              clk = 0, rst = 1;
  logic              in_valid [NPORTS];
  logic              in_ready [NPORTS];
  logic [DATA_W-1:0] in_data  [NPORTS];
  logic [SEL_W-1:0]  in_sel   [NPORTS];
  logic              local_valid, local_ready;
  logic [DATA_W-1:0] local_data;
  logic [2:0]        chan_sum;
  logic              chan_sync;
  logic              rx_valid [NU];
  logic [DATA_W-1:0] rx_data  [NU];

  int checks = 0, failures = 0;
  int table_dest [5][4] = '{'{1,2,3,4}, '{2,3,4,0}, '{3,4,0,1}, '{4,0,1,2}, '{0,1,2,3}};
  logic [DATA_W-1:0] exp_q [5][5][$];
  int handover [NU][$];
  int seq [5];
  int cyc = 0;
  bit scoreboard = 0;
  int n_sent = 0, n_recv = 0;
  // mechanism counters
  int n_in_full = 0, n_ob_full = 0, n_contend = 0, n_multi_user = 0, n_idle_user = 0;
  int n_local_stall = 0, n_reset_clear = 0, n_pattern = 0;

  cdma_router_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  // Scoreboard, sampled each clock after the driver has settled.
  always begin
    @(negedge clk); #1;
    if (!rst) begin
      int ntx;
      ntx = 0;
      for (int p = 0; p < NPORTS; p++)
        if (in_valid[p] && !in_ready[p]) n_in_full++;
      if (dut.u_router.ob_full != '0) n_ob_full++;
      if ($countones(dut.u_router.req) > 1) n_contend++;
      if (local_valid && !local_ready) n_local_stall++;
      for (int u = 0; u < NU; u++)
        if (dut.u_tx.usr_ready[u]) begin
          if (dut.u_tx.usr_valid[u]) begin handover[u].push_back(cyc); ntx++; end
          else if (scoreboard) n_idle_user++;
        end
      if (ntx > 1) n_multi_user++;
      if (scoreboard) begin
        for (int p = 0; p < NPORTS; p++)
          if (in_valid[p] && in_ready[p]) begin
            exp_q[p][table_dest[p][in_sel[p]]].push_back(in_data[p]);
            n_sent++;
          end
        if (local_valid && local_ready) begin
          int s;
          s = int'(local_data[7:5]);
          n_recv++;
          if (s > 4 || exp_q[s][0].size() == 0) check(0, "unexpected local word");
          else check(local_data == exp_q[s][0].pop_front(), "local word");
        end
        for (int u = 0; u < NU; u++)
          if (rx_valid[u]) begin
            int s;
            s = int'(rx_data[u][7:5]);
            n_recv++;
            if (s > 4 || exp_q[s][u + 1].size() == 0) check(0, "unexpected CDMA word");
            else check(rx_data[u] == exp_q[s][u + 1].pop_front(), "CDMA word");
            if (handover[u].size() == 0) check(0, "CDMA word without hand-over");
            else begin
              int h0;
              h0 = handover[u].pop_front();
              check(cyc - h0 == FRAME + 3, "CDMA latency 67 clocks");
              if (cyc - h0 != FRAME + 3 && failures < 3) $display("u=%0d lat=%0d q=%0d", u, cyc - h0, handover[u].size());
            end
          end
      end
    end
  end

  task automatic idle_inputs();
    for (int p = 0; p < NPORTS; p++) begin in_valid[p] = 0; in_data[p] = '0; in_sel[p] = '0; end
  endtask

  function automatic logic [7:0] next_flit(input int p);
    seq[p] = (seq[p] + 1) % 32;
    return {3'(p), 5'(seq[p])};
  endfunction

  initial begin
    int lat;
    idle_inputs();
    local_ready = 1;
    for (int p = 0; p < NPORTS; p++) seq[p] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);

    // (1) Data pattern from N to the local port (sel 3 from N reaches C).
    in_valid[1] = 1; in_data[1] = 8'b1010_1110; in_sel[1] = 3;
    @(negedge clk); idle_inputs(); lat = 1;
    while (!local_valid && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 2 && local_data == 8'b1010_1110, "pattern through router in 2 clocks");
    if (lat == 2) n_pattern++;
    @(negedge clk);
    check(!local_valid, "pattern delivered once");
    repeat (4) @(negedge clk);

    scoreboard = 1;
    // (2) One flit for each neighbour port at once, from C (sels 0..3).
    for (int k = 0; k < 4; k++) begin
      in_valid[0] = 1; in_data[0] = next_flit(0); in_sel[0] = SEL_W'(k);
      @(negedge clk);
    end
    idle_inputs();
    repeat (3 * FRAME) @(negedge clk);
    check(n_recv == n_sent, "four neighbour words delivered");

    // (3) Random traffic: heavy bursts, then light load to drain.
    for (int t = 0; t < 12000; t++) begin
      int rate;
      rate = ((t / 1500) % 2 == 0) ? 30 : 2;
      for (int p = 0; p < NPORTS; p++) begin
        if (!in_valid[p] || in_ready[p]) begin
          in_valid[p] = ($urandom_range(0, 99) < rate);
          in_data[p]  = in_valid[p] ? next_flit(p) : '0;
          in_sel[p]   = SEL_W'($urandom);
        end
      end
      local_ready = ($urandom_range(0, 99) < 60);
      @(negedge clk);
    end
    idle_inputs();
    local_ready = 1;
    while (dut.u_router.ob_empty != '1 || dut.u_router.in_empty != '1) @(negedge clk);
    repeat (2 * FRAME + 4) @(negedge clk);
    check(n_recv == n_sent, "random traffic all delivered");
    for (int s = 0; s < 5; s++) for (int d = 0; d < 5; d++) check(exp_q[s][d].size() == 0, "queue empty");

    // (4) Reset while data is buffered.
    scoreboard = 0;
    local_ready = 0;
    for (int k = 0; k < 3; k++) begin
      in_valid[1] = 1; in_data[1] = next_flit(1); in_sel[1] = 3;
      @(negedge clk);
    end
    idle_inputs();
    repeat (3) @(negedge clk);
    check(local_valid, "data buffered before reset");
    rst = 1; @(negedge clk); rst = 0; #1;
    check(!local_valid && dut.u_router.in_empty == '1, "reset deletes buffered data");
    if (!local_valid) n_reset_clear++;
    local_ready = 1;
    repeat (3 * FRAME) @(negedge clk);
    for (int u = 0; u < NU; u++) check(!rx_valid[u], "nothing after reset");

    $display("sent=%0d recv=%0d in_full=%0d ob_full=%0d contention=%0d multi_user_frames=%0d idle_user_slots=%0d local_stall=%0d reset_clear=%0d pattern=%0d",
             n_sent, n_recv, n_in_full, n_ob_full, n_contend, n_multi_user, n_idle_user,
             n_local_stall, n_reset_clear, n_pattern);
    check(n_in_full > 0, "input FIFO full occurred");
    check(n_ob_full > 0, "output buffer full occurred");
    check(n_contend > 0, "arbiter contention occurred");
    check(n_multi_user > 0, "shared CDMA frame occurred");
    check(n_idle_user > 0, "idle CDMA user occurred");
    check(n_local_stall > 0, "local back-pressure occurred");
    check(n_reset_clear > 0, "reset clear occurred");
    check(n_pattern > 0, "pattern transfer occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
