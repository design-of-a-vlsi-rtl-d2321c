// router_tb: self-checking test of the five-port buffered router.
// Every flit carries its source port in bits 7:5 and a sequence number in
// bits 4:0. The reference model keeps one queue per (source, destination)
// pair, with the destination taken from a hand-written select table, and
// checks each delivered flit against it: right port, right order, nothing
// lost or duplicated. Also checked: 2-clock latency through an idle router,
// one grant per clock under full load, back-pressure from a blocked output
// buffer through the input FIFO to in_ready, and reset emptying the buffers.
module router_tb;
  import router_pkg::*;
  logic              clk = 0, rst = 1;
  logic              in_valid  [NPORTS];
  logic              in_ready  [NPORTS];
  logic [DATA_W-1:0] in_data   [NPORTS];
  logic [SEL_W-1:0]  in_sel    [NPORTS];
  logic              out_valid [NPORTS];
  logic              out_ready [NPORTS];
  logic [DATA_W-1:0] out_data  [NPORTS];
  int checks = 0, failures = 0;
  int table_dest [5][4] = '{'{1,2,3,4}, '{2,3,4,0}, '{3,4,0,1}, '{4,0,1,2}, '{0,1,2,3}};
  logic [DATA_W-1:0] exp_q [5][5][$];
  int seq [5];
  int n_sent = 0, n_recv = 0, n_in_full = 0, n_ob_full = 0, n_contend = 0;

  router dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: record accepted flits and check delivered ones at each edge.
  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (in_valid[p] && in_ready[p]) begin
        exp_q[p][table_dest[p][in_sel[p]]].push_back(in_data[p]);
        n_sent++;
      end
      if (out_valid[p] && out_ready[p]) begin
        int s;
        s = int'(out_data[p][7:5]);
        n_recv++;
        if (s > 4 || exp_q[s][p].size() == 0) check(0, "unexpected flit");
        else check(out_data[p] == exp_q[s][p].pop_front(), "flit order/content");
      end
      if (in_valid[p] && !in_ready[p]) n_in_full++;
    end
    if (dut.ob_full != '0) n_ob_full++;
    if ($countones(dut.req) > 1) n_contend++;
  end

  task automatic idle_inputs();
    for (int p = 0; p < NPORTS; p++) begin in_valid[p] = 0; in_data[p] = '0; in_sel[p] = '0; end
  endtask

  function automatic logic [7:0] next_flit(input int p);
    seq[p] = (seq[p] + 1) % 32;
    return {3'(p), 5'(seq[p])};
  endfunction

  initial begin
    int lat, g;
    idle_inputs();
    for (int p = 0; p < NPORTS; p++) begin out_ready[p] = 1; seq[p] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;

    // 1. Latency through an idle router: N input to S output (sel 0).
    @(negedge clk); in_valid[1] = 1; in_data[1] = next_flit(1); in_sel[1] = 0;
    @(negedge clk); in_valid[1] = 0; lat = 1;
    while (!out_valid[2] && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 2, "latency 2 clocks");
    repeat (3) @(negedge clk);

    // 2. Full load: 4 flits at every input at once, one grant per clock.
    g = 0;
    for (int k = 0; k < 4; k++) begin
      if (dut.grant_valid) g++;
      for (int p = 0; p < NPORTS; p++) begin
        in_valid[p] = 1; in_data[p] = next_flit(p); in_sel[p] = SEL_W'(k);
      end
      @(negedge clk);
    end
    idle_inputs();
    for (int t = 0; t < 40; t++) begin
      if (dut.grant_valid) g++;
      @(negedge clk);
    end
    check(dut.in_empty == '1, "all input FIFOs drained");
    check(g == 20, "one grant per clock: 20 grants for 20 flits");
    check(n_recv == n_sent, "all delivered");

    // 3. Back-pressure: block the W output, flood it from C.
    out_ready[4] = 0;
    for (int t = 0; t < 30; t++) begin
      in_valid[0] = 1; in_data[0] = next_flit(0); in_sel[0] = 3;
      @(negedge clk);
    end
    check(!in_ready[0], "input FIFO full behind blocked output");
    check(dut.ob_full[4], "output buffer full");
    idle_inputs();
    out_ready[4] = 1;
    repeat (40) @(negedge clk);

    // 4. Random traffic with random back-pressure.
    for (int t = 0; t < 6000; t++) begin
      for (int p = 0; p < NPORTS; p++) begin
        if (!in_valid[p] || in_ready[p]) begin
          in_valid[p] = ($urandom_range(0, 99) < 35);
          in_data[p]  = in_valid[p] ? next_flit(p) : '0;
          in_sel[p]   = SEL_W'($urandom);
        end
        out_ready[p] = ($urandom_range(0, 99) < 70);
      end
      @(negedge clk);
    end
    idle_inputs();
    for (int p = 0; p < NPORTS; p++) out_ready[p] = 1;
    repeat (60) @(negedge clk);
    check(n_recv == n_sent, "random traffic all delivered");

    // 5. Reset deletes buffered data.
    out_ready[2] = 0;
    in_valid[1] = 1; in_data[1] = next_flit(1); in_sel[1] = 0;
    @(negedge clk); idle_inputs();
    repeat (3) @(negedge clk);
    check(out_valid[2], "flit buffered");
    rst = 1; @(negedge clk); rst = 0;
    for (int s = 0; s < 5; s++) for (int d = 0; d < 5; d++) exp_q[s][d].delete();
    check(!out_valid[2] && dut.in_empty == '1, "reset clears buffers");
    out_ready[2] = 1;

    check(n_in_full > 0 && n_ob_full > 0 && n_contend > 0, "mechanisms exercised");
    $display("sent=%0d recv=%0d grants_in_burst=%0d in_full=%0d ob_full=%0d contention=%0d",
             n_sent, n_recv, g, n_in_full, n_ob_full, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
