// fifo_tb: self-checking test of the router's FIFO buffer.
// Random writes and reads are compared against a queue model; the full and
// empty flags, the count, the one-cycle write-to-read latency and the
// clearing of data by reset are checked.
module fifo_tb;
  localparam int W = 8, D = 8;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] q[$];

  fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(empty && !full && count == 0, "empty after reset");
    // Latency: a word written now is visible next cycle.
    wr_en <= 1; wr_data <= 8'hA5;
    @(posedge clk); wr_en <= 0;
    #1 check(!empty && rd_data == 8'hA5, "write-to-read latency 1");
    rd_en <= 1; @(posedge clk); rd_en <= 0;
    #1 check(empty, "empty after pop");
    // Random traffic.
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(rd_data == q[0], "head data");
      if (full) n_full++;
      wr_en   = ($urandom_range(0, 99) < (t < 2000 ? 70 : 30));
      rd_en   = ($urandom_range(0, 99) < (t < 2000 ? 40 : 70));
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && !full) q.push_back(wr_data);
    end
    check(n_full > 0, "full condition reached");
    // Reset deletes the contents.
    @(negedge clk); wr_en = 1; rd_en = 0; wr_data = 8'h11;
    @(negedge clk); wr_en = 0; rst = 1;
    @(negedge clk); rst = 0;
    check(empty && count == 0, "reset clears data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
