// rr_arbiter_tb: self-checking test of the round-robin arbiter.
// A reference pointer model predicts every grant for random request
// patterns; a fairness check confirms that with all five ports requesting
// the grants rotate 0,1,2,3,4,0,...
module rr_arbiter_tb;
  localparam int N = 5;
  logic clk = 0, rst = 1;
  logic [N-1:0] req = '0, grant;
  logic [2:0] grant_idx;
  logic grant_valid;
  int checks = 0, failures = 0;
  int ptr = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int expected(input logic [N-1:0] r, input int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (2) @(posedge clk);
    rst <= 0;
    // Fairness with all requesting.
    for (int t = 0; t < 15; t++) begin
      @(negedge clk); req = '1;
      #1 check(grant_valid && grant_idx == 3'(t % N) && grant == (N'(1) << (t % N)), "rotation");
      @(posedge clk); ptr = (t % N + 1) % N;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk); req = N'($urandom);
      #1 e = expected(req, ptr);
      if (e < 0) check(!grant_valid && grant == '0, "no grant");
      else check(grant_valid && int'(grant_idx) == e && grant == (N'(1) << e), "grant");
      @(posedge clk);
      if (e >= 0) ptr = (e + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
