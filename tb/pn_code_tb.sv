// pn_code_tb: self-checking test of the spreading-code sequencer.
// Builds the order-8 Hadamard matrix by Sylvester doubling, compares each
// user's chips with rows 1..4, checks the codes are balanced and orthogonal,
// checks the chip/bit counters and frame marks, and checks that sync
// restarts the sequence.
module pn_code_tb;
  localparam int NU = 4, SF = 8, B = 8;
  logic clk = 0, rst = 1, sync = 0;
  logic [2:0] chip_idx, bit_idx;
  logic [NU-1:0] code;
  logic first_chip, last_chip, frame_last;
  int checks = 0, failures = 0;
  int h [SF][SF];

  pn_code #(.N_USERS(NU), .SF(SF), .BITS(B)) dut (.*);

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

  initial begin
    int n, dot, ones;
    // Sylvester construction, 0 for +1 and 1 for -1.
    h[0][0] = 0; n = 1;
    while (n < SF) begin
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c + n]     = h[r][c];
          h[r + n][c]     = h[r][c];
          h[r + n][c + n] = 1 - h[r][c];
        end
      n = n * 2;
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 3; f++)
      for (int b = 0; b < B; b++)
        for (int c = 0; c < SF; c++) begin
          @(negedge clk);
          check(int'(chip_idx) == c && int'(bit_idx) == b, "counters");
          check(first_chip == (c == 0) && last_chip == (c == SF - 1), "bit marks");
          check(frame_last == (c == SF - 1 && b == B - 1), "frame mark");
          for (int u = 0; u < NU; u++) check(code[u] == h[u + 1][c], "code chip");
        end
    // Balance and orthogonality of the rows in use.
    for (int u = 0; u < NU; u++) begin
      ones = 0;
      for (int c = 0; c < SF; c++) ones += h[u + 1][c];
      check(ones == SF / 2, "balanced");
      for (int v = u + 1; v < NU; v++) begin
        dot = 0;
        for (int c = 0; c < SF; c++) dot += (h[u + 1][c] == h[v + 1][c]) ? 1 : -1;
        check(dot == 0, "orthogonal");
      end
    end
    // Sync in mid-sequence restarts at chip 0 bit 0.
    repeat (13) @(negedge clk);
    sync = 1; #1 check(chip_idx == 0 && bit_idx == 0, "sync now");
    @(negedge clk); sync = 0;
    #1 check(chip_idx == 1 && bit_idx == 0, "after sync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
