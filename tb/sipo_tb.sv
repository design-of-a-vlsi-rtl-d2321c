// sipo_tb: self-checking test of the SIPO: shift in random words MSB first,
// with idle clocks between bits, and compare the assembled word.
module sipo_tb;
  logic clk = 0, rst = 1, shift = 0, sin = 0;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  sipo #(.WIDTH(8)) dut (.*);

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
    logic [7:0] w;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk); check(dout == 0, "reset clears");
    for (int n = 0; n < 200; n++) begin
      w = 8'($urandom);
      for (int b = 7; b >= 0; b--) begin
        @(negedge clk); sin = w[b]; shift = 1;
        @(negedge clk); shift = 0; sin = ~w[b];
      end
      check(dout == w, "word assembled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
