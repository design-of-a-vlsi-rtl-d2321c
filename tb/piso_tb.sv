// piso_tb: self-checking test of the PISO: load random words and check the
// serial output bit by bit, MSB first, and that load beats shift.
module piso_tb;
  logic clk = 0, rst = 1, load = 0, shift = 0, sout;
  logic [7:0] din = '0;
  int checks = 0, failures = 0;

  piso #(.WIDTH(8)) dut (.*);

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
    @(negedge clk); check(sout == 0, "reset clears");
    for (int n = 0; n < 200; n++) begin
      w = 8'($urandom);
      @(negedge clk); din = w; load = 1; shift = (n % 2 == 1);
      @(negedge clk); load = 0;
      for (int b = 7; b >= 0; b--) begin
        check(sout == w[b], "serial bit");
        shift = 1; @(negedge clk); shift = 0;
        // an idle clock must hold the bit
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
