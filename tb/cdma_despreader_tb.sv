// cdma_despreader_tb: self-checking test of the zero/one accumulator
// decoder. Four decoders, one per Walsh row 1..4, listen to a channel the
// testbench builds itself from random bits of four users, some of them idle.
// Each decoder must recover its own user's bit, report an idle user as not
// present, and give its strobe one clock after the last chip of each bit.
module cdma_despreader_tb;
  localparam int NU = 4, SF = 8;
  logic clk = 0, rst = 1;
  logic [2:0] sample = '0;
  logic first_chip = 0, last_chip = 0;
  logic [NU-1:0] chip = '0, bit_out, present, bit_strobe;
  int checks = 0, failures = 0, n_idle = 0;
  int h [SF][SF];

  for (genvar u = 0; u < NU; u++) begin : g_dut
    cdma_despreader #(.N_USERS(NU), .SF(SF)) dut (
      .clk, .rst, .sample, .chip(chip[u]), .first_chip, .last_chip,
      .bit_out(bit_out[u]), .present(present[u]), .bit_strobe(bit_strobe[u]));
  end

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
    int n, s;
    bit d [NU], a [NU];
    h[0][0] = 0; n = 1;
    while (n < SF) begin
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c + n] = h[r][c]; h[r + n][c] = h[r][c]; h[r + n][c + n] = 1 - h[r][c];
        end
      n = n * 2;
    end
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int b = 0; b < 1000; b++) begin
      for (int u = 0; u < NU; u++) begin
        d[u] = 1'($urandom);
        a[u] = ($urandom_range(0, 99) < 80);
        if (!a[u]) n_idle++;
      end
      for (int c = 0; c < SF; c++) begin
        s = 0;
        for (int u = 0; u < NU; u++) if (a[u]) s += int'(d[u]) ^ h[u + 1][c];
        sample = 3'(s);
        first_chip = (c == 0); last_chip = (c == SF - 1);
        for (int u = 0; u < NU; u++) chip[u] = 1'(h[u + 1][c]);
        @(negedge clk);
        check(bit_strobe == ((c == SF - 1) ? '1 : '0), "strobe timing");
      end
      for (int u = 0; u < NU; u++) begin
        check(present[u] == a[u], "presence");
        if (a[u]) check(bit_out[u] == d[u], "decoded bit");
      end
    end
    check(n_idle > 0, "idle users seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
