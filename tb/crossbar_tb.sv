// crossbar_tb: self-checking test of the crossbar.
// For every granted input and every select value the word must reach
// exactly the output port listed in the table below (the four ports other
// than the source, in cyclic order), and no port may be written without a
// grant.
module crossbar_tb;
  import router_pkg::*;
  logic [DATA_W-1:0] in_data [NPORTS];
  logic [SEL_W-1:0]  in_sel  [NPORTS];
  logic              grant_valid;
  logic [PORT_W-1:0] grant_idx;
  logic [DATA_W-1:0] out_data [NPORTS];
  logic [NPORTS-1:0] out_wr;
  logic [PORT_W-1:0] out_port;
  int checks = 0, failures = 0;
  // Destination table [src][sel], written out by hand (C=0,N=1,S=2,E=3,W=4).
  int table_dest [5][4] = '{'{1,2,3,4}, '{2,3,4,0}, '{3,4,0,1}, '{4,0,1,2}, '{0,1,2,3}};

  crossbar dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      for (int p = 0; p < NPORTS; p++) begin
        in_data[p] = DATA_W'($urandom);
        in_sel[p]  = SEL_W'($urandom);
      end
      grant_valid = 0; grant_idx = PORT_W'($urandom_range(0, 4));
      #1 check(out_wr == '0, "no write without grant");
      for (int s = 0; s < NPORTS; s++) begin
        grant_valid = 1; grant_idx = PORT_W'(s);
        #1;
        for (int o = 0; o < NPORTS; o++) begin
          check(out_wr[o] == (o == table_dest[s][in_sel[s]]), "write strobe");
          if (out_wr[o]) check(out_data[o] == in_data[s], "data routed");
        end
        check(!out_wr[s], "no U-turn");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
