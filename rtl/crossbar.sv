// crossbar: connects the granted input port to one output port.
//
// The crossbar is a multiplexer followed by a demultiplexer. The multiplexer
// picks the data and select lines of the input port named by the arbiter's
// grant; the demultiplexer steers that word to the output port chosen by the
// 2-bit select, and raises that port's write strobe. Only one link exists at
// a time. All outputs carry the selected word; only the strobe differs.
// Purely combinational.
//
// Inputs per port are the head flits of the input FIFOs (SC, SN, SS, SE, SW
// in the block diagram); outputs DOC, DON, DOS, DOE, DOW are out_data with
// out_wr. Following the document: 8-bit data, five ports, one link at a time,
// a 2-bit select. This design's own choice: the select is relative to the
// input port (router_pkg::dest_port), giving the four ports other than the
// source.
module crossbar
  import router_pkg::*;
(
  input  logic [DATA_W-1:0] in_data [NPORTS],
  input  logic [SEL_W-1:0]  in_sel  [NPORTS],
  input  logic              grant_valid,
  input  logic [PORT_W-1:0] grant_idx,
  output logic [DATA_W-1:0] out_data [NPORTS],
  output logic [NPORTS-1:0] out_wr,
  output logic [PORT_W-1:0] out_port
);
  logic [DATA_W-1:0] mux_data;
  logic [SEL_W-1:0]  mux_sel;

  // Multiplexer: the granted input.
  always_comb begin
    mux_data = '0;
    mux_sel  = '0;
    for (int unsigned i = 0; i < NPORTS; i++) begin
      if (grant_idx == PORT_W'(i)) begin
        mux_data = in_data[i];
        mux_sel  = in_sel[i];
      end
    end
  end

  // Demultiplexer: to the selected output.
  always_comb begin
    out_port = dest_port(grant_idx, mux_sel);
    for (int unsigned o = 0; o < NPORTS; o++) begin
      out_data[o] = mux_data;
      out_wr[o]   = grant_valid && (out_port == PORT_W'(o));
    end
  end
endmodule
