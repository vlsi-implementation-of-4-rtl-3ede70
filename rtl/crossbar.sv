// crossbar: the router's 5-input, 5-output switch.
//
// Every input (SC, SN, SS, SE, SW: the five FIFO outputs) goes through a
// 1-to-4 demultiplexer to the four outputs other than its own, and every
// output (DOC, DON, DOS, DOE, DOW) is a 4-to-1 multiplexer over the four
// inputs other than its own. All ten share one 2-bit SEL, so each SEL value
// is a fixed permutation of the ports (noc_pkg::sel_target). The router only
// ever has one non-zero input at a time, so in effect one link is made and
// the other outputs carry the zero words of the idle inputs.
//
// The connection table, the shared select and the demux/mux structure follow
// the original design. Purely combinational: outputs follow SEL and the
// inputs in the same cycle.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W = noc_pkg::PKT_W
) (
  input  logic [DATA_W-1:0] si   [NPORTS],  // from FIFOs, indexed by port_e
  input  xsel_t             sel,
  output logic [DATA_W-1:0] dout [NPORTS]   // router outputs, by port_e
);

  // link[i][o]: demultiplexer output of input i towards output o.
  logic [DATA_W-1:0] link [NPORTS][NPORTS];

  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      for (int o = 0; o < NPORTS; o++)
        link[i][o] = (o != i && sel_target(port_e'(i), sel) == port_e'(o))
                     ? si[i] : '0;
  end

  // Output multiplexer: pick the one input that SEL routes to this output.
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      dout[o] = '0;
      for (int i = 0; i < NPORTS; i++)
        if (i != o && sel_target(port_e'(i), sel) == port_e'(o))
          dout[o] = link[i][o];
    end
  end

endmodule
