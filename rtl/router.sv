// router: one five-port node of the mesh.
//
// Each input channel (core, north, south, east, west) feeds its own
// fifo_buffer. The arbiter scans the FIFOs' data-present flags round-robin,
// grants one FIFO at a time and, in the cycle the popped packet comes out,
// computes its XY route from the destination field and sets the crossbar
// select. The crossbar then connects that FIFO to the chosen output. Only
// one packet crosses the router at a time; the other outputs carry zero.
//
// Timing: a packet that arrives at an empty router whose arbiter is just
// checking that input leaves four cycles after it arrived (input register,
// RAM write, grant, deliver). If the arbiter is busy elsewhere, the wait is
// longer.
//
// Interface: arrays are indexed by noc_pkg::port_e (C, N, S, E, W). `drop`
// reports, per input, a packet lost to a full buffer, or (core input only)
// a packet addressed to this router itself.
//
// Following the original design: five FIFOs, one arbiter, one crossbar,
// their wiring, router address as a parameter (R5 = 0101 by default). This
// design's own choices: the `drop` status outputs and discarding the
// self-addressed packet.
module router
  import noc_pkg::*;
#(
  parameter node_addr_t  CUR_ADDR   = 4'b0101,
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              init,
  input  logic [DATA_W-1:0] di   [NPORTS],   // DIC, DIN, DIS, DIE, DIW
  output logic [DATA_W-1:0] dout [NPORTS],   // DOC, DON, DOS, DOE, DOW
  output logic              drop [NPORTS]
);

  logic              dp        [NPORTS];
  logic              grant     [NPORTS];
  logic [DATA_W-1:0] fifo_out  [NPORTS];
  logic [DATA_W-1:0] xbar_in   [NPORTS];
  node_addr_t        dest      [NPORTS];
  logic              fifo_drop [NPORTS];
  xsel_t             sel;
  logic              uturn;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    fifo_buffer #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk   (clk),
      .init  (init),
      .di    (di[p]),
      .grant (grant[p]),
      .dp    (dp[p]),
      .dout  (fifo_out[p]),
      .drop  (fifo_drop[p])
    );
    assign dest[p]    = fifo_out[p][DEST_LSB +: NODE_W];
    // A packet with no legal output is not passed to the crossbar.
    assign xbar_in[p] = uturn ? '0 : fifo_out[p];
    if (p == PORT_C) begin : g_core
      assign drop[p] = fifo_drop[p] || uturn;
    end else begin : g_link
      assign drop[p] = fifo_drop[p];
    end
  end

  arbiter #(.CUR_ADDR(CUR_ADDR)) u_arbiter (
    .clk   (clk),
    .init  (init),
    .dp    (dp),
    .dest  (dest),
    .grant (grant),
    .sel   (sel),
    .uturn (uturn)
  );

  crossbar #(.DATA_W(DATA_W)) u_crossbar (
    .si   (xbar_in),
    .sel  (sel),
    .dout (dout)
  );

  // The crossbar relies on at most one FIFO presenting a packet per cycle.
  always_comb begin
    int n;
    n = 0;
    for (int p = 0; p < NPORTS; p++) n += (fifo_out[p] != '0) ? 1 : 0;
    if (!init) assert (n <= 1) else $error("router: two FIFOs active at once");
  end

endmodule
