// mesh4x4: the 4x4 mesh network-on-chip.
//
// Sixteen identical routers R0..R15 sit in a grid, node n at column n%4 and
// row n/4, with R0 at the bottom-left. Each router has a core channel pair
// (c_in[n], c_out[n]) and is joined to each neighbour by two unidirectional
// DATA_W-bit channels: its north output feeds the south input of the router
// above, its east output the west input of the router to the right, and so
// on. Inputs on the mesh's outer edges are tied to zero (an idle channel),
// and outputs there are left open; XY routing never sends a packet to them.
//
// A core sends a packet by driving one word with bit 15 set and the
// destination node number in bits [3:0] onto c_in for one cycle; outside
// that cycle it drives zero. The packet appears on the destination's c_out
// for exactly one cycle; c_out is zero otherwise. Each hop takes at least
// four cycles. There is no back-pressure: a packet meeting a full buffer is
// lost. Each router's `drop` flags (router.drop) mark such losses; they are
// kept inside the mesh (rdrop) so that the mesh's pins stay exactly the
// 16 + 16 core channels plus clock and init.
//
// Following the original design: topology, homogeneous routers, zero input
// on unused edge ports, 16-bit channels, the pin list.
module mesh4x4
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              init,
  input  logic [DATA_W-1:0] c_in  [16],
  output logic [DATA_W-1:0] c_out [16]
);

  localparam int unsigned DIM = 4;

  logic [DATA_W-1:0] rin  [16][NPORTS];
  logic [DATA_W-1:0] rout [16][NPORTS];
  logic              rdrop[16][NPORTS];   // per-router loss flags, for observation

  for (genvar n = 0; n < 16; n++) begin : g_node
    localparam int unsigned X = n % DIM;
    localparam int unsigned Y = n / DIM;

    assign rin[n][PORT_C] = c_in[n];
    assign c_out[n]       = rout[n][PORT_C];

    // A router's north input is the south output of the router above it.
    if (Y < DIM - 1) begin : g_n
      assign rin[n][PORT_N] = rout[n + DIM][PORT_S];
    end else begin : g_n_edge
      assign rin[n][PORT_N] = '0;
    end
    if (Y > 0) begin : g_s
      assign rin[n][PORT_S] = rout[n - DIM][PORT_N];
    end else begin : g_s_edge
      assign rin[n][PORT_S] = '0;
    end
    if (X < DIM - 1) begin : g_e
      assign rin[n][PORT_E] = rout[n + 1][PORT_W];
    end else begin : g_e_edge
      assign rin[n][PORT_E] = '0;
    end
    if (X > 0) begin : g_w
      assign rin[n][PORT_W] = rout[n - 1][PORT_E];
    end else begin : g_w_edge
      assign rin[n][PORT_W] = '0;
    end

    router #(
      .CUR_ADDR   (node_addr_t'(n)),
      .DATA_W     (DATA_W),
      .FIFO_DEPTH (FIFO_DEPTH)
    ) u_router (
      .clk  (clk),
      .init (init),
      .di   (rin[n]),
      .dout (rout[n]),
      .drop (rdrop[n])
    );
  end

endmodule
