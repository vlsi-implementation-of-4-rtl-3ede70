// arbiter: the router's control unit - round-robin service of the five
// input FIFOs, XY route computation and crossbar select.
//
// The state machine has, for every port X of C, N, S, E, W, three states:
//   S_X   (check)   - the DP multiplexer shows port X's data-present flag.
//                     If set, go to X_G; if not, go to the next port's check
//                     state (C -> N -> S -> E -> W -> C), one port per cycle.
//   X_G   (grant)   - the grant demultiplexer raises port X's grant for one
//                     cycle; the FIFO pops.
//   X_D   (deliver) - grant is low; the popped packet is on the FIFO output.
//                     The destination multiplexer takes its address field,
//                     XY routing gives the output port and SEL is driven for
//                     the crossbar during this cycle. The state machine then
//                     looks at the other four ports' DP flags in round-robin
//                     order starting after X and jumps to the check state of
//                     the first that has data, or back to S_X if none has.
// So a packet that finds the arbiter in S_X leaves the crossbar two cycles
// later, and back-to-back packets from different ports are three cycles
// apart.
//
// `uturn` is high in a deliver state whose packet would leave through the
// port it came in by. The crossbar has no such connection; the router
// discards that packet. With XY routing this only happens to a core sending
// to its own node.
//
// Following the original design: the 15 states and their outputs, the check
// order after a deliver state as given for SC_D, the jump back to SC, the
// one-cycle delay before the destination is read, XY routing, router
// address 0101 (R5) as default. This design's own choices: the rotation of
// the post-deliver check for the other four deliver states, SEL = 0 outside
// deliver states, `uturn`, synchronous active-high reset `init` into SC.
module arbiter
  import noc_pkg::*;
#(
  parameter node_addr_t CUR_ADDR = 4'b0101
) (
  input  logic       clk,
  input  logic       init,
  input  logic       dp    [NPORTS],   // data-present flags DC..DW
  input  node_addr_t dest  [NPORTS],   // destination fields of FIFO outputs
  output logic       grant [NPORTS],   // GC..GW
  output xsel_t      sel,              // crossbar select
  output logic       uturn             // packet has no legal output
);

  typedef enum logic [1:0] {PH_CHECK, PH_GRANT, PH_DELIVER} phase_e;

  typedef struct packed {
    phase_e phase;
    port_e  port;    // the State_Sel signal
  } state_t;

  state_t     state, state_n;
  logic       dp_mux;
  node_addr_t dest_mux;
  port_e      out_port;

  // DP and Dest multiplexers, driven by State_Sel.
  assign dp_mux   = dp[state.port];
  assign dest_mux = dest[state.port];
  assign out_port = xy_route(CUR_ADDR, dest_mux);

  always_comb begin
    state_n = state;
    unique case (state.phase)
      PH_CHECK:
        if (dp_mux) state_n.phase = PH_GRANT;
        else        state_n.port  = next_port(state.port);
      PH_GRANT:
        state_n.phase = PH_DELIVER;
      default: begin  // PH_DELIVER
        port_e p;
        state_n.phase = PH_CHECK;
        state_n.port  = state.port;
        p = state.port;
        for (int k = 0; k < NPORTS - 1; k++) begin
          p = next_port(p);
          if (dp[p]) begin
            state_n.port = p;
            break;
          end
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (init) state <= '{phase: PH_CHECK, port: PORT_C};
    else      state <= state_n;
  end

  // Grant demultiplexer.
  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      grant[i] = (state.phase == PH_GRANT) && (state.port == port_e'(i));
  end

  // Handshake rule: at most one FIFO is granted in any cycle.
  always_comb begin
    int unsigned n_grant;
    n_grant = 0;
    for (int i = 0; i < NPORTS; i++) n_grant += grant[i] ? 1 : 0;
    if (!init) assert (n_grant <= 1) else $error("arbiter: more than one grant");
  end

  always_comb begin
    sel   = '0;
    uturn = 1'b0;
    if (state.phase == PH_DELIVER) begin
      sel   = sel_code(state.port, out_port);
      uturn = (out_port == state.port);
    end
  end

endmodule
