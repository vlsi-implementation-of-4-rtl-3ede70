// noc_pkg: types, constants and the two routing tables shared by the
// 4x4 mesh network-on-chip.
//
// A packet is one 16-bit word. Bit 15 is the header flag: a word with that
// bit set is a packet, a word with it clear is an idle channel. The
// destination node number sits in the low four bits of the word, column in
// [1:0] and row in [3:2], so node n is at column n%4, row n/4 (R0 at the
// bottom-left, R3 bottom-right, R12 top-left). The remaining bits are
// payload. The word width, the header bit and the 4-bit node address follow
// the original design; the position of the destination field is this
// design's own choice.
//
// xy_route() is the XY routing rule (column first, then row), and
// sel_code()/sel_target() are the two directions of the crossbar's fixed
// connection table: one 2-bit select value connects every input port to a
// different output port at the same time.
package noc_pkg;

  localparam int unsigned PKT_W    = 16;  // channel / packet width
  localparam int unsigned NPORTS   = 5;   // core + four directions
  localparam int unsigned NODE_W   = 4;   // node address width
  localparam int unsigned DEST_LSB = 0;   // destination field position

  typedef logic [NODE_W-1:0] node_addr_t;
  typedef logic [1:0]        xsel_t;      // crossbar select

  // Port numbering used for every 5-element array in the design.
  typedef enum logic [2:0] {
    PORT_C = 3'd0,  // local core
    PORT_N = 3'd1,  // towards row+1
    PORT_S = 3'd2,  // towards row-1
    PORT_E = 3'd3,  // towards column+1
    PORT_W = 3'd4   // towards column-1
  } port_e;

  // Next port in the round-robin order C, N, S, E, W, C, ...
  function automatic port_e next_port(port_e p);
    return (p == PORT_W) ? PORT_C : port_e'(p + 3'd1);
  endfunction

  // XY routing: correct the column first, then the row.
  function automatic port_e xy_route(node_addr_t cur, node_addr_t dest);
    if (dest[1:0] < cur[1:0])      return PORT_W;
    else if (dest[1:0] > cur[1:0]) return PORT_E;
    else if (dest[3:2] < cur[3:2]) return PORT_S;
    else if (dest[3:2] > cur[3:2]) return PORT_N;
    else                           return PORT_C;
  endfunction

  // Crossbar table: output port reached from input port `in` under `sel`.
  function automatic port_e sel_target(port_e in, xsel_t sel);
    unique case (in)
      PORT_C:  case (sel) 2'd0: return PORT_N; 2'd1: return PORT_W;
                          2'd2: return PORT_E; default: return PORT_S; endcase
      PORT_N:  case (sel) 2'd0: return PORT_W; 2'd1: return PORT_E;
                          2'd2: return PORT_S; default: return PORT_C; endcase
      PORT_S:  case (sel) 2'd0: return PORT_C; 2'd1: return PORT_N;
                          2'd2: return PORT_W; default: return PORT_E; endcase
      PORT_E:  case (sel) 2'd0: return PORT_S; 2'd1: return PORT_C;
                          2'd2: return PORT_N; default: return PORT_W; endcase
      default: case (sel) 2'd0: return PORT_E; 2'd1: return PORT_S;
                          2'd2: return PORT_C; default: return PORT_N; endcase
    endcase
  endfunction

  // Inverse of sel_target(): select value joining `in` to `out`. An input is
  // never joined to its own output; that case returns 0 and is flagged by
  // the caller.
  function automatic xsel_t sel_code(port_e in, port_e out);
    for (int s = 0; s < 4; s++)
      if (sel_target(in, xsel_t'(s)) == out) return xsel_t'(s);
    return '0;
  endfunction

endpackage
