// fifo_buffer: one input buffer of the router (one per port).
//
// A circular queue of DEPTH packets held in a single-port RAM, built from the
// four parts of the original design:
//   Input Logic   - a word whose header flag (MSB) is set is a push. It is
//                   latched into the DIRAM register (an idle word latches
//                   as zero).
//   Control Logic - write and read pointers plus the LASTOP flag (1 = last
//                   pointer move was a write) tell full from empty when the
//                   pointers are equal. A grant while not empty is a pop and
//                   reads the RAM. Otherwise a waiting word is written. Pop
//                   has priority over the write, because the RAM has one port.
//   RAM           - fifo_ram.
//   Output Logic  - `dp` (data present) is the inverse of empty. In the cycle
//                   after a pop, `dout` carries the popped word; at all other
//                   times it is zero, so an idle channel reads as zero.
//
// A word in DIRAM that cannot be written (a pop has the RAM, or the queue is
// full) moves to a one-word hold register and is written from there as soon
// as the RAM is free; the hold register is always written before DIRAM. If
// the hold register is still occupied when DIRAM has another word that cannot
// be written, that word is lost: `nopush` is high and `drop` pulses.
//
// Timing: a word on `di` in cycle t is in DIRAM in t+1 and written at the end
// of t+1 if nothing delays it, so `dp` rises in t+2. A grant in cycle g gives
// `dout` in g+1.
//
// Following the original design: the four-part structure, pointer/LASTOP
// logic, pop priority, header flag as push, zero output when idle, 16-bit
// words and 16 entries. This design's own choices: the hold register (so a
// push that meets a pop is delayed rather than lost), dropping and reporting
// a packet only when both DIRAM and the hold register are blocked, and
// synchronous active-high reset `init`. With the hold register the buffer
// can hold DEPTH+1 packets.
module fifo_buffer #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 16,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              init,
  input  logic [DATA_W-1:0] di,     // incoming channel word
  input  logic              grant,  // from the arbiter
  output logic              dp,     // data present
  output logic [DATA_W-1:0] dout,   // popped word, zero otherwise
  output logic              drop    // an incoming packet was lost
);

  // ---- Control Logic state
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          lastop;             // 1 = write, 0 = read
  logic          empty, full;
  logic          pop, wr_en, pop_d, nopush;

  // ---- Input Logic state
  logic [DATA_W-1:0] diram, held, wr_data;
  logic              diram_v, held_v;

  logic [DATA_W-1:0] doram;

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == LAST) ? '0 : p + AW'(1);
  endfunction

  assign empty   = (wr_ptr == rd_ptr) && !lastop;
  assign full    = (wr_ptr == rd_ptr) &&  lastop;
  assign pop     = grant && !empty;
  assign wr_en   = !pop && !full && (held_v || diram_v);
  assign wr_data = held_v ? held : diram;
  assign nopush  = held_v && !wr_en;
  assign drop    = diram_v && nopush;

  // Input Logic: latch a packet into DIRAM, all zeros otherwise.
  always_ff @(posedge clk) begin
    if (init) begin
      diram   <= '0;
      diram_v <= 1'b0;
    end else begin
      diram   <= di[DATA_W-1] ? di : '0;
      diram_v <= di[DATA_W-1];
    end
  end

  // Hold register for a word the RAM could not take.
  always_ff @(posedge clk) begin
    if (init) begin
      held   <= '0;
      held_v <= 1'b0;
    end else if (held_v) begin
      if (wr_en) begin             // held word written; DIRAM waits here
        held   <= diram;
        held_v <= diram_v;
      end
    end else if (diram_v && !wr_en) begin
      held   <= diram;
      held_v <= 1'b1;
    end
  end

  // Control Logic: pointers and LASTOP.
  always_ff @(posedge clk) begin
    if (init) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      lastop <= 1'b0;
      pop_d  <= 1'b0;
    end else begin
      pop_d <= pop;
      if (pop) begin
        rd_ptr <= incr(rd_ptr);
        lastop <= 1'b0;
      end else if (wr_en) begin
        wr_ptr <= incr(wr_ptr);
        lastop <= 1'b1;
      end
    end
  end

  fifo_ram #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_ram (
    .clk   (clk),
    .en    (pop || wr_en),
    .rw    (!pop),
    .addr  (pop ? rd_ptr : wr_ptr),
    .diram (wr_data),
    .doram (doram)
  );

  // Output Logic
  assign dp   = !empty;
  assign dout = pop_d ? doram : '0;

  initial assert (DEPTH >= 2) else $error("fifo_buffer: DEPTH must be >= 2");

  // The RAM is never written while full nor read while empty.
  assert property (@(posedge clk) disable iff (init) !(wr_en && full));
  assert property (@(posedge clk) disable iff (init) !(pop && empty));

endmodule
