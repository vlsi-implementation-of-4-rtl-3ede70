// tb_mesh4x4: end-to-end test of the 4x4 mesh at its default parameters.
//
// Packets carry a unique sequence number in bits [14:4] and the destination
// node in [3:0]. The test records every packet it injects and checks that
// each word leaving a core port is one that was sent to that core, delivered
// once. Latency is the cycle count from injection to delivery. A router hop
// costs 4 cycles when the arbiter is ready and at most 4 more while it scans
// the other ports, so a packet crossing R routers on an otherwise idle
// network must take between 4R and 8R cycles.
//  1. Core 0 to core 15 alone (the longest path, 7 routers).
//  2. Every source to every other destination, one packet at a time.
//  3. All sixteen cores inject one packet in the same cycle: 0->15, 5->2,
//     10->9 and 15->0, the others core i to core 15-i; every packet arrives,
//     none is dropped; the worst latency is reported and must stay within
//     the 0->15 path's idle bound (56 cycles).
//  4. Random traffic from all cores (uniform destinations, a few
//     self-addressed packets): every packet is delivered or flagged dropped.
//  5. A burst of back-to-back packets from eight cores to one core overloads
//     buffers: delivered + dropped = sent.
// Each mechanism of the design is counted and must occur at least once:
// multi-hop delivery with an X-to-Y turn, a write delayed by a pop (hold
// register), a packet dropped at a full buffer, a self-addressed packet
// discarded, and the arbiter jumping from a deliver state straight to
// another busy port.
module tb_mesh4x4;
  import noc_pkg::*;

  logic        clk = 0, init = 1;
  logic [15:0] c_in  [16];
  logic [15:0] c_out [16];
  int checks = 0, failures = 0;

  mesh4x4 dut (.clk(clk), .init(init), .c_in(c_in), .c_out(c_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  int cycle = 0;
  always @(posedge clk) cycle++;

  int exp_dst [int];
  int exp_cyc [int];
  int outstanding = 0, delivered = 0, dropped = 0;
  int min_lat, max_lat;
  int n_turn = 0, n_hold = 0, n_fulldrop = 0, n_selfdrop = 0, n_skip = 0;
  int seq = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", msg, cycle); end
  endtask

  function automatic int routers_on_path(int s, int d);
    int dx, dy;
    dx = (s % 4) - (d % 4); dy = (s / 4) - (d / 4);
    if (dx < 0) dx = -dx;
    if (dy < 0) dy = -dy;
    return dx + dy + 1;
  endfunction

  // Per-packet source, for the latency bound.
  int exp_src [int];

  always @(negedge clk) if (!init) begin
    for (int n = 0; n < 16; n++) begin
      if (c_out[n] != 0) begin
        int w, lat;
        w = int'(c_out[n]);
        checks++;
        if (!exp_dst.exists(w) || exp_dst[w] != n) begin
          failures++;
          $display("FAIL unexpected %h at core %0d cycle %0d", c_out[n], n, cycle);
        end else begin
          lat = cycle - exp_cyc[w];
          if (lat < min_lat) min_lat = lat;
          if (lat > max_lat) max_lat = lat;
          if ((exp_src[w] % 4) != n % 4 && (exp_src[w] / 4) != n / 4) n_turn++;
          exp_dst.delete(w); exp_cyc.delete(w); exp_src.delete(w);
          outstanding--; delivered++;
        end
      end
    end
  end

  // Mechanism monitors, reaching into each router.
  for (genvar n = 0; n < 16; n++) begin : g_mon
    for (genvar p = 0; p < NPORTS; p++) begin : g_p
      // Packets lost inside router n, as flagged by the router.
      always @(negedge clk) if (!init && dut.rdrop[n][p]) dropped++;
      always @(posedge clk) if (!init) begin
        if (!dut.g_node[n].u_router.g_port[p].u_fifo.held_v &&
             dut.g_node[n].u_router.g_port[p].u_fifo.diram_v &&
             dut.g_node[n].u_router.g_port[p].u_fifo.pop) n_hold++;
        if (dut.g_node[n].u_router.g_port[p].u_fifo.drop) n_fulldrop++;
      end
    end
    always @(posedge clk) if (!init) begin
      if (dut.g_node[n].u_router.u_arbiter.uturn) n_selfdrop++;
      if (dut.g_node[n].u_router.u_arbiter.state.phase == 2'd2 &&
          dut.g_node[n].u_router.u_arbiter.state_n.port !=
          dut.g_node[n].u_router.u_arbiter.state.port) n_skip++;
    end
  end

  // Queue a packet from core s to node d on c_in for the coming cycle.
  function automatic void put(int s, int d);
    logic [15:0] w;
    seq = (seq + 1) % 2048;
    w = {1'b1, 11'(seq), 4'(d)};
    c_in[s] = w;
    if (d != s) begin
      exp_dst[int'(w)] = d;
      exp_cyc[int'(w)] = cycle;
      exp_src[int'(w)] = s;
      outstanding++;
    end
  endfunction

  task automatic idle(int n);
    for (int i = 0; i < 16; i++) c_in[i] = '0;
    repeat (n) @(negedge clk);
  endtask

  task automatic drain(int limit);
    for (int i = 0; i < 16; i++) c_in[i] = '0;
    for (int i = 0; i < limit && outstanding > 0; i++) @(negedge clk);
    repeat (10) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 16; i++) c_in[i] = '0;
    repeat (3) @(negedge clk);
    init = 0;
    @(negedge clk);

    // 1. Longest path alone.
    min_lat = 1000; max_lat = 0;
    put(0, 15); @(negedge clk);
    drain(200);
    check(outstanding == 0, "0 -> 15 delivered");
    check(max_lat >= 28 && max_lat <= 56, $sformatf("0 -> 15 latency %0d in 28..56", max_lat));
    $display("mesh: core 0 -> core 15 alone: %0d cycles", max_lat);

    // 2. All pairs, one packet at a time.
    for (int s = 0; s < 16; s++)
      for (int d = 0; d < 16; d++) if (s != d) begin
        int r;
        r = routers_on_path(s, d);
        min_lat = 1000; max_lat = 0;
        put(s, d); @(negedge clk);
        drain(100);
        check(outstanding == 0 && max_lat >= 4 * r && max_lat <= 8 * r,
              $sformatf("%0d -> %0d delivered in %0d cycles (%0d routers)", s, d, max_lat, r));
      end

    // 3. All cores at once, core i to core 15-i.
    min_lat = 1000; max_lat = 0;
    begin
      int d0;
      d0 = dropped;
      for (int s = 0; s < 16; s++)
        put(s, s == 5 ? 2 : s == 10 ? 9 : 15 - s);
      @(negedge clk);
      drain(400);
      check(outstanding == 0, "simultaneous injection all delivered");
      check(dropped == d0, "simultaneous injection no drops");
      check(max_lat <= 56, $sformatf("simultaneous injection worst latency %0d <= 56", max_lat));
    end
    $display("mesh: all 16 cores at once: latency %0d..%0d cycles", min_lat, max_lat);

    // 4. Random traffic, about one packet per core every 40 cycles.
    begin
      int sent, d0, del0;
      sent = 0; d0 = dropped; del0 = delivered;
      for (int n = 0; n < 4000; n++) begin
        for (int s = 0; s < 16; s++)
          if ($urandom_range(0, 39) == 0) begin
            int d;
            d = $urandom_range(0, 15);
            if (d == s && $urandom_range(0, 7) != 0) d = (d + 1) % 16;
            put(s, d); sent++;
          end else c_in[s] = 16'($urandom_range(0, 16'h7fff));
        @(negedge clk);
      end
      drain(2000);
      check((delivered - del0) + (dropped - d0) == sent,
            $sformatf("random: delivered %0d + dropped %0d == sent %0d",
                      delivered - del0, dropped - d0, sent));
      // At this load only the self-addressed packets are lost.
      check(dropped - d0 == n_selfdrop, "random: only self-addressed packets dropped");
      $display("mesh: random traffic sent=%0d delivered=%0d dropped=%0d", sent,
               delivered - del0, dropped - d0);
    end
    // Packets lost in the network were counted as drops; forget them.
    exp_dst.delete(); exp_cyc.delete(); exp_src.delete(); outstanding = 0;

    // 5. Hot spot: eight cores send 30 packets back to back to core 5.
    begin
      int sent, d0, del0;
      sent = 0; d0 = dropped; del0 = delivered;
      for (int n = 0; n < 30; n++) begin
        for (int s = 8; s < 16; s++) begin put(s, 5); sent++; end
        @(negedge clk);
      end
      drain(3000);
      check((delivered - del0) + (dropped - d0) == sent,
            $sformatf("hot spot: delivered %0d + dropped %0d == sent %0d",
                      delivered - del0, dropped - d0, sent));
      $display("mesh: hot spot sent=%0d delivered=%0d dropped=%0d", sent,
               delivered - del0, dropped - d0);
    end

    $display("mechanisms: turn=%0d hold=%0d full_drop=%0d self_drop=%0d arb_skip=%0d",
             n_turn, n_hold, n_fulldrop, n_selfdrop, n_skip);
    check(n_turn > 0, "X-to-Y turn happened");
    check(n_hold > 0, "write delayed by pop happened");
    check(n_fulldrop > 0, "full-buffer drop happened");
    check(n_selfdrop > 0, "self-addressed discard happened");
    check(n_skip > 0, "arbiter jump to busy port happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
