// tb_router: self-checking test of one router (node R5, address 0101).
//
// Packets carry a unique sequence number in bits [14:4] and the destination
// in [3:0]. For every packet the test works out the output port itself (XY
// routing on column/row numbers) and waits for the word on that output;
// every word seen on an output must be one that was expected there.
//  1. The five-packet core sequence abcd, a9c1, aa81, a841, 8341 sent
//     back to back: all five must leave, none dropped.
//  2. Random traffic on all five inputs, each input only carrying
//     destinations a neighbour could forward under XY routing: all packets
//     delivered, none dropped, shortest transit exactly 4 cycles.
//     (The first core packet of part 1 may also wait for the arbiter's scan.)
//  3. A core packet addressed to the router itself is dropped and flagged.
//  4. 40 back-to-back core packets overload the core buffer: every packet is
//     either delivered or flagged as dropped, and at least one is dropped.
module tb_router;
  import noc_pkg::*;

  logic        clk = 0, init = 1;
  logic [15:0] di   [NPORTS];
  logic [15:0] dout [NPORTS];
  logic        drop [NPORTS];
  int checks = 0, failures = 0;

  router #(.CUR_ADDR(4'b0101), .DATA_W(16), .FIFO_DEPTH(16)) dut (
    .clk(clk), .init(init), .di(di), .dout(dout), .drop(drop));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  always @(posedge clk) cycle++;

  // Expected words per output port, with their send cycle.
  int expect_cyc [int];        // key: word
  int expect_out [int];
  int outstanding = 0, delivered = 0, dropped = 0, unexpected = 0;
  int min_lat = 1000, max_lat = 0;

  function automatic int route(int d);
    int dx, dy;
    dx = d % 4; dy = d / 4;
    if (dx < 1) return 4;
    if (dx > 1) return 3;
    if (dy < 1) return 2;
    if (dy > 1) return 1;
    return 0;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", msg, cycle); end
  endtask

  // Output monitor.
  always @(negedge clk) if (!init) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (dout[p] != 0) begin
        int w, lat;
        w = int'(dout[p]);
        checks++;
        if (!expect_out.exists(w) || expect_out[w] != p) begin
          failures++; unexpected++;
          $display("FAIL unexpected %h on port %0d at cycle %0d", dout[p], p, cycle);
        end else begin
          lat = cycle - expect_cyc[w];
          if (lat < min_lat) min_lat = lat;
          if (lat > max_lat) max_lat = lat;
          expect_out.delete(w); expect_cyc.delete(w);
          outstanding--; delivered++;
        end
      end
    end
    for (int p = 0; p < NPORTS; p++) if (drop[p]) dropped++;
  end

  // Drive a packet on port p for the coming cycle (call at negedge).
  function automatic void put(int p, logic [15:0] w);
    di[p] = w;
    if (route(int'(w[3:0])) != p) begin
      expect_out[int'(w)] = route(int'(w[3:0]));
      expect_cyc[int'(w)] = cycle;
      outstanding++;
    end
  endfunction

  function automatic int legal_dest(int p);
    int x, y;
    case (p)
      1: begin x = 1; y = $urandom_range(0, 1); end        // from above
      2: begin x = 1; y = $urandom_range(1, 3); end        // from below
      3: begin x = $urandom_range(0, 1); y = $urandom_range(0, 3); end
      4: begin x = $urandom_range(1, 3); y = $urandom_range(0, 3); end
      default: begin
        do begin x = $urandom_range(0, 3); y = $urandom_range(0, 3); end
        while (x == 1 && y == 1);
      end
    endcase
    return 4 * y + x;
  endfunction

  task automatic idle_wait(int n);
    for (int i = 0; i < NPORTS; i++) di[i] = '0;
    repeat (n) @(negedge clk);
  endtask

  int seq = 0;

  initial begin
    for (int i = 0; i < NPORTS; i++) di[i] = '0;
    repeat (3) @(negedge clk);
    init = 0;

    // 1. Back-to-back core packets.
    put(0, 16'habcd); @(negedge clk);
    put(0, 16'ha9c1); @(negedge clk);
    put(0, 16'haa81); @(negedge clk);
    put(0, 16'ha841); @(negedge clk);
    put(0, 16'h8341); @(negedge clk);
    idle_wait(60);
    check(outstanding == 0, $sformatf("core sequence delivered (%0d left)", outstanding));
    check(dropped == 0, "core sequence not dropped");
    // 4 cycles plus at most one round of the arbiter's idle scan.
    check(min_lat >= 4 && min_lat <= 8, $sformatf("first core packet in 4..8 cycles, took %0d", min_lat));

    // 2. Random legal traffic.
    min_lat = 1000;
    for (int n = 0; n < 3000; n++) begin
      for (int p = 0; p < NPORTS; p++) begin
        if ($urandom_range(0, 23) == 0) begin
          seq = (seq + 1) % 2048;
          put(p, {1'b1, 11'(seq), 4'(legal_dest(p))});
        end else di[p] = 16'($urandom_range(0, 16'h7fff)) & 16'h7ff0;
      end
      @(negedge clk);
    end
    idle_wait(200);
    check(outstanding == 0, $sformatf("random traffic delivered (%0d left)", outstanding));
    check(dropped == 0, $sformatf("no drops in random traffic (%0d)", dropped));
    check(min_lat == 4, $sformatf("minimum transit 4 cycles, got %0d", min_lat));
    $display("router: delivered=%0d min_lat=%0d max_lat=%0d", delivered, min_lat, max_lat);

    // 3. Self-addressed core packet.
    put(0, 16'h8005); @(negedge clk);
    idle_wait(30);
    check(dropped == 1, "self-addressed packet dropped");

    // 4. Overload the core input.
    begin
      int before_del, before_drop;
      before_del = delivered; before_drop = dropped;
      expect_out.delete(); expect_cyc.delete(); outstanding = 0;
      for (int n = 0; n < 40; n++) begin
        seq = (seq + 1) % 2048;
        put(0, {1'b1, 11'(seq), 4'(n % 2 ? 4'b0110 : 4'b1001)});
        @(negedge clk);
      end
      idle_wait(300);
      check((delivered - before_del) + (dropped - before_drop) == 40,
            $sformatf("overload: delivered %0d + dropped %0d == 40",
                      delivered - before_del, dropped - before_drop));
      check(dropped - before_drop > 0, "overload caused drops");
      expect_out.delete(); expect_cyc.delete(); outstanding = 0;
    end
    check(unexpected == 0, "no unexpected words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
