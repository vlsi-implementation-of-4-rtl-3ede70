// tb_fifo_buffer: self-checking test of the router input buffer.
//
// The test keeps its own queue of accepted packets and checks:
//  - words without the header flag are ignored; dp stays low; dout is zero;
//  - a packet in cycle t raises dp in t+2;
//  - a grant in cycle g puts the oldest packet on dout in g+1 only, zero in
//    g+2; a grant while empty gives nothing;
//  - 17 back-to-back packets fill the 16-entry RAM plus the hold register;
//    further ones are dropped and flagged, and the 17 come out in order;
//  - a packet that arrives in the same cycle as a pop is delayed, not lost;
//  - a random mix of pushes and grants (never so dense that the buffer
//    must drop) delivers every packet in order.
module tb_fifo_buffer;
  logic        clk = 0, init = 1;
  logic [15:0] di = '0;
  logic        grant = 0;
  logic        dp, drop;
  logic [15:0] dout;
  int checks = 0, failures = 0;
  logic [15:0] q [$];
  int drops_seen = 0;

  fifo_buffer #(.DATA_W(16), .DEPTH(16)) dut (
    .clk(clk), .init(init), .di(di), .grant(grant),
    .dp(dp), .dout(dout), .drop(drop));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!init && drop) drops_seen++;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // Drive one packet for one cycle.
  task automatic send(logic [14:0] payload);
    di <= {1'b1, payload};
    @(posedge clk);
    di <= '0;
  endtask

  // Grant for one cycle and check the word on dout in the next cycle.
  task automatic pop_check(logic [15:0] exp);
    grant <= 1'b1;
    @(posedge clk);
    grant <= 1'b0;
    @(negedge clk);
    check(dout == exp, $sformatf("pop got %h exp %h", dout, exp));
    @(posedge clk);
    @(negedge clk);
    check(dout == 16'h0, "dout zero after pop cycle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    init <= 1'b0;
    @(posedge clk);
    // Idle words are ignored.
    di <= 16'h7fff; @(posedge clk); di <= '0;
    repeat (3) @(negedge clk);
    check(!dp, "no data after headerless word");
    check(dout == 0, "dout zero while idle");
    // Grant while empty: nothing comes out.
    grant <= 1; @(posedge clk); grant <= 0; @(negedge clk);
    check(dout == 0, "grant when empty gives zero");

    // dp timing: packet in cycle t -> dp in t+2.
    @(posedge clk);
    di <= 16'h8123;
    @(negedge clk); check(!dp, "dp low in arrival cycle");
    @(posedge clk); di <= '0;
    @(negedge clk); check(!dp, "dp low in t+1");
    @(negedge clk); check(dp, "dp high in t+2");
    pop_check(16'h8123);
    @(negedge clk); check(!dp, "dp low after last pop");

    // Fill: 20 back-to-back packets, 17 fit.
    @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      di <= 16'h8000 | 16'(i);
      @(posedge clk);
    end
    di <= '0;
    repeat (3) @(posedge clk);
    check(drops_seen == 3, $sformatf("3 drops when overfilled, saw %0d", drops_seen));
    for (int i = 0; i < 17; i++) pop_check(16'h8000 | 16'(i));
    @(negedge clk); check(!dp, "empty after draining");

    // A packet arriving while the RAM is busy with a pop is delayed, not lost.
    send(15'h0aa);
    repeat (2) @(posedge clk);
    // Packet 0bb sits in DIRAM in the cycle of the grant, so its write has
    // to wait in the hold register; 0cc and 0dd follow back to back.
    di <= 16'h80bb; @(posedge clk);
    di <= 16'h80cc; grant <= 1; @(posedge clk);
    di <= 16'h80dd; grant <= 0;
    @(negedge clk); check(dout == 16'h80aa, "pop during push");
    @(posedge clk);
    di <= '0;
    repeat (4) @(posedge clk);
    pop_check(16'h80bb);
    pop_check(16'h80cc);
    pop_check(16'h80dd);
    @(negedge clk); check(!dp, "empty after delayed pushes");
    check(drops_seen == 3, "no drops from delayed pushes");

    // Random traffic, at most one push per cycle and grants every 3 cycles.
    q.delete();
    drops_seen = 0;
    for (int n = 0; n < 600; n++) begin
      logic [15:0] w;
      @(negedge clk);
      if (n % 3 == 0 && dp && $urandom_range(0, 1) == 1) begin
        grant = 1'b1;
        w = q.pop_front();
        fork
          begin
            automatic logic [15:0] e = w;
            @(negedge clk);
            check(dout == e, $sformatf("random pop got %h exp %h", dout, e));
          end
        join_none
      end else grant = 1'b0;
      if ($urandom_range(0, 2) == 0 && q.size() < 12) begin
        logic [15:0] w2;
        w2 = 16'h8000 | 16'($urandom_range(0, 16'h7fff));
        di = w2;
        q.push_back(w2);
      end else di = 16'($urandom_range(0, 16'h7fff));
    end
    @(posedge clk); grant <= 0; di <= '0;
    repeat (4) @(posedge clk);
    // Drain what is left.
    while (q.size() > 0) pop_check(q.pop_front());
    check(drops_seen == 0, "no drops in random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
