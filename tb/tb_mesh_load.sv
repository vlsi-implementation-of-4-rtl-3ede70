// tb_mesh_load: offered-load sweep on the 4x4 mesh (default parameters).
//
// Every core sends constant-rate traffic: one packet every PERIOD cycles,
// each to a uniformly chosen other node, starting at a random phase. Four
// loads are run, each after a fresh reset: PERIOD = 48, 24, 16 and 12
// cycles, called 25%, 50%, 75% and 100% load. 100% is set by the router: it
// forwards at most one packet per 3 cycles, and a packet between uniformly
// chosen nodes crosses 3.67 routers on average (including both end routers),
// so with one packet per 12 cycles per core the average router is busy
// 16 x (1/12) x 3.67 x 3 / 16 = 92% of the time. For each load the test
// reports the worst end-to-end latency, the dropping probability (dropped /
// sent) and the throughput in bits per core per cycle, computed as
//   delivered packets x 16 bits / (16 cores x cycles from first injection
//   to last delivery).
// Checks: every delivered word reaches the core its destination field
// names; after draining, delivered + dropped = sent at every load; the
// dropping probability at 100% load is at least that at 25%; and the
// network drops packets at the highest load.
module tb_mesh_load;
  import noc_pkg::*;

  logic        clk = 0, init = 1;
  logic [15:0] c_in  [16];
  logic [15:0] c_out [16];
  int checks = 0, failures = 0;

  mesh4x4 dut (.clk(clk), .init(init), .c_in(c_in), .c_out(c_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  int cycle = 0;
  always @(posedge clk) cycle++;

  int sent, delivered, dropped, max_lat, last_del;
  int inj_cyc [int];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", msg, cycle); end
  endtask

  always @(negedge clk) if (!init) begin
    for (int n = 0; n < 16; n++)
      if (c_out[n] != 0) begin
        int w;
        w = int'(c_out[n]);
        check(int'(c_out[n][3:0]) == n, $sformatf("word %h delivered to core %0d", c_out[n], n));
        delivered++;
        last_del = cycle;
        if (inj_cyc.exists(w)) begin
          if (cycle - inj_cyc[w] > max_lat) max_lat = cycle - inj_cyc[w];
          inj_cyc.delete(w);
        end
      end
  end

  for (genvar n = 0; n < 16; n++) begin : g_mon
    for (genvar p = 0; p < NPORTS; p++) begin : g_p
      always @(negedge clk) if (!init && dut.rdrop[n][p]) dropped++;
    end
  end

  real drop_prob [4];

  initial begin
    int periods [4] = '{48, 24, 16, 12};
    for (int i = 0; i < 16; i++) c_in[i] = '0;
    for (int l = 0; l < 4; l++) begin
      int period, phase [16], seq [16], first;
      real thr;
      period = periods[l];
      init = 1;
      repeat (3) @(negedge clk);
      init = 0;
      sent = 0; delivered = 0; dropped = 0; max_lat = 0; inj_cyc.delete();
      for (int s = 0; s < 16; s++) begin phase[s] = $urandom_range(0, period - 1); seq[s] = 0; end
      first = cycle;
      for (int t = 0; t < 6000; t++) begin
        for (int s = 0; s < 16; s++)
          if (t % period == phase[s]) begin
            int d;
            logic [15:0] w;
            d = $urandom_range(0, 14);
            if (d >= s) d++;
            seq[s] = (seq[s] + 1) % 128;
            w = {1'b1, 4'(s), 7'(seq[s]), 4'(d)};
            c_in[s] = w;
            inj_cyc[int'(w)] = cycle;
            sent++;
          end else c_in[s] = '0;
        @(negedge clk);
      end
      for (int i = 0; i < 16; i++) c_in[i] = '0;
      repeat (3000) @(negedge clk);
      check(delivered + dropped == sent,
            $sformatf("load %0d%%: delivered %0d + dropped %0d == sent %0d",
                      25 * (l + 1), delivered, dropped, sent));
      drop_prob[l] = real'(dropped) / real'(sent);
      thr = real'(delivered) * 16.0 / (16.0 * real'(last_del - first));
      $display("load %3d%% (1 packet / %0d cycles / core): sent %0d, max latency %0d cycles, dropping probability %0.3f, throughput %0.3f bit/cycle/core",
               25 * (l + 1), period, sent, max_lat, drop_prob[l], thr);
    end
    check(drop_prob[3] >= drop_prob[0], "dropping probability grows with load");
    check(drop_prob[3] > 0.0, "packets dropped at 100% load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
