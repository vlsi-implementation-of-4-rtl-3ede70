// tb_arbiter: self-checking test of the router arbiter (router address 0101).
//
// A reference model of the round-robin state diagram, written here with
// plain integers, runs beside the arbiter on random data-present flags and
// destinations; grant, SEL and uturn are compared every cycle. The expected
// SEL comes from XY routing on the node's column/row numbers and a
// hand-written copy of the crossbar table. Directed checks cover the
// timing from init (grant one cycle after the flag is seen, SEL one cycle
// later) and the skip to the next busy port after a deliver state.
module tb_arbiter;
  import noc_pkg::*;

  logic       clk = 0, init = 1;
  logic       dp    [NPORTS];
  node_addr_t dest  [NPORTS];
  logic       grant [NPORTS];
  xsel_t      sel;
  logic       uturn;
  int checks = 0, failures = 0;

  arbiter #(.CUR_ADDR(4'b0101)) dut (
    .clk(clk), .init(init), .dp(dp), .dest(dest),
    .grant(grant), .sel(sel), .uturn(uturn));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ports: 0 C, 1 N, 2 S, 3 E, 4 W.
  // OUT[in][sel] = output port, hand copy of the crossbar table.
  localparam int OUT [5][4] = '{
    '{1, 4, 3, 2},   // C: N W E S
    '{4, 3, 2, 0},   // N: W E S C
    '{0, 1, 4, 3},   // S: C N W E
    '{2, 0, 1, 4},   // E: S C N W
    '{3, 2, 0, 1}    // W: E S C N
  };

  function automatic int route(int d);
    int cx = 1, cy = 1, dx, dy;
    dx = d % 4; dy = d / 4;
    if (dx < cx) return 4;
    if (dx > cx) return 3;
    if (dy < cy) return 2;
    if (dy > cy) return 1;
    return 0;
  endfunction

  // Reference state: phase 0 check, 1 grant, 2 deliver.
  int ph, pt;

  task automatic compare();
    int exp_sel, exp_out;
    bit exp_uturn;
    for (int i = 0; i < NPORTS; i++) begin
      checks++;
      if (grant[i] !== (ph == 1 && pt == i)) begin
        failures++;
        $display("FAIL grant[%0d]=%0b ph=%0d pt=%0d at %0t", i, grant[i], ph, pt, $time);
      end
    end
    exp_sel = 0; exp_uturn = 0;
    if (ph == 2) begin
      exp_out = route(int'(dest[pt]));
      exp_uturn = (exp_out == pt);
      for (int s = 0; s < 4; s++) if (OUT[pt][s] == exp_out) exp_sel = s;
    end
    checks++;
    if (int'(sel) != exp_sel || uturn !== exp_uturn) begin
      failures++;
      $display("FAIL sel=%0d uturn=%0b exp %0d %0b (ph=%0d pt=%0d dest=%0d) at %0t",
               sel, uturn, exp_sel, exp_uturn, ph, pt, dest[pt], $time);
    end
  endtask

  task automatic step_model();
    int nph, npt;
    nph = ph; npt = pt;
    case (ph)
      0: if (dp[pt]) nph = 1; else npt = (pt + 1) % 5;
      1: nph = 2;
      default: begin
        nph = 0; npt = pt;
        for (int k = 1; k <= 4; k++)
          if (dp[(pt + k) % 5]) begin npt = (pt + k) % 5; break; end
      end
    endcase
    ph = nph; pt = npt;
  endtask

  initial begin
    for (int i = 0; i < NPORTS; i++) begin dp[i] = 0; dest[i] = 4'b0101; end
    ph = 0; pt = 0;
    repeat (2) @(posedge clk);
    // Directed: core has data from the first cycle, destination 0110 (east).
    @(negedge clk);
    dp[0] = 1; dest[0] = 4'b0110; init = 0;
    @(negedge clk);                      // state SC_G
    checks++; if (!grant[0]) begin failures++; $display("FAIL no grant C"); end
    dp[0] = 0; dp[3] = 1;                // core now empty, east has data
    @(negedge clk);                      // state SC_D
    checks++; if (grant[0] || sel != 2'b10) begin failures++; $display("FAIL SC_D sel=%b", sel); end
    @(negedge clk);                      // jumped straight to SE
    checks++; if (grant[3]) begin failures++; $display("FAIL early grant E"); end
    @(negedge clk);                      // SE_G
    checks++; if (!grant[3]) begin failures++; $display("FAIL no grant E"); end
    dp[3] = 0;
    repeat (3) @(negedge clk);

    // Random comparison against the reference model.
    @(negedge clk); init = 1;
    @(negedge clk); init = 0; ph = 0; pt = 0;
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < NPORTS; i++) begin
        dp[i]   = ($urandom_range(0, 3) == 0);
        dest[i] = node_addr_t'($urandom_range(0, 15));
      end
      #1 compare();
      @(posedge clk);
      step_model();
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
