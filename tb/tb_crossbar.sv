// tb_crossbar: self-checking test of the router crossbar.
//
// Part 1 applies the words 1111h..5555h to the C, N, S, E, W inputs and steps
// SEL through 00, 01, 10, 11, comparing each output with a connection table
// written out here by hand (output <- input for each SEL value).
// Part 2 drives one random non-zero input at a time with a random SEL and
// checks that exactly the table's output carries it and every other output
// is zero.
module tb_crossbar;
  import noc_pkg::*;

  logic [15:0] si   [NPORTS];
  logic [15:0] dout [NPORTS];
  xsel_t       sel;
  int checks = 0, failures = 0;

  crossbar #(.DATA_W(16)) dut (.si(si), .sel(sel), .dout(dout));

  // SRC[sel][out] = input port feeding output `out` (order C, N, S, E, W).
  localparam int SRC [4][5] = '{
    '{2, 0, 3, 4, 1},   // sel 00: C<-S N<-C S<-E E<-W W<-N
    '{3, 2, 4, 1, 0},   // sel 01: C<-E N<-S S<-W E<-N W<-C
    '{4, 3, 1, 0, 2},   // sel 10: C<-W N<-E S<-N E<-C W<-S
    '{1, 4, 0, 2, 3}    // sel 11: C<-N N<-W S<-C E<-S W<-E
  };

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    si = '{16'h1111, 16'h2222, 16'h3333, 16'h4444, 16'h5555};
    for (int s = 0; s < 4; s++) begin
      sel = xsel_t'(s);
      #10;
      for (int o = 0; o < NPORTS; o++) begin
        checks++;
        if (dout[o] !== si[SRC[s][o]]) begin
          failures++;
          $display("FAIL sel=%0d out=%0d got %h exp %h", s, o, dout[o], si[SRC[s][o]]);
        end
      end
    end
    for (int n = 0; n < 400; n++) begin
      int act;
      logic [15:0] w;
      act = $urandom_range(0, 4);
      w   = 16'($urandom_range(1, 16'hffff));
      sel = xsel_t'($urandom_range(0, 3));
      for (int i = 0; i < NPORTS; i++) si[i] = (i == act) ? w : '0;
      #10;
      for (int o = 0; o < NPORTS; o++) begin
        logic [15:0] exp;
        exp = (SRC[sel][o] == act) ? w : 16'h0;
        checks++;
        if (dout[o] !== exp) begin
          failures++;
          $display("FAIL rnd sel=%0d in=%0d out=%0d got %h exp %h", sel, act, o, dout[o], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
