// tb_vs_arbiter: random requests into a vs_arbiter with 4 group-B masters
// and 3 group-A masters (the engine uses one group-A master; three make the
// round robin of group A visible) and a random bus_ready. A reference model
// written from the rules checks gnt, bus_valid and sel every cycle:
//  - the master that was picked last cycle keeps the bus while it requests;
//  - otherwise group B wins over group A, and within each group the search
//    starts after the master picked last in that group (round robin);
//  - gnt is the pick qualified by bus_ready, at most one-hot.
// Counts how often a hold, a B-over-A win and a group-A rotation happened
// and fails if one never did.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_vs_arbiter;
  localparam int NB = 4, NA = 3, N = NB + NA;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] req = '0, gnt;
  logic         bus_ready = 0, bus_valid;
  logic [2:0]   sel;

  vs_arbiter #(.NB(NB), .NA(NA)) dut (.clk, .rst_n, .req, .bus_ready, .gnt, .bus_valid, .sel);

  int own = -1, last_b = NB - 1, last_a = N - 1;
  int n_hold = 0, n_b_over_a = 0, n_a_rot = 0, prev_a = -1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_DONE
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      automatic int pick = -1;
      @(negedge clk);
      // requests stay up for a while, like a master with a burst to send
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 5) == 0) req[i] = ~req[i];
      if (t % 500 > 350) req[NB-1:0] = '0;   // quiet spells give group A a turn
      bus_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (own >= 0 && req[own]) begin
        pick = own;
        n_hold++;
      end else begin
        for (int k = 1; k <= NB && pick < 0; k++)
          if (req[(last_b + k) % NB]) pick = (last_b + k) % NB;
        for (int k = 1; k <= NA && pick < 0; k++)
          if (req[NB + (last_a - NB + k) % NA]) pick = NB + (last_a - NB + k) % NA;
        if (pick >= 0 && pick < NB && |req[N-1:NB]) n_b_over_a++;
      end
      `TB_CHECK(bus_valid == (pick >= 0), $sformatf("t=%0d bus_valid", t))
      if (pick >= 0) begin
        `TB_CHECK(sel == 3'(pick), $sformatf("t=%0d req=%b sel %0d exp %0d", t, req, sel, pick))
        `TB_CHECK(gnt == (bus_ready ? N'(1) << pick : '0), $sformatf("t=%0d gnt %b", t, gnt))
        if (pick >= NB) begin
          if (prev_a >= 0 && pick != prev_a) n_a_rot++;
          prev_a = pick;
          last_a = pick;
        end else last_b = pick;
      end else begin
        `TB_CHECK(gnt == '0, "no grant without request")
      end
      own = pick;
    end
    $display("holds %0d  B over A %0d  A rotations %0d", n_hold, n_b_over_a, n_a_rot);
    `TB_CHECK(n_hold > 0, "hold never happened")
    `TB_CHECK(n_b_over_a > 0, "B over A never happened")
    `TB_CHECK(n_a_rot > 0, "group A rotation never happened")
    `TB_DONE
  end
endmodule
