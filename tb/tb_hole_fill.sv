// tb_hole_fill: two random frames through hole_fill at the luma window (9x5,
// 14 rows x 12 columns) and at the chroma window (5x3, 8 x 7), each frame
// with scattered holes and large hole blocks, one at the left edge so that
// some holes have no usable neighbour. The reference walks the frame in scan
// order: a hole gets the weighted average (weights (KH/2+1-|dy|)*(KW/2+1-|dx|),
// rounded to nearest) of the non-hole pixels in its window, where columns
// left of the centre hold the values already filled (column-level
// accumulation) and the centre and right columns hold the values received.
// Checks data, hole and filled flags, position and last, and that no output
// leaves before its window is complete ((KW/2)*H + KH/2 beats after its
// input); counts filled and unfilled holes.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_hole_fill;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); `TB_DONE
  end

  bit done_a = 0, done_b = 0;
  int filled [2] = '{0, 0}, unfilled [2] = '{0, 0};

  hf_case #(.H(14), .W(12), .KH(9), .KW(5)) u_a (.clk, .rst_n, .done(done_a), .checks, .failures, .n_filled(filled[0]), .n_unfilled(unfilled[0]));
  hf_case #(.H(8), .W(7), .KH(5), .KW(3)) u_b (.clk, .rst_n, .done(done_b), .checks, .failures, .n_filled(filled[1]), .n_unfilled(unfilled[1]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done_a && done_b);
    for (int i = 0; i < 2; i++) begin
      $display("case %0d: filled %0d unfilled %0d", i, filled[i], unfilled[i]);
      `TB_CHECK(filled[i] > 0 && unfilled[i] > 0, "filled and unfilled holes seen")
    end
    `TB_DONE
  end
endmodule
