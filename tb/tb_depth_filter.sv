// tb_depth_filter: two random 10x8 warped depth maps with many holes (depth
// 0, also in clusters). Expected outputs are computed here: 3x3 median with
// out-of-frame taps replaced by the centre, hole majority (at least 5 of 9),
// then a 3x3 OR dilation of the filtered hole map over in-frame taps.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_depth_filter;
  localparam int H = 10, W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, out_hole, out_hole_dil, out_last;
  logic [7:0] in_depth, out_depth;
  logic [3:0] out_row;
  logic [2:0] out_col;

  depth_filter #(.H(H), .W(W)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_depth,
    .out_valid, .out_depth, .out_hole, .out_hole_dil, .out_row, .out_col, .out_last);

  logic [7:0] img [2][W][H];
  logic [7:0] med [2][W][H];
  bit         hm  [2][W][H];
  bit         dl  [2][W][H];
  int fo = 0, no = 0, n_hole = 0, n_dil = 0;

  function automatic logic [7:0] pix(int f, int c, int r, int c0, int r0);
    if (c < 0 || c >= W || r < 0 || r >= H) return img[f][c0][r0];
    return img[f][c][r];
  endfunction

  initial begin
    foreach (img[f, c, r]) begin
      img[f][c][r] = ($urandom_range(0, 2) == 0) ? 8'd0 : 8'($urandom_range(1, 255));
      if (c >= 2 && c <= 4 && r >= 3 && r <= 6 && f == 1) img[f][c][r] = 8'd0;
    end
    foreach (img[f, c, r]) begin
      logic [7:0] s [9];
      automatic int k = 0, z = 0;
      for (int dx = -1; dx <= 1; dx++)
        for (int dy = -1; dy <= 1; dy++) begin
          s[k] = pix(f, c + dx, r + dy, c, r);
          if (s[k] == 0) z++;
          k++;
        end
      s.sort();
      med[f][c][r] = s[4];
      hm[f][c][r]  = (z >= 5);
    end
    foreach (img[f, c, r]) begin
      automatic bit o = 0;
      for (int dx = -1; dx <= 1; dx++)
        for (int dy = -1; dy <= 1; dy++)
          if (c + dx >= 0 && c + dx < W && r + dy >= 0 && r + dy < H && hm[f][c + dx][r + dy]) o = 1;
      dl[f][c][r] = o;
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int r = no % H, c = no / H;
    `TB_CHECK(out_row == 4'(r) && out_col == 3'(c), "position")
    `TB_CHECK(out_depth == med[fo][c][r], $sformatf("median (%0d,%0d) got %0d exp %0d", r, c, out_depth, med[fo][c][r]))
    `TB_CHECK(out_hole == hm[fo][c][r], $sformatf("hole (%0d,%0d)", r, c))
    `TB_CHECK(out_hole_dil == dl[fo][c][r], $sformatf("dilated (%0d,%0d)", r, c))
    if (out_hole) n_hole++;
    if (out_hole_dil && !out_hole) n_dil++;
    no++;
    if (no == H * W) begin
      `TB_CHECK(out_last, "last")
      no = 0;
      fo++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); `TB_DONE
  end

  initial begin
    #1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++) begin
          @(negedge clk);
          while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1;
          in_depth = img[f][c][r];
          while (!in_ready) @(negedge clk);
          @(posedge clk);
        end
    @(negedge clk);
    in_valid = 0;
    repeat (4 * H + 40) @(posedge clk);
    `TB_CHECK(fo == 2, $sformatf("frames out %0d", fo))
    `TB_CHECK(n_hole > 0 && n_dil > 0, "holes and dilation seen")
    `TB_DONE
  end
endmodule
