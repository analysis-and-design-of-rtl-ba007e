// tb_col_window: a 3-row by 5-column window over two random 7x6 frames fed
// in scan-column order with random gaps. Every in-frame tap must equal the
// frame pixel at its offset, the mask must mark exactly the in-frame taps,
// and the centres must come out in scan-column order, H*W per frame.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_col_window;
  localparam int H = 7, W = 6, KH = 3, KW = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, out_last;
  logic [7:0] in_data;
  logic [KW-1:0][KH-1:0][7:0] win;
  logic [KW-1:0][KH-1:0] mask;
  logic [2:0] out_row, out_col;

  col_window #(.H(H), .W(W), .KH(KH), .KW(KW), .DW(8)) dut (.clk, .rst_n, .in_valid, .in_ready,
    .in_data, .out_valid, .win, .mask, .out_row, .out_col, .out_last);

  logic [7:0] img [2][W][H];
  int fo = 0, no = 0, lasts = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int r = no % H, c = no / H;
    `TB_CHECK(out_row == 3'(r) && out_col == 3'(c), $sformatf("centre (%0d,%0d) exp (%0d,%0d)", out_row, out_col, r, c))
    for (int x = 0; x < KW; x++)
      for (int y = 0; y < KH; y++) begin
        automatic int cc = c + x - KW / 2, rr = r + y - KH / 2;
        automatic bit in = cc >= 0 && cc < W && rr >= 0 && rr < H;
        `TB_CHECK(mask[x][y] == in, "mask")
        if (in) `TB_CHECK(win[x][y] == img[fo][cc][rr], $sformatf("tap %0d,%0d at (%0d,%0d)", x, y, r, c))
      end
    if (out_last) lasts++;
    no++;
    if (no == H * W) begin
      `TB_CHECK(out_last, "last flag")
      no = 0;
      fo++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); `TB_DONE
  end

  initial begin
    foreach (img[f, c, r]) img[f][c][r] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++) begin
          while ($urandom_range(0, 3) == 0) begin
            in_valid <= 0;
            @(posedge clk);
          end
          in_valid <= 1;
          in_data  <= img[f][c][r];
          do @(negedge clk); while (!in_ready);
          @(posedge clk);
        end
    in_valid <= 0;
    repeat (3 * H + 20) @(posedge clk);
    `TB_CHECK(fo == 2, $sformatf("frames out %0d", fo))
    `TB_CHECK(lasts == 2, "two last flags")
    `TB_DONE
  end
endmodule
