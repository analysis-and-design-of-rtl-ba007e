// depth_filter: post-filtering of one warped depth map of the virtual view.
//
// The forward-warped depth map marks holes with depth 0. This unit
// (1) runs a 3x3 median over the depth, which is the depth the reverse warp
//     uses;
// (2) runs a 3x3 majority over the hole map (a pixel becomes a hole when at
//     least 5 of the 9 window pixels are holes, which is the median of the
//     binary map and agrees with the depth median being 0);
// (3) dilates the filtered hole map with a 3x3 OR, which widens holes by one
//     pixel so that boundary noise can be recognised by the blender.
// Each 3x3 window is built by a col_window (two circular FIFOs of column
// height). The second window carries the filtered depth and hole flag along
// with the hole bit being dilated, so all outputs of a pixel leave together.
// Window positions outside the frame take the centre pixel's value for the
// median and majority and are ignored by the dilation (this edge rule is
// this implementation's choice).
//
// Interface: column-scanned valid/ready input of warped depth; the output
// carries one pixel per out_valid pulse in the same order, with its row and
// column, about 2*(H+1) beats later. One pixel per cycle.
//
// From the document: 3x3 median of the warped depth, majority of the hole map
// and 3x3 dilation of the filtered hole map (Sec. 5.3.1, Fig. 5-9). Own
// choice: a hole when at least 5 of 9 taps are holes (the document's wording
// of the threshold is read as the median of the hole map), out-of-frame
// median taps replaced by the centre.
module depth_filter #(
  parameter int unsigned H = 1080,
  parameter int unsigned W = 1920
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [7:0]           in_depth,
  output logic                 out_valid,
  output logic [7:0]           out_depth,     // median-filtered depth
  output logic                 out_hole,      // filtered hole map
  output logic                 out_hole_dil,  // dilated hole map
  output logic [$clog2(H)-1:0] out_row,
  output logic [$clog2(W)-1:0] out_col,
  output logic                 out_last
);
  localparam int unsigned RW = $clog2(H);
  localparam int unsigned CW = $clog2(W);

  // ---------------- first window: median + hole majority ----------------
  logic                  w1_valid, w1_last;
  logic [2:0][2:0][7:0]  w1;
  logic [2:0][2:0]       m1;
  logic [RW-1:0]         w1_row;
  logic [CW-1:0]         w1_col;

  col_window #(.H(H), .W(W), .KH(3), .KW(3), .DW(8)) u_win1 (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_depth),
    .out_valid(w1_valid), .win(w1), .mask(m1), .out_row(w1_row), .out_col(w1_col),
    .out_last(w1_last)
  );

  logic [8:0][7:0] med_in;
  logic [7:0]      med_out;
  logic [3:0]      hole_cnt;
  logic            hole_med;

  always_comb begin
    hole_cnt = '0;
    for (int x = 0; x < 3; x++) begin
      for (int y = 0; y < 3; y++) begin
        med_in[x*3+y] = m1[x][y] ? w1[x][y] : w1[1][1];
        hole_cnt      = hole_cnt + 4'(med_in[x*3+y] == 8'd0);
      end
    end
    hole_med = (hole_cnt >= 4'd5);
  end

  median9 #(.DW(8)) u_med (.in(med_in), .out(med_out));

  // ---------------- second window: dilation ----------------
  logic                 w2_valid, w2_ready, w2_last;
  logic [2:0][2:0][8:0] w2;
  logic [2:0][2:0]      m2;

  col_window #(.H(H), .W(W), .KH(3), .KW(3), .DW(9)) u_win2 (
    .clk, .rst_n, .in_valid(w1_valid), .in_ready(w2_ready), .in_data({hole_med, med_out}),
    .out_valid(w2_valid), .win(w2), .mask(m2), .out_row, .out_col, .out_last(w2_last)
  );

  always_comb begin
    out_hole_dil = 1'b0;
    for (int x = 0; x < 3; x++)
      for (int y = 0; y < 3; y++)
        if (m2[x][y] && w2[x][y][8]) out_hole_dil = 1'b1;
  end

  assign out_valid = w2_valid;
  assign out_depth = w2[1][1][7:0];
  assign out_hole  = w2[1][1][8];
  assign out_last  = w2_last;

  // the second window must never be busy flushing when the first delivers
  assert property (@(posedge clk) disable iff (!rst_n) w1_valid |-> w2_ready)
    else $error("depth_filter: dilation window not ready");

  logic unused;
  assign unused = ^{w1_row, w1_col, w1_last};
endmodule
