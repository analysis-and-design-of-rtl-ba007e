// warp_unit: 3D warping of one pixel per cycle through the homography of
// its depth level. Used for forward warping (reference depth to virtual
// view) in the depth-mapping stage and for reverse warping (virtual view to
// reference texture) in the texture-mapping stage; only the relation and the
// input differ.
//
// Cycle 0 ("WarpSet"): the pixel's depth selects the table entry
// (relation, depth / 32) and the read is issued. In forward warping depth 0
// is raised to 1, because 0 marks a hole in the warped depth map. In reverse
// warping a depth of 0 is a hole; it is carried along flagged as such.
// Cycle 1 ("LinearHomo"): the coefficients are interpolated for the exact
// depth (homo_interp) and handed to the transform.
// Cycles 2-19 ("TransHomo"): trans_homo, 18 cycles.
// So a result leaves 19 cycles after its pixel entered, in order, at up to
// one pixel per cycle. The unit cannot be stalled.
//
// From the document: WarpSet, LinearHomo and TransHomo in a pipeline (Sec.
// 5.2, Fig. 5-5), depth 0 raised to 1 for forward warping. Own choice:
// latency 19 (one table read, combinational interpolation, 18-stage
// transform) and the hole flag for reverse warping.
module warp_unit
  import vs_pkg::*;
#(
  parameter int unsigned H   = 1080,
  parameter int unsigned W   = 1920,
  parameter int unsigned SBW = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  rel_t                 in_rel,
  input  logic [$clog2(W)-1:0] in_u,
  input  logic [$clog2(H)-1:0] in_v,
  input  logic [7:0]           in_depth,
  input  logic [SBW-1:0]       in_side,
  // homography table read port
  output logic                 tab_en,
  output rel_t                 tab_rel,
  output logic [2:0]           tab_seg,
  input  homo_pair_t           tab_data,
  // result
  output logic                 out_valid,
  output logic [$clog2(W)-1:0] out_u,
  output logic [$clog2(H)-1:0] out_v,
  output logic                 out_inside,
  output logic [7:0]           out_depth,
  output logic                 out_hole,
  output logic [SBW-1:0]       out_side
);
  localparam int unsigned UW = $clog2(W);
  localparam int unsigned VW = $clog2(H);
  localparam int unsigned TSB = SBW + 9;

  logic       fwd;
  logic [7:0] d0;
  assign fwd     = (in_rel == REL_L2V) || (in_rel == REL_R2V);
  assign d0      = (fwd && in_depth == 8'd0) ? 8'd1 : in_depth;
  assign tab_en  = in_valid;
  assign tab_rel = in_rel;
  assign tab_seg = d0[7:5];

  logic           s_v;
  logic [UW-1:0]  s_u;
  logic [VW-1:0]  s_vv;
  logic [7:0]     s_d;
  logic           s_hole;
  logic [SBW-1:0] s_sb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_v <= 1'b0;
    else        s_v <= in_valid;
  end
  always_ff @(posedge clk) begin
    s_u    <= in_u;
    s_vv   <= in_v;
    s_d    <= d0;
    s_hole <= !fwd && (in_depth == 8'd0);
    s_sb   <= in_side;
  end

  homo_t hm;
  homo_interp u_lin (.pair(tab_data), .depth(s_d), .h(hm));

  logic [TSB-1:0] t_sb;
  trans_homo #(.H(H), .W(W), .SBW(TSB)) u_trans (
    .clk, .rst_n, .in_valid(s_v), .hm, .in_u(s_u), .in_v(s_vv),
    .in_side({s_sb, s_d, s_hole}),
    .out_valid, .out_u, .out_v, .out_inside, .out_side(t_sb)
  );

  assign out_side  = t_sb[TSB-1:9];
  assign out_depth = t_sb[8:1];
  assign out_hole  = t_sb[0];
endmodule
