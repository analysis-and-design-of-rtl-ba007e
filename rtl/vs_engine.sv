// vs_engine: view synthesis engine. From a left and a right reference view
// (luma plus 8-bit depth) it synthesizes a virtual view between them with
// the homography-based 3D warping of the MPEG-FTV reference algorithm, for
// cameras that may be rotated against each other.
//
// The work is split into two frame-level stages that run on consecutive
// frames at the same time:
//  * depth_mapping forward-warps both reference depth maps into the virtual
//    view and writes them to external memory (after clearing them, since 0
//    marks a hole). Keeping the warped depth off chip removes the multi-row
//    reorder buffer that rotated cameras would otherwise need.
//  * texture_mapping reads the warped depth back in scan-column order,
//    filters it, reverse-warps every virtual pixel into both reference views,
//    fetches the reference luma, blends it and fills the remaining holes.
// homo_table holds the homographies of both stages (the reverse ones
// ping-pong buffered across the frame boundary); it is written through the
// ht_* port by the homography preprocessing. Of that preprocessing,
// make_homography (the Gauss-Seidel estimation of one homography from the
// frame corners and their projected positions, mh_* port) is included; the
// projection steps that produce its inputs and the assembly of the table
// entries are left to the controlling processor. vs_arbiter shares the one
// 64-bit external bus between the warped-depth writers (DLV, DRV), the two
// texture readers (YL, YR), which are time-critical, and the clearing DMA.
//
// The regular column transfers (reading the warped depth for stage 2,
// reading reference depth for stage 1, writing the result back) are done by
// DMA outside this block: they arrive and leave as the dm_*, tm_* and y_*
// streams. Bus requests go out on bus_*; read data must return in request
// order per master with the request's id.
//
// From the document: the two frame-level stages, the homography table and the
// shared 64-bit bus with its arbiter (Ch. 4, Sec. 5.5). Own choice: the bus
// protocol, streams in place of the document's regular DMA transfers, alpha
// as an input, luma only.
module vs_engine
  import vs_pkg::*;
#(
  parameter int unsigned H = 1080,
  parameter int unsigned W = 1920
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // homography table write port and frame swap
  input  logic                 ht_we,
  input  rel_t                 ht_rel,
  input  logic [2:0]           ht_seg,
  input  homo_pair_t           ht_wdata,
  input  logic                 ht_swap,
  // homography estimation from four corner correspondences
  input  logic                 mh_start,
  input  logic signed [19:0]   mh_dst_u [4],
  input  logic signed [19:0]   mh_dst_v [4],
  output logic                 mh_busy,
  output logic                 mh_done,
  output homo_t                mh_h,
  input  logic [8:0]           alpha,
  // frame buffer base byte addresses (8-byte aligned)
  input  logic [31:0]          dlv_base,
  input  logic [31:0]          drv_base,
  input  logic [31:0]          yl_base,
  input  logic [31:0]          yr_base,
  // stage 1: reference depth
  input  logic                 dm_start,
  input  logic                 dm_valid,
  output logic                 dm_ready,
  input  logic                 dm_view,
  input  logic [7:0]           dm_depth,
  output logic                 dm_done,
  // stage 2: warped depth of the virtual view
  input  logic                 tm_valid,
  output logic                 tm_ready,
  input  logic [7:0]           tm_depth_l,
  input  logic [7:0]           tm_depth_r,
  // synthesized luma
  output logic                 y_valid,
  output logic [7:0]           y_data,
  output logic                 y_hole,
  output logic                 y_filled,
  output logic [$clog2(H)-1:0] y_row,
  output logic [$clog2(W)-1:0] y_col,
  output logic                 y_last,
  // external memory bus
  output logic                 bus_valid,
  output bus_req_t             bus_req,
  input  logic                 bus_ready,
  input  logic                 rsp_valid,
  input  bus_rsp_t             rsp
);
  // ---------------- homography estimation ----------------
  make_homography #(.W(W), .H(H)) u_mh (
    .clk, .rst_n, .start(mh_start), .dst_u(mh_dst_u), .dst_v(mh_dst_v),
    .busy(mh_busy), .done(mh_done), .h(mh_h));

  // ---------------- homography table ----------------
  logic       a_en;
  rel_t       a_rel;
  logic [2:0] a_seg;
  homo_pair_t a_data;
  logic [1:0] r_en;
  rel_t       r_rel [2];
  logic [1:0][2:0] r_seg;
  homo_pair_t r_data [2];
  logic       wbank;

  homo_table u_table (
    .clk, .rst_n, .we(ht_we), .wrel(ht_rel), .wseg(ht_seg), .wdata(ht_wdata), .swap(ht_swap),
    .a_en, .a_rel, .a_seg, .a_data,
    .b_en(r_en[0]), .b_rel(r_rel[0]), .b_seg(r_seg[0]), .b_data(r_data[0]),
    .c_en(r_en[1]), .c_rel(r_rel[1]), .c_seg(r_seg[1]), .c_data(r_data[1]),
    .wbank
  );

  // ---------------- bus masters ----------------
  // 0 DLV, 1 DRV, 2 YL, 3 YR (group B); 4 clearing (group A)
  logic [4:0] req, gnt;
  bus_req_t   pl [5];
  bus_req_t   dm_pl [3];
  bus_req_t   tm_pl [2];
  logic [2:0] sel;

  assign pl[0] = dm_pl[0];
  assign pl[1] = dm_pl[1];
  assign pl[2] = tm_pl[0];
  assign pl[3] = tm_pl[1];
  assign pl[4] = dm_pl[2];

  // ---------------- stage 1 ----------------
  logic [31:0] s1_lev, s1_drop, s1_words, s1_merged;
  depth_mapping #(.H(H), .W(W)) u_dm (
    .clk, .rst_n, .start(dm_start), .dlv_base, .drv_base,
    .in_valid(dm_valid), .in_ready(dm_ready), .in_view(dm_view), .in_depth(dm_depth), .done(dm_done),
    .tab_en(a_en), .tab_rel(a_rel), .tab_seg(a_seg), .tab_data(a_data),
    .req({req[4], req[1], req[0]}), .req_pl(dm_pl), .gnt({gnt[4], gnt[1], gnt[0]}),
    .n_leveled(s1_lev), .n_dropped(s1_drop), .n_words(s1_words), .n_merged(s1_merged)
  );

  // ---------------- stage 2 ----------------
  logic [31:0] s2_mode [4];
  logic [31:0] s2_bnd, s2_stall;
  logic [1:0]  rsp_v;
  assign rsp_v[0] = rsp_valid && rsp.id == ID_YL;
  assign rsp_v[1] = rsp_valid && rsp.id == ID_YR;

  texture_mapping #(.H(H), .W(W)) u_tm (
    .clk, .rst_n, .yl_base, .yr_base, .alpha,
    .in_valid(tm_valid), .in_ready(tm_ready), .in_depth_l(tm_depth_l), .in_depth_r(tm_depth_r),
    .tab_en(r_en), .tab_rel(r_rel), .tab_seg(r_seg), .tab_data(r_data),
    .req(req[3:2]), .req_pl(tm_pl), .gnt(gnt[3:2]), .rsp_valid(rsp_v), .rsp_data(rsp.rdata),
    .out_valid(y_valid), .out_y(y_data), .out_hole(y_hole), .out_filled(y_filled),
    .out_row(y_row), .out_col(y_col), .out_last(y_last),
    .n_mode(s2_mode), .n_boundary(s2_bnd), .n_stall(s2_stall)
  );

  // ---------------- arbitration ----------------
  vs_arbiter #(.NB(4), .NA(1)) u_arb (
    .clk, .rst_n, .req, .bus_ready, .gnt, .bus_valid, .sel
  );
  assign bus_req = pl[sel];

  logic unused;
  assign unused = wbank;
endmodule
