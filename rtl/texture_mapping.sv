// texture_mapping: second frame-level stage of the engine. From the two
// warped depth maps of the virtual view it builds the virtual view's luma:
// depth filtering, reverse warping, texture fetch, blending and hole
// filling, all in scan-column order.
//
// Per view, depth_filter medians the warped depth and the hole map and
// dilates the hole map. A warp_unit per view maps each virtual pixel back
// into its reference view using the filtered depth. A view "maps" a pixel
// when its filtered depth is not a hole and the reverse-warped position lies
// inside the reference frame; the dilated hole map gives the same flag after
// dilation. blend_mode turns the four flags into the blend mode, which is
// queued. tex_fetch fetches the reference luma of every mapped pixel over
// the bus and returns it in order. The blend step takes the head of the
// queue, pops one byte from each view that mapped the pixel (also when the
// byte is then ignored as boundary noise), blends with blender and passes the
// result and its final-hole flag to the 9x5 hole_fill.
//
// Both views are processed side by side (two warp units), so the stage takes
// one virtual pixel per cycle at best; bus and hole-filler flushes stall it.
// Flow control: in_ready is held low while the pixels between the depth
// filters and the hole filler, plus those the filters can still flush, could
// overflow the FD-deep queues. The output stream cannot be stalled.
// Reference texture address: base + column*H + row.
//
// From the document: the second stage, depth filtering, reverse warping,
// blend mode, texture fetch, blending and 9x5 hole filling (Sec. 4.5,
// 5.2.2-5.4). Own choice: one reverse warp unit per view (1 virtual pixel per
// cycle where the document alternates views), the credit counter, and luma
// only.
module texture_mapping
  import vs_pkg::*;
#(
  parameter int unsigned H    = 1080,
  parameter int unsigned W    = 1920,
  parameter int unsigned FD   = 4096,
  parameter int unsigned IDLE = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [31:0]          yl_base,
  input  logic [31:0]          yr_base,
  input  logic [8:0]           alpha,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [7:0]           in_depth_l,
  input  logic [7:0]           in_depth_r,
  // homography table, reverse ports (left, right)
  output logic [1:0]           tab_en,
  output rel_t                 tab_rel [2],
  output logic [1:0][2:0]      tab_seg,
  input  homo_pair_t           tab_data [2],
  // bus masters: 0 left texture read, 1 right texture read
  output logic [1:0]           req,
  output bus_req_t             req_pl [2],
  input  logic [1:0]           gnt,
  input  logic [1:0]           rsp_valid,
  input  logic [63:0]          rsp_data,
  // synthesized luma
  output logic                 out_valid,
  output logic [7:0]           out_y,
  output logic                 out_hole,
  output logic                 out_filled,
  output logic [$clog2(H)-1:0] out_row,
  output logic [$clog2(W)-1:0] out_col,
  output logic                 out_last,
  // statistics
  output logic [31:0]          n_mode [4],
  output logic [31:0]          n_boundary,
  output logic [31:0]          n_stall
);
  localparam int unsigned UW  = $clog2(W);
  localparam int unsigned VW  = $clog2(H);
  localparam int unsigned CNW = $clog2(FD + 1);
  localparam int unsigned LIMIT = FD - 2 * H - 40;

  // ---------------- credit ----------------
  logic [CNW-1:0] cnt;
  logic           rdy_l, rdy_r, fire, bl_fire;
  logic           f_valid;

  assign in_ready = rdy_l && rdy_r && (cnt < CNW'(LIMIT));
  assign fire     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      n_stall <= '0;
    end else begin
      cnt <= cnt + CNW'(f_valid) - CNW'(bl_fire);
      if (in_valid && !in_ready) n_stall <= n_stall + 1;
    end
  end

  // ---------------- depth filtering ----------------
  logic [1:0]        fv;
  logic [1:0][7:0]   fd;
  logic [1:0]        fh, fhd;
  logic [1:0][VW-1:0] frow;
  logic [1:0][UW-1:0] fcol;

  depth_filter #(.H(H), .W(W)) u_df_l (
    .clk, .rst_n, .in_valid(fire), .in_ready(rdy_l), .in_depth(in_depth_l),
    .out_valid(fv[0]), .out_depth(fd[0]), .out_hole(fh[0]), .out_hole_dil(fhd[0]),
    .out_row(frow[0]), .out_col(fcol[0]), .out_last()
  );
  depth_filter #(.H(H), .W(W)) u_df_r (
    .clk, .rst_n, .in_valid(fire), .in_ready(rdy_r), .in_depth(in_depth_r),
    .out_valid(fv[1]), .out_depth(fd[1]), .out_hole(fh[1]), .out_hole_dil(fhd[1]),
    .out_row(frow[1]), .out_col(fcol[1]), .out_last()
  );
  assign f_valid = fv[0];

  // ---------------- reverse warping ----------------
  logic [1:0]          wv, win, wh;
  logic [1:0][UW-1:0]  wu;
  logic [1:0][VW-1:0]  wvv;
  logic [1:0][1:0]     wsb;

  for (genvar i = 0; i < 2; i++) begin : g_view
    logic [7:0] wd_unused;
    warp_unit #(.H(H), .W(W), .SBW(2)) u_warp (
      .clk, .rst_n, .in_valid(fv[i]), .in_rel(i == 0 ? REL_V2L : REL_V2R),
      .in_u(fcol[i]), .in_v(frow[i]), .in_depth(fd[i]), .in_side({fh[i], fhd[i]}),
      .tab_en(tab_en[i]), .tab_rel(tab_rel[i]), .tab_seg(tab_seg[i]), .tab_data(tab_data[i]),
      .out_valid(wv[i]), .out_u(wu[i]), .out_v(wvv[i]), .out_inside(win[i]),
      .out_depth(wd_unused), .out_hole(wh[i]), .out_side(wsb[i])
    );
  end

  logic [1:0] map, map_dil;
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      map[i]     = wv[i] && !wh[i] && !wsb[i][1] && win[i];
      map_dil[i] = map[i] && !wsb[i][0];
    end
  end

  blend_mode_t mode;
  logic        bnd;
  blend_mode u_mode (
    .map_l(map[0]), .map_r(map[1]), .map_l_dil(map_dil[0]), .map_r_dil(map_dil[1]),
    .mode, .boundary(bnd)
  );

  // ---------------- texture fetch ----------------
  logic [1:0]      tv;
  logic [1:0][7:0] td;
  logic [1:0]      tpop;
  logic [31:0]     yaddr [2];
  assign yaddr[0] = yl_base + 32'(wu[0]) * 32'(H) + 32'(wvv[0]);
  assign yaddr[1] = yr_base + 32'(wu[1]) * 32'(H) + 32'(wvv[1]);

  for (genvar i = 0; i < 2; i++) begin : g_fetch
    logic [31:0] nr, nb;
    tex_fetch #(.FD(FD), .IDLE(IDLE), .ID(i == 0 ? ID_YL : ID_YR)) u_fetch (
      .clk, .rst_n, .in_valid(wv[i]), .in_need(map[i]), .in_addr(yaddr[i]), .flush(1'b0),
      .req(req[i]), .req_pl(req_pl[i]), .gnt(gnt[i]),
      .rsp_valid(rsp_valid[i]), .rsp_data,
      .out_valid(tv[i]), .out_data(td[i]), .out_pop(tpop[i]), .n_reads(nr), .n_bytes(nb)
    );
  end

  // ---------------- blend queue ----------------
  typedef struct packed {
    blend_mode_t mode;
    logic        bnd;
    logic [1:0]  need;
  } bq_t;

  bq_t  bq_d, bq_q;
  logic bq_empty;
  assign bq_d = '{mode: mode, bnd: bnd, need: map};

  sync_fifo #(.DEPTH(FD), .DW($bits(bq_t))) u_bq (
    .clk, .rst_n, .push(wv[0]), .d(bq_d), .pop(bl_fire), .q(bq_q),
    .full(), .empty(bq_empty), .count()
  );

  logic hf_ready;
  assign bl_fire = !bq_empty && hf_ready && (!bq_q.need[0] || tv[0]) && (!bq_q.need[1] || tv[1]);
  assign tpop    = bl_fire ? bq_q.need : 2'b00;

  logic [7:0] bl_y;
  logic       bl_hole;
  blender #(.DW(8)) u_blend (
    .mode(bq_q.mode), .tex_l(td[0]), .tex_r(td[1]), .alpha, .tex_out(bl_y), .final_hole(bl_hole)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < 4; m++) n_mode[m] <= '0;
      n_boundary <= '0;
    end else if (bl_fire) begin
      n_mode[bq_q.mode] <= n_mode[bq_q.mode] + 1;
      if (bq_q.bnd) n_boundary <= n_boundary + 1;
    end
  end

  // ---------------- hole filling ----------------
  hole_fill #(.H(H), .W(W), .KH(9), .KW(5), .DW(8)) u_fill (
    .clk, .rst_n, .in_valid(bl_fire), .in_ready(hf_ready), .in_data(bl_y), .in_hole(bl_hole),
    .out_valid, .out_data(out_y), .out_hole, .out_filled, .out_row, .out_col, .out_last
  );

  logic unused;
  assign unused = ^{fv[1], frow[1], fcol[1], wv[1]};
endmodule
