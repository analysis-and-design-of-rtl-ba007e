// depth_mapping: first frame-level stage of the engine. It forward-warps the
// left and right reference depth maps into the virtual view and writes the
// two warped depth maps (DLV, DRV) to external memory, where the second
// stage reads them one frame later.
//
// A frame starts with a start pulse: mem_init zeroes DLV and DRV (0 marks a
// hole), then reference pixels are accepted. Pixels of both views share one
// warp_unit, so with the views interleaved each view advances at one pixel
// every two cycles. Pixels arrive in scan-column order, column by column and
// top to bottom within a column; the left view's columns run from right to
// left and the right view's from left to right, which lets later writes
// overwrite occluded background without a Z-buffer. The stage keeps the
// (column, row) counters of each view itself; the stream carries only the
// view and the depth. Depth 0 is raised to 1 before warping. Each warped
// pixel that lands inside the frame is written as one byte at
// base + column*H + row (a column of the virtual view is one memory row)
// through a burst_packer per view; pixels warped outside are dropped.
//
// Flow control: in_ready is low until clearing is finished and whenever a
// packer has less free space than the warp pipeline could still fill.
// done rises when all H*W pixels of both views were warped and written.
//
// From the document: forward warping in scan-column order, depth 0 raised to
// 1, warped depth written to external memory after clearing, one warp unit
// shared by both views (Sec. 4.1, 4.3, 5.2.1). Own choice: clearing before
// the first pixel, the packer margin used for in_ready, and the statistics
// outputs.
module depth_mapping
  import vs_pkg::*;
#(
  parameter int unsigned H    = 1080,
  parameter int unsigned W    = 1920,
  parameter int unsigned BUF  = 136,
  parameter int unsigned IDLE = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] dlv_base,
  input  logic [31:0] drv_base,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_view,      // 0 left, 1 right
  input  logic [7:0]  in_depth,
  output logic        done,
  // homography table, forward port
  output logic        tab_en,
  output rel_t        tab_rel,
  output logic [2:0]  tab_seg,
  input  homo_pair_t  tab_data,
  // bus masters: 0 DLV write, 1 DRV write, 2 clearing
  output logic [2:0]  req,
  output bus_req_t    req_pl [3],
  input  logic [2:0]  gnt,
  // statistics
  output logic [31:0] n_leveled,
  output logic [31:0] n_dropped,
  output logic [31:0] n_words,
  output logic [31:0] n_merged
);
  localparam int unsigned UW  = $clog2(W);
  localparam int unsigned VW  = $clog2(H);
  localparam int unsigned PCW = $clog2(H * W + 1);
  localparam int unsigned BCW = $clog2(BUF + 1);
  localparam int unsigned MARGIN = 24;

  // ---------------- clearing ----------------
  logic init_done;
  mem_init #(.H(H), .W(W), .ID(ID_INIT)) u_init (
    .clk, .rst_n, .start, .base0(dlv_base), .base1(drv_base), .done(init_done),
    .req(req[2]), .req_pl(req_pl[2]), .gnt(gnt[2])
  );

  // ---------------- scan-column counters ----------------
  logic [1:0][UW-1:0]  col;
  logic [1:0][VW-1:0]  row;
  logic [1:0][PCW-1:0] npix;
  logic [BCW-1:0]      free_l, free_r;
  logic                idle_l, idle_r;
  logic                fire;
  logic                active;

  assign in_ready = active && init_done && (free_l > BCW'(MARGIN)) && (free_r > BCW'(MARGIN))
                  && (npix[in_view] != PCW'(H * W));
  assign fire     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col    <= '0;
      row    <= '0;
      npix   <= '0;
      active <= 1'b0;
      n_leveled <= '0;
    end else if (start) begin
      col[0] <= UW'(W - 1);   // left view: right to left
      col[1] <= '0;           // right view: left to right
      row    <= '0;
      npix   <= '0;
      active <= 1'b1;
    end else if (fire) begin
      npix[in_view] <= npix[in_view] + 1'b1;
      if (in_depth == 8'd0) n_leveled <= n_leveled + 1;
      if (row[in_view] == VW'(H - 1)) begin
        row[in_view] <= '0;
        col[in_view] <= in_view ? col[1] + 1'b1 : col[0] - 1'b1;
      end else begin
        row[in_view] <= row[in_view] + 1'b1;
      end
    end
  end

  // ---------------- warping ----------------
  logic          w_valid, w_inside, w_hole;
  logic [UW-1:0] w_u;
  logic [VW-1:0] w_v;
  logic [7:0]    w_d;
  logic          w_view;

  warp_unit #(.H(H), .W(W), .SBW(1)) u_warp (
    .clk, .rst_n, .in_valid(fire), .in_rel(in_view ? REL_R2V : REL_L2V),
    .in_u(col[in_view]), .in_v(row[in_view]), .in_depth, .in_side(in_view),
    .tab_en, .tab_rel, .tab_seg, .tab_data,
    .out_valid(w_valid), .out_u(w_u), .out_v(w_v), .out_inside(w_inside),
    .out_depth(w_d), .out_hole(w_hole), .out_side(w_view)
  );

  logic [31:0] w_off;
  assign w_off = 32'(w_u) * 32'(H) + 32'(w_v);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_dropped <= '0;
    else if (w_valid && !w_inside) n_dropped <= n_dropped + 1;
  end

  logic [31:0] nw_l, nw_r, nm_l, nm_r;
  burst_packer #(.DEPTH(BUF), .IDLE(IDLE), .ID(ID_DLV)) u_pack_l (
    .clk, .rst_n, .in_valid(w_valid && w_inside && !w_view), .in_addr(dlv_base + w_off),
    .in_data(w_d), .flush(1'b0), .free(free_l), .idle(idle_l),
    .req(req[0]), .req_pl(req_pl[0]), .gnt(gnt[0]), .n_words(nw_l), .n_merged(nm_l)
  );
  burst_packer #(.DEPTH(BUF), .IDLE(IDLE), .ID(ID_DRV)) u_pack_r (
    .clk, .rst_n, .in_valid(w_valid && w_inside && w_view), .in_addr(drv_base + w_off),
    .in_data(w_d), .flush(1'b0), .free(free_r), .idle(idle_r),
    .req(req[1]), .req_pl(req_pl[1]), .gnt(gnt[1]), .n_words(nw_r), .n_merged(nm_r)
  );
  assign n_words  = nw_l + nw_r;
  assign n_merged = nm_l + nm_r;

  // ---------------- completion ----------------
  logic [4:0] pipe_cnt;   // pixels inside the warp pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pipe_cnt <= '0;
    else        pipe_cnt <= pipe_cnt + 5'(fire) - 5'(w_valid);
  end
  assign done = active && init_done && npix[0] == PCW'(H * W) && npix[1] == PCW'(H * W)
              && pipe_cnt == '0 && idle_l && idle_r;

  logic unused;
  assign unused = w_hole;
endmodule
