// tb_vs_engine_full: end-to-end test of vs_engine. Full HD1080p frame: the top is instantiated with its default parameters (no override), and one complete frame goes through both stages.
// The test itself (memory model, homographies, reference model of both
// stages and the mechanism counters) is in vs_engine_tb_body.svh.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_vs_engine_full;
  import vs_pkg::*;
  import tb_ref_pkg::*;
  localparam int H = 1080, W = 1920;

  logic                 ht_we, ht_swap;
  rel_t                 ht_rel;
  logic [2:0]           ht_seg;
  homo_pair_t           ht_wdata;
  logic [8:0]           alpha;
  logic                 mh_start = 0, mh_busy, mh_done;
  logic signed [19:0]   mh_dst_u [4], mh_dst_v [4];
  homo_t                mh_h;
  logic [31:0]          dlv_base, drv_base, yl_base, yr_base;
  logic                 dm_start, dm_valid, dm_ready, dm_view, dm_done;
  logic [7:0]           dm_depth;
  logic                 tm_valid, tm_ready;
  logic [7:0]           tm_depth_l, tm_depth_r;
  logic                 y_valid, y_hole, y_filled, y_last;
  logic [7:0]           y_data;
  logic [$clog2(H)-1:0] y_row;
  logic [$clog2(W)-1:0] y_col;
  logic                 bus_valid, bus_ready = 0, rsp_valid = 0;
  bus_req_t             bus_req;
  bus_rsp_t             rsp = '0;

  vs_engine dut (.*);

  initial begin
    repeat (64'(H) * W * 12 + 200000) @(posedge clk);
    failures++; $display("watchdog"); `TB_DONE
  end

`include "vs_engine_tb_body.svh"
endmodule
