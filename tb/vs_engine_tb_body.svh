// vs_engine_tb_body.svh: shared body of the end-to-end testbenches
// tb_vs_engine (small frame) and tb_vs_engine_full (HD1080p, no parameter
// override). The including module declares localparams H and W, the
// signals listed below and the vs_engine instance "dut".
//
// The test runs one frame through both stages:
//  1. Loads forward (L2V, R2V) and reverse (V2L, V2R) homographies: pure
//     horizontal shifts whose size depends on depth, so the result is exact
//     under the linear interpolation. The reverse tables are written to the
//     write bank, the banks are swapped, and a wrong table is then written to
//     the new write bank, which the stage must not see.
//  2. Stage 1: both reference depth maps (background with a near object,
//     some zero depths) are streamed in, interleaved at random. The warped
//     DLV/DRV frames in the memory model are compared byte for byte with a
//     reference forward warp (later writes win, depth 0 raised to 1).
//  3. Stage 2: DLV/DRV are read back from the memory model and streamed in
//     scan-column order, twice back to back. Every output pixel is compared with a reference of
//     median/dilation filtering, reverse warp, texture fetch, blend (Table
//     3-1) and 9x5 hole filling with column-level accumulation.
//  4. Alongside stage 1, the homography estimator is given the frame corners
//     moved by (+5, -3) pixels and must return that translation exactly
//     (h00 = h11 = 1, h02 = 5, h12 = -3, all else 0), within one LSB.
// The memory model accepts requests with random bus_ready and answers reads
// in order after a random latency. Each mechanism is counted and a failure
// is recorded for any that never occurred: depth leveling, pixels dropped
// outside the frame, burst merges, the four blend modes, boundary special,
// filled and unfilled holes, stalls of both stages, bus contention and the
// homography bank swap and the homography estimate.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.

  localparam int UW = $clog2(W), VW = $clog2(H);
  localparam longint FB = longint'(H) * longint'(W);
  localparam longint DLV_B = 0, DRV_B = FB, YL_B = 2 * FB, YR_B = 3 * FB;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // memory model (byte array)
  byte unsigned mem [];
  typedef struct { int t; logic [63:0] d; logic [2:0] id; } rd_t;
  rd_t rdq [$];
  longint n_wr = 0, n_rd = 0, n_contend = 0, n_dm_stall = 0, n_tm_stall = 0;
  int bus_ready_pct = 70;

  always @(posedge clk) bus_ready <= ($urandom_range(0, 99) < bus_ready_pct);

  int cyc = 0;
  int k [2];
  always @(posedge clk) begin
    cyc++;
    if ($countones(dut.req) >= 2) n_contend++;
    if (dm_valid && !dm_ready) n_dm_stall++;
    if (tm_valid && !tm_ready) n_tm_stall++;
    if (bus_valid && bus_ready) begin
      automatic longint a = longint'(bus_req.addr) * 8;
      if (bus_req.we) begin
        for (int b = 0; b < 8; b++)
          if (bus_req.wstrb[b]) mem[a + b] = bus_req.wdata[8*b +: 8];
        n_wr++;
      end else begin
        automatic rd_t e;
        e.t = cyc + $urandom_range(2, 12);
        for (int b = 0; b < 8; b++) e.d[8*b +: 8] = mem[a + b];
        e.id = bus_req.id;
        rdq.push_back(e);
        n_rd++;
      end
    end
  end

  always @(posedge clk) begin
    rsp_valid <= 0;
    if (rdq.size() > 0 && rdq[0].t <= cyc) begin
      rsp_valid <= 1;
      rsp.rdata <= rdq[0].d;
      rsp.id    <= rdq[0].id;
      void'(rdq.pop_front());
    end
  end

  // homographies: u' = u + k32*Z/1024 + c32/32 (odd c32: never a rounding tie)
  localparam int K_L2V = -64, C_L2V = 3, K_R2V = 64, C_R2V = 1;
  localparam int K_V2L = 64, C_V2L = -3, K_V2R = -64, C_V2R = -1;

  function automatic homo_pair_t pair_of(rel_t rel, int s);
    case (rel)
      REL_L2V: return shift_pair(s, K_L2V, C_L2V);
      REL_R2V: return shift_pair(s, K_R2V, C_R2V);
      REL_V2L: return shift_pair(s, K_V2L, C_V2L);
      default: return shift_pair(s, K_V2R, C_V2R);
    endcase
  endfunction

  task automatic warp_u(input rel_t rel, input int u, input int v, input int z,
                       output int uo, output bit ins);
    int vo;
    bit tie;
    xform(lia(pair_of(rel, z / 32), z), u, v, W, H, uo, vo, ins, tie);
  endtask

  task automatic ht_write(rel_t rel, int s, homo_pair_t p);
    @(negedge clk);
    ht_we = 1; ht_rel = rel; ht_seg = 3'(s); ht_wdata = p;
    @(negedge clk);
    ht_we = 0;
  endtask

  // reference images
  logic [7:0] dref [2][];     // [view][c*H + r]
  logic [7:0] dv   [2][];     // expected DLV / DRV
  logic [7:0] med  [2][];
  bit         hm   [2][];
  bit         dl   [2][];
  logic [7:0] ey   [];        // expected output
  bit         eh   [], ef [];
  int n_lev_ref = 0, n_drop_ref = 0;
  int n_out = 0, n_filled = 0, n_unfilled = 0;

  function automatic int idx(int c, int r);
    return c * H + r;
  endfunction

  task automatic make_inputs();
    for (int v = 0; v < 2; v++) begin
      dref[v] = new[H * W];
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++) begin
          automatic int z = 12 + (c * 13) / W + $urandom_range(0, 3);
          // near object
          if (c >= W / 3 + v && c < W / 3 + v + W / 5 && r >= H / 4 && r < (3 * H) / 4)
            z = 70 + $urandom_range(0, 15);
          // a block warped out of the frame by both views: an unfillable hole
          if (c <= 8 && r >= H / 8 && r < H / 8 + 12) z = 250;
          // far-out pixels that warp outside and zero depths
          if ($urandom_range(0, 60) == 0) z = 250;
          if ($urandom_range(0, 40) == 0) z = 0;
          dref[v][idx(c, r)] = 8'(z);
        end
    end
    for (longint a = YL_B; a < YL_B + 2 * FB; a++) mem[a] = 8'($urandom_range(0, 255));
  endtask

  task automatic ref_stage1();
    for (int v = 0; v < 2; v++) begin
      dv[v] = new[H * W];
      foreach (dv[v][i]) dv[v][i] = 0;
      for (int k = 0; k < W; k++) begin
        automatic int c = (v == 0) ? W - 1 - k : k;
        for (int r = 0; r < H; r++) begin
          automatic int z = dref[v][idx(c, r)];
          automatic bit ins;
          automatic int u;
          if (z == 0) begin z = 1; n_lev_ref++; end
          warp_u(v == 0 ? REL_L2V : REL_R2V, c, r, z, u, ins);
          if (ins) dv[v][idx(u, r)] = 8'(z);
          else n_drop_ref++;
        end
      end
    end
  endtask

  task automatic ref_filter(int v);
    med[v] = new[H * W]; hm[v] = new[H * W]; dl[v] = new[H * W];
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        automatic logic [7:0] s [9];
        automatic int k = 0, z = 0;
        for (int dx = -1; dx <= 1; dx++)
          for (int dy = -1; dy <= 1; dy++) begin
            automatic int cc = c + dx, rr = r + dy;
            s[k] = (cc < 0 || cc >= W || rr < 0 || rr >= H) ? dv[v][idx(c, r)] : dv[v][idx(cc, rr)];
            if (s[k] == 0) z++;
            k++;
          end
        s.sort();
        med[v][idx(c, r)] = s[4];
        hm[v][idx(c, r)]  = (z >= 5);
      end
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        automatic bit o = 0;
        for (int dx = -1; dx <= 1; dx++)
          for (int dy = -1; dy <= 1; dy++)
            if (c + dx >= 0 && c + dx < W && r + dy >= 0 && r + dy < H && hm[v][idx(c + dx, r + dy)]) o = 1;
        dl[v][idx(c, r)] = o;
      end
  endtask

  task automatic ref_stage2();
    logic [7:0] y [];
    bit h [];
    y = new[H * W]; h = new[H * W];
    ey = new[H * W]; eh = new[H * W]; ef = new[H * W];
    ref_filter(0);
    ref_filter(1);
    for (int i = 0; i < H * W; i++) begin
      automatic int c = i / H, r = i % H;
      automatic bit mp [2], md [2];
      automatic int t [2];
      for (int v = 0; v < 2; v++) begin
        automatic bit ins;
        automatic int u = 0;
        ins = 0;
        if (!hm[v][i]) warp_u(v == 0 ? REL_V2L : REL_V2R, c, r, med[v][i], u, ins);
        mp[v] = !hm[v][i] && ins;
        md[v] = mp[v] && !dl[v][i];
        t[v]  = mp[v] ? mem[(v == 0 ? YL_B : YR_B) + u * H + r] : 0;
      end
      h[i] = 0;
      if (!mp[0] && !mp[1]) begin y[i] = 0; h[i] = 1; end
      else if (!mp[0]) y[i] = 8'(t[1]);
      else if (!mp[1]) y[i] = 8'(t[0]);
      else if (md[0] != md[1]) y[i] = 8'(md[0] ? t[0] : t[1]);
      else y[i] = 8'(((256 - alpha) * t[0] + alpha * t[1] + 128) >> 8);
    end
    // hole filling, columns left of the centre use the filled values
    for (int i = 0; i < H * W; i++) begin ey[i] = y[i]; eh[i] = h[i]; ef[i] = 0; end
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++)
        if (h[idx(c, r)]) begin
          automatic longint acc = 0, ws = 0;
          for (int dx = -2; dx <= 2; dx++)
            for (int dy = -4; dy <= 4; dy++) begin
              automatic int cc = c + dx, rr = r + dy;
              if (cc >= 0 && cc < W && rr >= 0 && rr < H && !(dx == 0 && dy == 0)) begin
                automatic bit th = (dx < 0) ? eh[idx(cc, rr)] : h[idx(cc, rr)];
                automatic int tv = (dx < 0) ? ey[idx(cc, rr)] : y[idx(cc, rr)];
                if (!th) begin
                  automatic int w = (5 - (dy < 0 ? -dy : dy)) * (3 - (dx < 0 ? -dx : dx));
                  acc += w * tv;
                  ws  += w;
                end
              end
            end
          if (ws != 0) begin
            ey[idx(c, r)] = 8'((acc + ws / 2) / ws);
            eh[idx(c, r)] = 0;
            ef[idx(c, r)] = 1;
          end
        end
  endtask

  // output checker
  always @(posedge clk) if (rst_n && y_valid) begin
    automatic int i = n_out % (H * W), c = i / H, r = i % H;
    `TB_CHECK(y_row == VW'(r) && y_col == UW'(c), $sformatf("position %0d: got (%0d,%0d)", i, y_row, y_col))
    `TB_CHECK(y_data == ey[i] && y_hole == eh[i] && y_filled == ef[i],
      $sformatf("pixel (%0d,%0d): got %0d h%0d f%0d exp %0d h%0d f%0d", r, c, y_data, y_hole, y_filled, ey[i], eh[i], ef[i]))
    if (y_filled) n_filled++;
    if (y_hole) n_unfilled++;
    n_out++;
    if (n_out % (H * W) == 0) `TB_CHECK(y_last, "last")
  end

  // homography estimation: corners shifted by (+5, -3) pixels
  int n_mh = 0;
  initial begin
    int us [4], vs [4];
    longint got [8], exp [8];
    us = '{W - 1, 0, 0, W - 1};
    vs = '{0, H - 1, 0, H - 1};
    for (int p = 0; p < 4; p++) begin
      mh_dst_u[p] = 20'((us[p] + 5) * 64);
      mh_dst_v[p] = 20'((vs[p] - 3) * 64);
    end
    @(posedge rst_n);
    repeat (5) @(posedge clk);
    mh_start <= 1'b1;
    @(posedge clk) mh_start <= 1'b0;
    @(posedge clk);
    `TB_CHECK(mh_busy, "homography estimate busy")
    while (!mh_done) @(posedge clk);
    got = '{$signed(HA_W'(mh_h.h00)), $signed(HA_W'(mh_h.h01)), $signed(HB_W'(mh_h.h02)),
            $signed(HA_W'(mh_h.h10)), $signed(HA_W'(mh_h.h11)), $signed(HB_W'(mh_h.h12)),
            $signed(HC_W'(mh_h.h20)), $signed(HC_W'(mh_h.h21))};
    exp = '{65536, 0, 5 * 32, 0, 65536, -3 * 32, 0, 0};
    for (int i = 0; i < 8; i++)
      `TB_CHECK(got[i] - exp[i] >= -1 && got[i] - exp[i] <= 1,
        $sformatf("homography estimate h[%0d] got %0d exp %0d", i, got[i], exp[i]))
    n_mh++;
  end

  task automatic mech(string name, longint n);
    $display("mechanism %-22s %0d", name, n);
    `TB_CHECK(n > 0, $sformatf("mechanism %s never happened", name))
  endtask

  initial begin
    mem = new[4 * FB];
    foreach (mem[i]) mem[i] = 8'hA5;    // clearing must overwrite DLV/DRV
    ht_we = 0; ht_swap = 0; ht_rel = REL_L2V; ht_seg = 0; ht_wdata = '0;
    alpha = 9'd96;
    dlv_base = 32'(DLV_B); drv_base = 32'(DRV_B); yl_base = 32'(YL_B); yr_base = 32'(YR_B);
    dm_start = 0; dm_valid = 0; dm_view = 0; dm_depth = 0;
    tm_valid = 0; tm_depth_l = 0; tm_depth_r = 0;
    make_inputs();
    ref_stage1();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // homographies; reverse relations go to the write bank, then swap
    for (int s = 0; s < 8; s++) begin
      ht_write(REL_L2V, s, pair_of(REL_L2V, s));
      ht_write(REL_R2V, s, pair_of(REL_R2V, s));
      ht_write(REL_V2L, s, pair_of(REL_V2L, s));
      ht_write(REL_V2R, s, pair_of(REL_V2R, s));
    end
    @(negedge clk); ht_swap = 1; @(negedge clk); ht_swap = 0;
    `TB_CHECK(dut.wbank == 1'b1, "bank swapped")
    for (int s = 0; s < 8; s++) begin
      ht_write(REL_V2L, s, shift_pair(s, 0, 32 * 5 + 1));
      ht_write(REL_V2R, s, shift_pair(s, 0, -32 * 5 - 1));
    end

    // ---------------- stage 1 ----------------
    @(negedge clk); dm_start = 1; @(negedge clk); dm_start = 0;
    begin
      k[0] = 0; k[1] = 0;
      while (k[0] < H * W || k[1] < H * W) begin
        automatic int v = (k[0] == H * W) ? 1 : (k[1] == H * W) ? 0 : $urandom_range(0, 1);
        automatic int c = (v == 0) ? W - 1 - k[v] / H : k[v] / H;
        automatic int r = k[v] % H;
        while ($urandom_range(0, 9) == 0) begin dm_valid = 0; @(negedge clk); end
        dm_valid = 1; dm_view = v[0]; dm_depth = dref[v][idx(c, r)];
        #1;
        while (!dm_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        @(negedge clk);
        k[v]++;
      end
      dm_valid = 0;
    end
    $display("stage 1 input done at cycle %0d", cyc);
    while (!dm_done) @(negedge clk);
    $display("stage 1 done at cycle %0d", cyc);
    repeat (20) @(negedge clk);
    begin
      int bad = 0;
      for (int v = 0; v < 2; v++)
        for (int i = 0; i < H * W; i++)
          if (mem[(v == 0 ? DLV_B : DRV_B) + i] != dv[v][i]) begin
            if (bad < 10) $display("FAIL D%0sV byte (%0d,%0d) got %0d exp %0d", v ? "R" : "L",
                                   i % H, i / H, mem[(v == 0 ? DLV_B : DRV_B) + i], dv[v][i]);
            bad++;
          end
      checks++;
      if (bad) failures++;
    end
    `TB_CHECK(dut.s1_lev == 32'(n_lev_ref), $sformatf("leveled %0d exp %0d", dut.s1_lev, n_lev_ref))
    `TB_CHECK(dut.s1_drop == 32'(n_drop_ref), $sformatf("dropped %0d exp %0d", dut.s1_drop, n_drop_ref))

    // ---------------- stage 2 ----------------
    for (int i = 0; i < H * W; i++) begin
      dv[0][i] = mem[DLV_B + i];
      dv[1][i] = mem[DRV_B + i];
    end
    ref_stage2();
    bus_ready_pct = 45;
    // two frames back to back: the second one waits while the filters of
    // the first flush their windows (stage 2 stall)
    for (int i = 0; i < 2 * H * W; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 9) == 0) begin tm_valid = 0; @(negedge clk); end
      tm_valid = 1; tm_depth_l = dv[0][i % (H * W)]; tm_depth_r = dv[1][i % (H * W)];
      #1;
      while (!tm_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    tm_valid = 0;
    $display("stage 2 input done at cycle %0d", cyc);
    while (n_out < 2 * H * W) @(negedge clk);
    repeat (20) @(negedge clk);
    `TB_CHECK(n_out == 2 * H * W, "output count")

    while (n_mh == 0) @(posedge clk);   // the estimate may still be running
    mech("depth leveling", dut.s1_lev);
    mech("dropped outside frame", dut.s1_drop);
    mech("burst merge", dut.s1_merged);
    mech("final hole mode", dut.s2_mode[BM_FINAL_HOLE]);
    mech("right only mode", dut.s2_mode[BM_R_ONLY]);
    mech("left only mode", dut.s2_mode[BM_L_ONLY]);
    mech("weighted mode", dut.s2_mode[BM_WEIGHTED]);
    mech("boundary special", dut.s2_bnd);
    mech("hole filled", n_filled);
    mech("hole left unfilled", n_unfilled);
    mech("stage 1 stall", n_dm_stall);
    mech("stage 2 stall", n_tm_stall);
    mech("bus contention", n_contend);
    mech("texture reads", n_rd);
    mech("homography estimate", n_mh);
    $display("bus writes %0d reads %0d cycles %0d", n_wr, n_rd, cyc);
    `TB_DONE
  end
