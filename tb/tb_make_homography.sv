// tb_make_homography: random homographies near the identity (scale and
// shear up to a few percent, shifts up to 60 pixels, projective terms up
// to 2e-6) map the four frame corners; the destinations, rounded to the
// input format, go into make_homography at the default 1920x1080 size.
// The reference runs the same Gauss-Seidel sweeps on the same rounded points
// in floating point and rounds the result to the stored formats; every
// coefficient must match within one least significant bit. The result must
// also agree with the homography the points came from to within the
// precision of the rounded points, which shows the iteration converged in
// the 20 sweeps. Also checks that a solve takes 8 * (10 + 101) cycles per
// sweep.
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_make_homography;
  import vs_pkg::*;
  localparam int W = 1920, H = 1080, IT = 20, FD = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  logic signed [FD+13:0] du [4], dv [4];
  homo_t h;

  make_homography #(.W(W), .H(H), .IT(IT), .FD(FD)) dut (
    .clk, .rst_n, .start, .dst_u(du), .dst_v(dv), .busy, .done, .h);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); `TB_DONE
  end

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * ($urandom() / 4294967295.0);
  endfunction

  function automatic longint q(real v, int f);
    return longint'($floor(v * (2.0 ** f) + 0.5));
  endfunction

  initial begin
    real m [3][3];
    real us [4], vs [4], ud [4], vd [4];
    real a [8][8], b [8], x [8];
    longint got [8], exp [8];
    int fb [8];
    int t0;
    fb = '{16, 16, 5, 16, 16, 5, 27, 27};
    us = '{W - 1, 0, 0, W - 1};
    vs = '{0, H - 1, 0, H - 1};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      m[0][0] = 1 + rnd(-0.03, 0.03); m[0][1] = rnd(-0.02, 0.02); m[0][2] = rnd(-60, 60);
      m[1][0] = rnd(-0.02, 0.02); m[1][1] = 1 + rnd(-0.03, 0.03); m[1][2] = rnd(-20, 20);
      m[2][0] = rnd(-2e-6, 2e-6); m[2][1] = rnd(-2e-6, 2e-6); m[2][2] = 1;
      for (int p = 0; p < 4; p++) begin
        automatic real w = m[2][0] * us[p] + m[2][1] * vs[p] + 1;
        du[p] = (FD+14)'(q((m[0][0] * us[p] + m[0][1] * vs[p] + m[0][2]) / w, FD));
        dv[p] = (FD+14)'(q((m[1][0] * us[p] + m[1][1] * vs[p] + m[1][2]) / w, FD));
        ud[p] = real'(du[p]) / (2.0 ** FD);
        vd[p] = real'(dv[p]) / (2.0 ** FD);
      end
      // the rearranged system: rows u1 u2 u3 v1 v2 v3 v4 u4
      for (int r = 0; r < 8; r++) begin
        automatic int p = (r < 3) ? r : (r < 7) ? r - 3 : 3;
        automatic bit isu = (r < 3) || (r == 7);
        automatic real d = isu ? ud[p] : vd[p];
        for (int c = 0; c < 8; c++) a[r][c] = 0;
        if (isu) begin a[r][0] = us[p]; a[r][1] = vs[p]; a[r][2] = 1; end
        else     begin a[r][3] = us[p]; a[r][4] = vs[p]; a[r][5] = 1; end
        a[r][6] = -d * us[p];
        a[r][7] = -d * vs[p];
        b[r] = d;
      end
      for (int i = 0; i < 8; i++) x[i] = 0;
      for (int k = 0; k < IT; k++)
        for (int i = 0; i < 8; i++) begin
          automatic real s = b[i];
          for (int j = 0; j < 8; j++) if (j != i) s -= a[i][j] * x[j];
          x[i] = s / a[i][i];
        end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t0 = $time;
      while (!done) @(negedge clk);
      `TB_CHECK(($time - t0) / 10 == IT * 8 * 111 + 1, $sformatf("solve took %0d cycles", ($time - t0) / 10))
      got = '{$signed(HA_W'(h.h00)), $signed(HA_W'(h.h01)), $signed(HB_W'(h.h02)),
              $signed(HA_W'(h.h10)), $signed(HA_W'(h.h11)), $signed(HB_W'(h.h12)),
              $signed(HC_W'(h.h20)), $signed(HC_W'(h.h21))};
      for (int i = 0; i < 8; i++) begin
        automatic real tv = m[i / 3][i % 3];
        automatic longint e = got[i] - q(x[i], fb[i]);
        `TB_CHECK(e >= -1 && e <= 1, $sformatf("case %0d h[%0d] got %0d exp %0d", n, i, got[i], q(x[i], fb[i])))
        // converged: close to the source matrix (points were rounded to 1/64 pixel)
        `TB_CHECK((real'(got[i]) / (2.0 ** fb[i]) - tv) < 2e-3 * (i % 3 == 2 ? 100 : 1) * (i >= 6 ? 1e-3 : 1)
               && (tv - real'(got[i]) / (2.0 ** fb[i])) < 2e-3 * (i % 3 == 2 ? 100 : 1) * (i >= 6 ? 1e-3 : 1),
          $sformatf("case %0d h[%0d] = %g far from %g", n, i, real'(got[i]) / (2.0 ** fb[i]), tv))
      end
    end
    `TB_DONE
  end
endmodule
