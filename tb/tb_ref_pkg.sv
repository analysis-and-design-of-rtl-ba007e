// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: the linear-interpolated homography with
// integer arithmetic, and the homography transform in floating point with
// round-half-up to an integer pixel.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
package tb_ref_pkg;
  import vs_pkg::*;

  typedef struct {
    longint c [8];   // h00 h01 h02 h10 h11 h12 h20 h21 as signed integers
  } coef_t;

  function automatic coef_t unpack_h(homo_t h);
    coef_t r;
    r.c[0] = longint'($signed(HA_W'(h.h00)));
    r.c[1] = longint'($signed(HA_W'(h.h01)));
    r.c[2] = longint'($signed(HB_W'(h.h02)));
    r.c[3] = longint'($signed(HA_W'(h.h10)));
    r.c[4] = longint'($signed(HA_W'(h.h11)));
    r.c[5] = longint'($signed(HB_W'(h.h12)));
    r.c[6] = longint'($signed(HC_W'(h.h20)));
    r.c[7] = longint'($signed(HC_W'(h.h21)));
    return r;
  endfunction

  function automatic homo_t pack_h(coef_t r);
    homo_t h;
    h.h00 = HA_W'(r.c[0]); h.h01 = HA_W'(r.c[1]); h.h02 = HB_W'(r.c[2]);
    h.h10 = HA_W'(r.c[3]); h.h11 = HA_W'(r.c[4]); h.h12 = HB_W'(r.c[5]);
    h.h20 = HC_W'(r.c[6]); h.h21 = HC_W'(r.c[7]);
    return h;
  endfunction

  // H(Z) = base + floor(inc * (Z mod 32) / 32)
  function automatic coef_t lia(homo_pair_t p, int z);
    coef_t b = unpack_h(p.base);
    coef_t i = unpack_h(p.inc);
    coef_t r;
    int f = z % 32;
    for (int k = 0; k < 8; k++) begin
      longint m = i.c[k] * f;
      r.c[k] = b.c[k] + ((m >= 0) ? m / 32 : -((-m + 31) / 32));
    end
    return r;
  endfunction

  // Homography transform; tie is set when the exact result is too close to
  // a rounding boundary for a floating-point reference to be trusted.
  task automatic xform(input coef_t h, input int u, input int v, input int W, input int H,
                       output int uo, output int vo, output bit ins, output bit tie);
    real a00 = h.c[0] / 65536.0, a01 = h.c[1] / 65536.0, a02 = h.c[2] / 32.0;
    real a10 = h.c[3] / 65536.0, a11 = h.c[4] / 65536.0, a12 = h.c[5] / 32.0;
    real a20 = h.c[6] / 134217728.0, a21 = h.c[7] / 134217728.0;
    real den = a20 * u + a21 * v + 1.0;
    real x, y;
    tie = 0;
    if (den == 0.0) begin
      ins = 0; uo = 0; vo = 0;
      return;
    end
    x  = (a00 * u + a01 * v + a02) / den;
    y  = (a10 * u + a11 * v + a12) / den;
    if (x > 1.0e6 || x < -1.0e6 || y > 1.0e6 || y < -1.0e6) begin
      ins = 0; uo = 0; vo = 0;
      return;
    end
    uo = int'($floor(x + 0.5));
    vo = int'($floor(y + 0.5));
    if ((x - $floor(x) > 0.4999 && x - $floor(x) < 0.5001) ||
        (y - $floor(y) > 0.4999 && y - $floor(y) < 0.5001)) tie = 1;
    ins = (uo >= 0) && (uo < W) && (vo >= 0) && (vo < H);
  endtask

  // A pure horizontal-shift homography pair for segment s: u' = u + k*Z + c,
  // v' = v, exact under the linear interpolation (k*32 and c in 1/32 pixel).
  function automatic homo_pair_t shift_pair(int s, int k32, int c32);
    coef_t b, i;
    homo_pair_t p;
    for (int q = 0; q < 8; q++) begin
      b.c[q] = 0; i.c[q] = 0;
    end
    b.c[0] = 65536; b.c[4] = 65536;
    b.c[2] = longint'(c32 + k32 * s);     // at Z = 32 s, in 1/32 pixel: k32 * 32 s / 32
    i.c[2] = longint'(k32);               // over 32 depth levels: k32 * 32 / 32
    p.base = pack_h(b);
    p.inc  = pack_h(i);
    return p;
  endfunction
endpackage
