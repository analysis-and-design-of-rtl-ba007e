// homo_interp: linear-interpolated approximation of the homography for an
// 8-bit depth level (the "LinearHomo" unit of the warper).
//
// Only N+1 = 9 homographies (depth 0, 32, ..., 224, 255) are estimated; the
// table stores for each of the 8 segments i the base matrix H(32i) and the
// increment H(32(i+1)) - H(32i) (the last increment ends at depth 255). For
// depth Z the segment is i = Z / 32 and the matrix is
//     H(Z) = Hbase_i + (Z mod 32) / 32 * Hinc_i.
// Each coefficient is computed as base + ((inc * (Z mod 32)) >>> 5), i.e. the
// product is truncated toward minus infinity, in the coefficient's own
// fixed-point format.
//
// Purely combinational; the caller selects the table entry with depth[7:5].
//
// From the document: linear interpolation between N=8 stored base/increment
// pairs, H(Z) = Hbase + (Z mod 32)/32 Hinc, and the coefficient formats of
// Table 5-3 (Sec. 5.1). Own choice: the result is floored and the unit is
// combinational (the document pipelines it).
module homo_interp
  import vs_pkg::*;
(
  input  homo_pair_t pair,
  input  logic [7:0] depth,
  output homo_t      h
);
  logic [LIA_SEG_W-1:0] f;
  assign f = depth[LIA_SEG_W-1:0];

  // every coefficient: base + floor(inc * f / 32); the fields are first
  // copied into plain signed variables of their own width
  logic signed [HA_W-1:0] b00, b01, b10, b11, i00, i01, i10, i11;
  logic signed [HB_W-1:0] b02, b12, i02, i12;
  logic signed [HC_W-1:0] b20, b21, i20, i21;
  logic signed [6:0]      fs;

  assign {b00, b01, b02, b10, b11, b12, b20, b21} = pair.base;
  assign {i00, i01, i02, i10, i11, i12, i20, i21} = pair.inc;
  assign fs = $signed({2'b00, f});

  function automatic logic signed [39:0] step(logic signed [39:0] b, logic signed [39:0] i,
                                               logic signed [6:0] k);
    logic signed [39:0] p;
    p = i * 40'(k);
    return b + (p >>> LIA_SEG_W);
  endfunction

  logic signed [39:0] r00, r01, r02, r10, r11, r12, r20, r21;
  assign r00 = step(40'(b00), 40'(i00), fs);
  assign r01 = step(40'(b01), 40'(i01), fs);
  assign r02 = step(40'(b02), 40'(i02), fs);
  assign r10 = step(40'(b10), 40'(i10), fs);
  assign r11 = step(40'(b11), 40'(i11), fs);
  assign r12 = step(40'(b12), 40'(i12), fs);
  assign r20 = step(40'(b20), 40'(i20), fs);
  assign r21 = step(40'(b21), 40'(i21), fs);

  assign h = {HA_W'(r00), HA_W'(r01), HB_W'(r02), HA_W'(r10), HA_W'(r11), HB_W'(r12),
              HC_W'(r20), HC_W'(r21)};
endmodule
