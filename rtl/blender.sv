// blender: blends one texture sample of the virtual view from the left and
// right warped samples.
//
// For "weighted add" the output is (1-alpha)*L + alpha*R, where alpha is the
// camera-distance weight |t-tL| / (|t-tL| + |t-tR|) computed once per video
// from the camera translations. "L only" and "R only" pass one view through,
// and a final hole outputs 0 with the final-hole flag set for the hole
// filler. alpha is an unsigned fraction with 8 fractional bits (0..256 means
// 0..1); the result is rounded to nearest. The fixed-point format of alpha
// is this implementation's choice.
//
// Purely combinational.
//
// From the document: the four blending modes and the weighted add of Eq.
// (3-6). Own choice: alpha as a 9-bit fraction of 256 and rounding to
// nearest.
module blender
  import vs_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  blend_mode_t   mode,
  input  logic [DW-1:0] tex_l,
  input  logic [DW-1:0] tex_r,
  input  logic [8:0]    alpha,      // weight of the right view, /256
  output logic [DW-1:0] tex_out,
  output logic          final_hole
);
  logic [DW+9:0] acc;
  always_comb begin
    acc        = (DW+10)'(tex_l) * (DW+10)'(9'd256 - alpha) + (DW+10)'(tex_r) * (DW+10)'(alpha) + (DW+10)'(128);
    final_hole = 1'b0;
    unique case (mode)
      BM_WEIGHTED:   tex_out = acc[DW+7:8];
      BM_L_ONLY:     tex_out = tex_l;
      BM_R_ONLY:     tex_out = tex_r;
      default: begin
        tex_out    = '0;
        final_hole = 1'b1;
      end
    endcase
  end
endmodule
