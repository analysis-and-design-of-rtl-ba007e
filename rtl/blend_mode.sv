// blend_mode: decides how a virtual-view pixel is blended from the two
// warped views, following the blend-mode truth table of the engine.
//
// Inputs are the "mapped" (non-hole) flags of the left and right warped
// views after median filtering, and the same flags after the hole maps were
// dilated. Where only one view is mapped that view is used; where neither
// is, the pixel is a final hole left to the hole filler. Where both are
// mapped but the dilated maps differ, the pixel lies on a depth boundary
// ("boundary special"): the view whose dilated map still shows it as mapped
// is used alone, to keep boundary noise of the other view out. Otherwise the
// two are added with weights.
//
// Purely combinational.
//
// From the document: the truth table of Table 3-1 (Sec. 3.3), including the
// boundary special. Own choice: the encoding of the modes (vs_pkg).
module blend_mode
  import vs_pkg::*;
(
  input  logic        map_l,      // left view mapped (after median)
  input  logic        map_r,      // right view mapped (after median)
  input  logic        map_l_dil,  // left view mapped after dilation of its hole map
  input  logic        map_r_dil,  // right view mapped after dilation of its hole map
  output blend_mode_t mode,
  output logic        boundary    // boundary special
);
  always_comb begin
    boundary = 1'b0;
    unique case ({map_l, map_r})
      2'b00: mode = BM_FINAL_HOLE;
      2'b01: mode = BM_R_ONLY;
      2'b10: mode = BM_L_ONLY;
      default: begin
        if (map_l_dil == map_r_dil) begin
          mode = BM_WEIGHTED;
        end else begin
          mode     = map_l_dil ? BM_L_ONLY : BM_R_ONLY;
          boundary = 1'b1;
        end
      end
    endcase
  end
endmodule
