// homo_table: on-chip store of the homography coefficients.
//
// Each word is a 308-bit base/increment pair (homo_pair_t) for one of the 8
// depth segments of one mapping relation. The forward relations (left to
// virtual, right to virtual) are used by the depth-mapping stage in the same
// frame they are estimated, so they have one copy: words 0..15. The reverse
// relations (virtual to left, virtual to right) are used one frame later by
// the texture-mapping stage, so they are ping-pong buffered: words 16..31
// and 32..47. 48 words in all. The preprocess (or a host) writes through the
// write port into the reverse bank that is not being read; a swap pulse at
// the frame boundary exchanges the banks.
//
// Three synchronous read ports: one for the forward warper of the first
// stage and one for each of the two reverse warpers of the second stage;
// data is valid the cycle after the address. Bank selection resets to bank 0 for writes.
//
// From the document: 48 words of 308 bits, reverse relations ping-pong
// buffered (Sec. 5.1.2). Own choice: three read ports so that both reverse
// warp units read in the same cycle.
module homo_table
  import vs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  rel_t              wrel,
  input  logic [2:0]        wseg,
  input  homo_pair_t        wdata,
  input  logic              swap,
  // port A: forward warping
  input  logic              a_en,
  input  rel_t              a_rel,   // REL_L2V or REL_R2V
  input  logic [2:0]        a_seg,
  output homo_pair_t        a_data,
  // port B: reverse warping
  input  logic              b_en,
  input  rel_t              b_rel,   // REL_V2L or REL_V2R
  input  logic [2:0]        b_seg,
  output homo_pair_t        b_data,
  // port C: second reverse-warping unit
  input  logic              c_en,
  input  rel_t              c_rel,
  input  logic [2:0]        c_seg,
  output homo_pair_t        c_data,
  output logic              wbank
);
  homo_pair_t mem [48];

  function automatic logic [5:0] addr_of(rel_t r, logic [2:0] s, logic bank);
    if (r == REL_L2V || r == REL_R2V) return {2'b00, r[0], s};
    else return 6'd16 + (bank ? 6'd16 : 6'd0) + {2'b00, r[0], s};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wbank <= 1'b0;
    else if (swap) wbank <= ~wbank;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr_of(wrel, wseg, wbank)] <= wdata;
    if (a_en) a_data <= mem[addr_of(a_rel, a_seg, 1'b0)];
    if (b_en) b_data <= mem[addr_of(b_rel, b_seg, ~wbank)];
    if (c_en) c_data <= mem[addr_of(c_rel, c_seg, ~wbank)];
  end
endmodule
