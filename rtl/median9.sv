// median9: median of nine 8-bit samples (3x3 depth median filter).
//
// The median is found as the fifth smallest value with five cascaded
// minimum selectors: each selector picks the minimum of the samples the
// earlier selectors have not yet taken and marks it as taken. The fifth
// selector's result is the median. This is the selector structure of the
// engine's depth median filter; its critical path is the chain of
// comparators through the five selectors.
//
// Purely combinational: out follows in within the same cycle.
//
// From the document: five cascaded minimum selectors (Sec. 5.3.1, Fig. 5-10).
// Own choice: the selectors are one combinational block.
module median9 #(
  parameter int unsigned DW = 8
) (
  input  logic [8:0][DW-1:0] in,
  output logic [DW-1:0]      out
);
  always_comb begin
    logic [8:0]    taken;
    logic [DW-1:0] m;
    int            idx;
    taken = '0;
    m     = '0;
    for (int s = 0; s < 5; s++) begin
      m   = '1;
      idx = 0;
      for (int i = 0; i < 9; i++) begin
        if (!taken[i] && in[i] <= m) begin
          m   = in[i];
          idx = i;
        end
      end
      taken[idx] = 1'b1;
    end
    out = m;
  end
endmodule
