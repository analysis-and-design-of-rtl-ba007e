// circ_fifo: column-height circular FIFO used as a delay line by the
// column-level filters (median, dilation, hole filling).
//
// Every push writes the newest sample into a circular buffer and, in the
// same cycle, reads out the sample that was stored DEPTH pushes earlier, so
// q holds the pixel of the previous column stage at the same row. This is the
// "push the newest, pop the previous column" behaviour of the circular FIFOs
// of the filter units; it maps to one two-port SRAM (one write, one read per
// cycle). DEPTH defaults to the column height of a 1080p frame.
//
// Timing: q is registered and is valid one cycle after a push. Before DEPTH
// pushes have been made q returns whatever the memory held; the users mask
// those samples by frame position. The pointer resets to 0; the memory and q
// are not reset (an SRAM is not).
//
// From the document: the circular FIFO of column height used for data reuse
// (Sec. 5.3.1, Fig. 5-11). Own choice: read-before-write on one address,
// modelled as an array (a two-port SRAM in the document).
module circ_fifo #(
  parameter int unsigned DEPTH = 1080,
  parameter int unsigned DW    = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (push) ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (push) begin
      q        <= mem[ptr];
      mem[ptr] <= d;
    end
  end
endmodule
