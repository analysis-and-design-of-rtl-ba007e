// div_pipe: pipelined unsigned restoring divider, one quotient bit per stage.
//
// Stage i decides quotient bit QW-1-i by comparing the partial remainder
// with the divisor shifted left by QW-1-i and subtracting when it fits, so a
// new division can start every cycle and each result appears QW cycles
// later. The caller must guarantee dividend < divisor * 2**QW (the quotient
// fits in QW bits) and a non-zero divisor. A sideband word travels with each
// operation. This stands in for the 16-stage pipelined divider of the
// homography transform.
//
// From the document: a 16-stage pipelined divider (Fig. 5-6 uses a library
// divider). Own choice: the restoring algorithm, one quotient bit per stage.
module div_pipe #(
  parameter int unsigned NW  = 44,   // dividend width
  parameter int unsigned DW  = 42,   // divisor width
  parameter int unsigned QW  = 16,   // quotient bits = pipeline stages
  parameter int unsigned SBW = 1     // sideband width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [NW-1:0]  dividend,
  input  logic [DW-1:0]  divisor,
  input  logic [SBW-1:0] in_side,
  output logic           out_valid,
  output logic [QW-1:0]  quotient,
  output logic [SBW-1:0] out_side
);
  localparam int unsigned XW = (NW > DW + QW) ? NW : DW + QW;

  logic [QW:0]           v;
  logic [QW:0][XW-1:0]   rem;
  logic [QW:0][DW-1:0]   dvs;
  logic [QW:0][QW-1:0]   q;
  logic [QW:0][SBW-1:0]  sb;

  assign v[0]   = in_valid;
  assign rem[0] = XW'(dividend);
  assign dvs[0] = divisor;
  assign q[0]   = '0;
  assign sb[0]  = in_side;

  for (genvar i = 0; i < QW; i++) begin : g_st
    logic [XW-1:0] sh;
    logic          fits;
    assign sh   = XW'(dvs[i]) << (QW - 1 - i);
    assign fits = (rem[i] >= sh);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[i+1] <= 1'b0;
      else        v[i+1] <= v[i];
    end
    always_ff @(posedge clk) begin
      rem[i+1] <= fits ? rem[i] - sh : rem[i];
      dvs[i+1] <= dvs[i];
      q[i+1]   <= q[i] | (fits ? (QW'(1) << (QW - 1 - i)) : '0);
      sb[i+1]  <= sb[i];
    end
  end

  assign out_valid = v[QW];
  assign quotient  = q[QW];
  assign out_side  = sb[QW];
endmodule
