// hole_fill: column-level accumulated bilinear hole filling.
//
// Pixels that neither reference view could supply ("final holes") are filled
// with a distance-weighted average of the non-hole pixels in a KH x KW window
// (9 rows x 5 columns for luma; 5x3 is used for chroma). The weight of a
// neighbour at row offset dy and column offset dx is
//     (KH/2 + 1 - |dy|) * (KW/2 + 1 - |dx|),
// i.e. the separable triangle (bilinear) kernel; the result is the weighted
// sum divided by the sum of the weights used, rounded to nearest. A hole with
// no usable neighbour stays a hole and outputs 0.
//
// The window is built in scan-column order like col_window: KW-1 circular
// FIFOs of column height hold the previous columns. The filled centre column
// is written back into the FIFO that holds the columns left of the centre,
// with its hole flags cleared where it was filled, so holes met later can use
// pixels filled earlier (column-level accumulation). Within the centre
// column, pixels above the centre are used as received. Because of the
// write-back, the FIFO after the centre column holds H-1-KH/2 samples and
// the others H or H-1, as in col_window.
//
// The interpolation is combinational on the registered window, so a filled
// pixel is available in the cycle its window is complete (this design's
// choice). Interface and timing as col_window: valid/ready input, one pixel
// per beat, self-flushing after H*W pixels, out_valid pulses with the pixel
// at (out_row, out_col), (KW/2)*H + KH/2 + 1 beats after it entered.
//
// From the document: 9x5 (luma) or 5x3 (chroma) window, column-level
// buffering with circular FIFOs and write-back of the filled column (Sec.
// 3.4, 5.3.2). Own choice: the triangle weights, round-to-nearest division
// and the combinational interpolation.
module hole_fill #(
  parameter int unsigned H  = 1080,
  parameter int unsigned W  = 1920,
  parameter int unsigned KH = 9,
  parameter int unsigned KW = 5,
  parameter int unsigned DW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [DW-1:0]        in_data,
  input  logic                 in_hole,
  output logic                 out_valid,
  output logic [DW-1:0]        out_data,
  output logic                 out_hole,    // still a hole after filling
  output logic                 out_filled,  // this pixel was a hole and got filled
  output logic [$clog2(H)-1:0] out_row,
  output logic [$clog2(W)-1:0] out_col,
  output logic                 out_last
);
  localparam int unsigned KC    = KW / 2;
  localparam int unsigned JC    = KH / 2;
  localparam int unsigned LAT   = KC * H + JC;
  localparam int unsigned TOTAL = H * W + LAT;
  localparam int unsigned NW    = $clog2(TOTAL + 1);
  localparam int unsigned RW    = $clog2(H);
  localparam int unsigned CW    = $clog2(W);
  localparam int unsigned EW    = DW + 1;                     // {hole, data}
  localparam int unsigned WMAX  = (KC + 1) * (KC + 1) * (JC + 1) * (JC + 1);
  localparam int unsigned SW    = $clog2(WMAX + 1);           // weight sum width
  localparam int unsigned AW    = $clog2(WMAX * ((1 << DW) - 1) + 1);

  logic [NW-1:0] n;
  logic          beat;
  logic [EW-1:0] din;
  logic [KW-1:0][KH-1:0][EW-1:0] taps;
  logic [EW-1:0] centre_fill;     // filled centre, written back

  assign in_ready = (n < NW'(H * W));
  assign beat     = in_ready ? in_valid : 1'b1;
  assign din      = in_ready ? {in_hole, in_data} : {1'b1, {DW{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n <= '0;
    else if (beat) n <= (n == NW'(TOTAL - 1)) ? '0 : n + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (beat) taps[0][0] <= din;
  end

  for (genvar k = 1; k < KW; k++) begin : g_col
    localparam int unsigned DEP = (k == 1) ? H : (k == KC + 1) ? H - 1 - JC : H - 1;
    logic [EW-1:0] fd, fq;
    assign fd = (k == 1) ? din : (k == KC + 1) ? centre_fill : taps[k-1][0];
    circ_fifo #(.DEPTH(DEP), .DW(EW)) u_fifo (.clk, .rst_n, .push(beat), .d(fd), .q(fq));
    assign taps[k][0] = fq;
  end

  for (genvar k = 0; k < KW; k++) begin : g_sh
    for (genvar j = 1; j < KH; j++) begin : g_row
      always_ff @(posedge clk) begin
        if (beat) taps[k][j] <= taps[k][j-1];
      end
    end
  end

  logic [RW-1:0] crow;
  logic [CW-1:0] ccol;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      crow      <= '0;
      ccol      <= '0;
    end else begin
      out_valid <= beat && (n >= NW'(LAT));
      out_last  <= beat && (n == NW'(TOTAL - 1));
      if (beat && n >= NW'(LAT)) begin
        if (n == NW'(LAT)) begin
          crow <= '0;
          ccol <= '0;
        end else if (crow == RW'(H - 1)) begin
          crow <= '0;
          ccol <= ccol + 1'b1;
        end else begin
          crow <= crow + 1'b1;
        end
      end
    end
  end
  assign out_row = crow;
  assign out_col = ccol;

  // ---------------- weighted interpolation ----------------
  logic [AW-1:0] acc;
  logic [SW-1:0] wsum;
  logic [DW-1:0] interp;
  logic          c_hole;

  always_comb begin
    acc  = '0;
    wsum = '0;
    for (int k = 0; k < KW; k++) begin
      for (int j = 0; j < KH; j++) begin
        automatic int dx = int'(KC) - k;
        automatic int dy = int'(JC) - j;
        automatic int rr = int'(crow) + dy;
        automatic int cc = int'(ccol) + dx;
        automatic int wx = int'(KC) + 1 - (dx < 0 ? -dx : dx);
        automatic int wy = int'(JC) + 1 - (dy < 0 ? -dy : dy);
        if (rr >= 0 && rr < int'(H) && cc >= 0 && cc < int'(W) && !taps[k][j][DW]) begin
          acc  = acc + AW'(wx * wy) * AW'(taps[k][j][DW-1:0]);
          wsum = wsum + SW'(wx * wy);
        end
      end
    end
    interp = (wsum != '0) ? DW'((acc + AW'(wsum >> 1)) / AW'(wsum)) : '0;
  end

  assign c_hole = taps[KC][JC][DW];

  always_comb begin
    if (c_hole && wsum != '0) centre_fill = {1'b0, interp};
    else if (c_hole)          centre_fill = {1'b1, {DW{1'b0}}};
    else                      centre_fill = taps[KC][JC];
  end

  assign out_data   = centre_fill[DW-1:0];
  assign out_hole   = centre_fill[DW];
  assign out_filled = c_hole && (wsum != '0);
endmodule
