// col_window: KH x KW pixel window over a column-scanned frame.
//
// The engine scans every frame column by column (scan-column order): pixel
// (row r, column c) is the (c*H + r)-th sample of the stream. A window
// spanning KW columns is therefore built from KW-1 circular FIFOs of column
// height, each delaying the stream by one column, plus a chain of KH
// registers per column for the vertical neighbours. The first FIFO holds H
// samples; the later ones hold H-1 because they are fed from the registered
// output of the FIFO before them. This is the circular-FIFO control of the
// 3x3 median and dilation units, generalised to any odd KH, KW.
//
// Interface: a valid/ready input stream of one pixel per beat. After the
// H*W-th pixel of a frame the unit drops in_ready and inserts
// (KW/2)*H + KH/2 flush beats by itself so the last window comes out; then it
// accepts the next frame. out_valid pulses once per window, one cycle after
// the beat that completed it, with the window centre's row and column.
// win[x][y] is the sample at column offset x-KW/2 and row offset y-KH/2 from
// the centre; mask[x][y] says whether that position lies inside the frame
// (taps outside it hold stale data). The output cannot be stalled.
//
// From the document: the circular-FIFO window control of the 3x3 median and
// dilation (Sec. 5.3.1). Own choice: the generalisation to any odd KH x KW,
// the in-frame mask and the self-flush at the end of a frame.
module col_window #(
  parameter int unsigned H  = 1080,
  parameter int unsigned W  = 1920,
  parameter int unsigned KH = 3,
  parameter int unsigned KW = 3,
  parameter int unsigned DW = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [DW-1:0]                  in_data,
  output logic                           out_valid,
  output logic [KW-1:0][KH-1:0][DW-1:0]  win,
  output logic [KW-1:0][KH-1:0]          mask,
  output logic [$clog2(H)-1:0]           out_row,
  output logic [$clog2(W)-1:0]           out_col,
  output logic                           out_last
);
  localparam int unsigned LAT   = (KW / 2) * H + KH / 2;
  localparam int unsigned TOTAL = H * W + LAT;
  localparam int unsigned NW    = $clog2(TOTAL + 1);
  localparam int unsigned RW    = $clog2(H);
  localparam int unsigned CW    = $clog2(W);

  logic [NW-1:0] n;          // beat index within the frame
  logic          beat;
  logic [DW-1:0] din;
  // taps[k][j] = x(n - k*H - j) after beat n
  logic [KW-1:0][KH-1:0][DW-1:0] taps;
  logic [KW-1:0][DW-1:0]         fq;

  assign in_ready = (n < NW'(H * W));
  assign beat     = in_ready ? in_valid : 1'b1;
  assign din      = in_ready ? in_data  : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n <= '0;
    else if (beat) n <= (n == NW'(TOTAL - 1)) ? '0 : n + 1'b1;
  end

  // column 0 comes straight from the stream
  always_ff @(posedge clk) begin
    if (beat) taps[0][0] <= din;
  end
  assign fq[0] = '0;

  for (genvar k = 1; k < KW; k++) begin : g_col
    circ_fifo #(.DEPTH(k == 1 ? H : H - 1), .DW(DW)) u_fifo (
      .clk, .rst_n, .push(beat),
      .d(k == 1 ? din : taps[k-1][0]),
      .q(fq[k])
    );
    assign taps[k][0] = fq[k];
  end

  for (genvar k = 0; k < KW; k++) begin : g_sh
    for (genvar j = 1; j < KH; j++) begin : g_row
      always_ff @(posedge clk) begin
        if (beat) taps[k][j] <= taps[k][j-1];
      end
    end
  end

  // centre position of the window that the current beat completes
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

  always_comb begin
    for (int k = 0; k < KW; k++) begin
      for (int j = 0; j < KH; j++) begin
        automatic int dx = int'(KW / 2) - k;
        automatic int dy = int'(KH / 2) - j;
        automatic int rr = int'(crow) + dy;
        automatic int cc = int'(ccol) + dx;
        win[KW-1-k][KH-1-j]  = taps[k][j];
        mask[KW-1-k][KH-1-j] = (rr >= 0) && (rr < int'(H)) && (cc >= 0) && (cc < int'(W));
      end
    end
  end
endmodule
