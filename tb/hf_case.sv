// hf_case: one hole_fill instance with its driver, reference and checker,
// used twice by tb_hole_fill (see there). Counts into the caller's checks
// and failures through ref ports.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module hf_case #(
  parameter int H = 14, W = 12, KH = 9, KW = 5
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  ref    int   checks,
  ref    int   failures,
  ref    int   n_filled,
  ref    int   n_unfilled
);
  localparam int LAT = (KW / 2) * H + KH / 2 + 1;
  logic in_valid = 0, in_ready, in_hole = 0, out_valid, out_hole, out_filled, out_last;
  logic [7:0] in_data = 0, out_data;
  logic [$clog2(H)-1:0] out_row;
  logic [$clog2(W)-1:0] out_col;

  hole_fill #(.H(H), .W(W), .KH(KH), .KW(KW), .DW(8)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_hole,
    .out_valid, .out_data, .out_hole, .out_filled, .out_row, .out_col, .out_last
  );

  logic [7:0] y  [2][W * H], ey [2][W * H];
  bit         h  [2][W * H], eh [2][W * H], ef [2][W * H];
  int nin = 0, nout = 0, fo = 0;
  int tin [$];

  function automatic int iabs(int a);
    return a < 0 ? -a : a;
  endfunction

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < W * H; i++) begin
        automatic int c = i / H, r = i % H;
        y[f][i] = 8'($urandom_range(0, 255));
        h[f][i] = ($urandom_range(0, 5) == 0);
        if (c < KW / 2 + 2 && r >= 1 && r < KH + 2) h[f][i] = 1;               // left edge block
        if (c >= W / 2 && c < W / 2 + KW / 2 + 1 && r >= H / 3 && r < H / 3 + KH / 2 + 2) h[f][i] = 1;
        if (h[f][i]) y[f][i] = 0;
      end
      for (int i = 0; i < W * H; i++) begin ey[f][i] = y[f][i]; eh[f][i] = h[f][i]; ef[f][i] = 0; end
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++)
          if (h[f][c * H + r]) begin
            automatic longint acc = 0, ws = 0;
            for (int dx = -(KW / 2); dx <= KW / 2; dx++)
              for (int dy = -(KH / 2); dy <= KH / 2; dy++) begin
                automatic int cc = c + dx, rr = r + dy;
                if (cc >= 0 && cc < W && rr >= 0 && rr < H && !(dx == 0 && dy == 0)) begin
                  automatic int j = cc * H + rr;
                  automatic bit th = (dx < 0) ? eh[f][j] : h[f][j];
                  automatic int tv = (dx < 0) ? ey[f][j] : y[f][j];
                  if (!th) begin
                    automatic int w = (KH / 2 + 1 - iabs(dy)) * (KW / 2 + 1 - iabs(dx));
                    acc += w * tv;
                    ws  += w;
                  end
                end
              end
            if (ws != 0) begin
              ey[f][c * H + r] = 8'((acc + ws / 2) / ws);
              eh[f][c * H + r] = 0;
              ef[f][c * H + r] = 1;
            end
          end
    end
  end

  // driver
  initial begin
    wait (rst_n);
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W * H; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = y[f][i]; in_hole = h[f][i];
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
      end
    @(negedge clk);
    in_valid = 0;
  end

  // beat counter for the latency check: a beat is an accepted pixel or a
  // flush cycle; the output for input k appears LAT beats after it
  int beat = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) tin.push_back(beat);
    if (out_valid) begin
      automatic int i = nout;
      `TB_CHECK(out_row == ($clog2(H))'(i % H) && out_col == ($clog2(W))'(i / H), "position")
      `TB_CHECK(out_data == ey[fo][i] && out_hole == eh[fo][i] && out_filled == ef[fo][i],
        $sformatf("%0dx%0d frame %0d (%0d,%0d): got %0d h%0d f%0d exp %0d h%0d f%0d", KH, KW, fo,
                  i % H, i / H, out_data, out_hole, out_filled, ey[fo][i], eh[fo][i], ef[fo][i]))
      if (tin.size() > 0) begin
        automatic int t0 = tin.pop_front();
        `TB_CHECK(beat - t0 >= LAT - 1, $sformatf("latency %0d", beat - t0))
      end
      if (out_filled) n_filled++;
      if (out_hole) n_unfilled++;
      nout++;
      if (nout == W * H) begin
        `TB_CHECK(out_last, "last")
        nout = 0;
        fo++;
        if (fo == 2) done = 1;
      end
    end
    if (in_valid && in_ready || !in_ready) beat++;
  end
endmodule
