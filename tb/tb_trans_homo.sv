// tb_trans_homo: random projective homographies and random pixels at one
// pixel per cycle; results are compared with a floating-point reference and
// the latency must be exactly 18 cycles.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_trans_homo;
  import vs_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 1920, H = 1080;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid, out_inside;
  homo_t hm;
  logic [10:0] in_u, out_u;
  logic [10:0] in_v, out_v;
  logic [15:0] in_side, out_side;

  trans_homo #(.H(H), .W(W), .SBW(16)) dut (.clk, .rst_n, .in_valid, .hm, .in_u, .in_v, .in_side,
    .out_valid, .out_u, .out_v, .out_inside, .out_side);

  typedef struct { int u, v; bit ins, tie; longint t; logic [15:0] sb; } exp_t;
  exp_t q [$];
  longint cyc = 0;
  int n_in = 0, n_inside = 0, n_out = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); `TB_DONE
  end

  // one block samples inputs and outputs so the cycle stamps agree
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      exp_t e;
      xform(cur, int'(in_u), int'(in_v), W, H, e.u, e.v, e.ins, e.tie);
      e.t = cyc;
      e.sb = in_side;
      q.push_back(e);
      n_in++;
      if (e.ins) n_inside++;
    end
    if (rst_n && out_valid) check_out();
  end

  task automatic check_out();
    exp_t e;
    e = q.pop_front();
    n_out++;
    `TB_CHECK(cyc - e.t == 18, $sformatf("latency %0d", cyc - e.t))
    `TB_CHECK(out_side == e.sb, "sideband order")
    if (!e.tie) begin
      `TB_CHECK(out_inside == e.ins, $sformatf("inside got %b exp %b (%0d,%0d)", out_inside, e.ins, e.u, e.v))
      if (e.ins) `TB_CHECK(out_u == 11'(e.u) && out_v == 11'(e.v),
        $sformatf("pos got (%0d,%0d) exp (%0d,%0d)", out_u, out_v, e.u, e.v))
    end
  endtask

  coef_t cur;
  initial begin
    coef_t c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 6000; t++) begin
      if (t % 500 == 0) begin
        c.c[0] = 65536 + $signed(14'($urandom)); c.c[1] = $signed(13'($urandom));
        c.c[2] = $signed(12'($urandom));
        c.c[3] = $signed(13'($urandom)); c.c[4] = 65536 + $signed(14'($urandom));
        c.c[5] = $signed(11'($urandom));
        c.c[6] = (t % 1000 == 0) ? 0 : $signed(12'($urandom)); c.c[7] = $signed(12'($urandom));
      end
      hm       <= pack_h(c);
      in_u     <= 11'($urandom_range(0, W - 1));
      in_v     <= 11'($urandom_range(0, H - 1));
      in_side  <= 16'(t);
      in_valid <= ($urandom_range(0, 9) != 0);
      cur      <= c;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (30) @(posedge clk);
    `TB_CHECK(n_out == n_in, "all results returned")
    `TB_CHECK(n_inside > 100 && n_inside < n_in, "both inside and outside results seen")
    `TB_DONE
  end
endmodule
