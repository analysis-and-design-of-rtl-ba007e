// tb_blender: weighted add against a real-valued (1-a)L + aR rounded to
// nearest, single-view modes and the final hole.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_blender;
  import vs_pkg::*;
  int checks = 0, failures = 0;
  blend_mode_t mode;
  logic [7:0] l, r, y;
  logic [8:0] a;
  logic fh;
  blender dut (.mode, .tex_l(l), .tex_r(r), .alpha(a), .tex_out(y), .final_hole(fh));

  initial begin
    #100000 failures++; $display("watchdog"); `TB_DONE
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      real e;
      int  ei;
      l = 8'($urandom); r = 8'($urandom); a = 9'($urandom_range(0, 256));
      mode = BM_WEIGHTED; #1;
      e  = (1.0 - a / 256.0) * l + (a / 256.0) * r;
      ei = int'($floor(e + 0.5));
      `TB_CHECK(int'(y) == ei && !fh, $sformatf("weighted l=%0d r=%0d a=%0d got %0d exp %0d", l, r, a, y, ei))
      mode = BM_L_ONLY; #1 `TB_CHECK(y == l && !fh, "L only")
      mode = BM_R_ONLY; #1 `TB_CHECK(y == r && !fh, "R only")
      mode = BM_FINAL_HOLE; #1 `TB_CHECK(y == 0 && fh, "final hole")
    end
    `TB_DONE
  end
endmodule
