// tb_blend_mode: all 16 flag combinations against the blend-mode truth table
// written out row by row.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_blend_mode;
  import vs_pkg::*;
  int checks = 0, failures = 0;
  logic l, r, ld, rd, bnd;
  blend_mode_t mode;
  blend_mode dut (.map_l(l), .map_r(r), .map_l_dil(ld), .map_r_dil(rd), .mode, .boundary(bnd));

  initial begin
    #100000 failures++; $display("watchdog"); `TB_DONE
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      blend_mode_t em;
      logic eb;
      {l, r, ld, rd} = 4'(i);
      eb = 1'b0;
      if (!l && !r) em = BM_FINAL_HOLE;
      else if (!l)  em = BM_R_ONLY;
      else if (!r)  em = BM_L_ONLY;
      else if (!ld && rd) begin em = BM_R_ONLY; eb = 1'b1; end
      else if (ld && !rd) begin em = BM_L_ONLY; eb = 1'b1; end
      else          em = BM_WEIGHTED;
      #1;
      `TB_CHECK(mode == em && bnd == eb, $sformatf("flags %b mode %0d/%0d bs %b/%b", i[3:0], mode, em, bnd, eb))
    end
    `TB_DONE
  end
endmodule
