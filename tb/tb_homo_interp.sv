// tb_homo_interp: linear interpolation of random base/increment pairs for
// every depth, against Hbase + floor(Hinc * (Z mod 32) / 32) in each
// coefficient's format, computed with integer arithmetic here.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_homo_interp;
  import vs_pkg::*;
  int checks = 0, failures = 0;
  homo_pair_t pair;
  logic [7:0] d;
  homo_t h;
  homo_interp dut (.pair, .depth(d), .h);

  function automatic longint lerp(longint b, longint i, int f);
    longint p = i * f;
    longint q = (p >= 0) ? p / 32 : -((-p + 31) / 32);   // floor division
    return b + q;
  endfunction

  initial begin
    #100000 failures++; $display("watchdog"); `TB_DONE
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      // keep base + inc inside each format's range
      pair.base.h00 = 18'($signed(17'($urandom))); pair.inc.h00 = 18'($signed(12'($urandom)));
      pair.base.h01 = 18'($signed(17'($urandom))); pair.inc.h01 = 18'($signed(12'($urandom)));
      pair.base.h02 = 13'($signed(12'($urandom))); pair.inc.h02 = 13'($signed(8'($urandom)));
      pair.base.h10 = 18'($signed(17'($urandom))); pair.inc.h10 = 18'($signed(12'($urandom)));
      pair.base.h11 = 18'($signed(17'($urandom))); pair.inc.h11 = 18'($signed(12'($urandom)));
      pair.base.h12 = 13'($signed(12'($urandom))); pair.inc.h12 = 13'($signed(8'($urandom)));
      pair.base.h20 = 28'($signed(27'($urandom))); pair.inc.h20 = 28'($signed(20'($urandom)));
      pair.base.h21 = 28'($signed(27'($urandom))); pair.inc.h21 = 28'($signed(20'($urandom)));
      for (int z = 0; z < 256; z += 7) begin
        automatic int f = z % 32;
        d = 8'(z); #1;
        `TB_CHECK(longint'($signed(HA_W'(h.h00))) == lerp($signed(HA_W'(pair.base.h00)), $signed(HA_W'(pair.inc.h00)), f), "h00")
        `TB_CHECK(longint'($signed(HA_W'(h.h01))) == lerp($signed(HA_W'(pair.base.h01)), $signed(HA_W'(pair.inc.h01)), f), "h01")
        `TB_CHECK(longint'($signed(HB_W'(h.h02))) == lerp($signed(HB_W'(pair.base.h02)), $signed(HB_W'(pair.inc.h02)), f), "h02")
        `TB_CHECK(longint'($signed(HA_W'(h.h10))) == lerp($signed(HA_W'(pair.base.h10)), $signed(HA_W'(pair.inc.h10)), f), "h10")
        `TB_CHECK(longint'($signed(HA_W'(h.h11))) == lerp($signed(HA_W'(pair.base.h11)), $signed(HA_W'(pair.inc.h11)), f), "h11")
        `TB_CHECK(longint'($signed(HB_W'(h.h12))) == lerp($signed(HB_W'(pair.base.h12)), $signed(HB_W'(pair.inc.h12)), f), "h12")
        `TB_CHECK(longint'($signed(HC_W'(h.h20))) == lerp($signed(HC_W'(pair.base.h20)), $signed(HC_W'(pair.inc.h20)), f), "h20")
        `TB_CHECK(longint'($signed(HC_W'(h.h21))) == lerp($signed(HC_W'(pair.base.h21)), $signed(HC_W'(pair.inc.h21)), f), "h21")
      end
    end
    `TB_DONE
  end
endmodule
