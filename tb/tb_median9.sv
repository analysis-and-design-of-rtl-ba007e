// tb_median9: random and corner-case windows; the expected median is found
// by sorting the nine values in the testbench.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_median9;
  int checks = 0, failures = 0;
  logic [8:0][7:0] in;
  logic [7:0] out;
  median9 dut (.in, .out);

  function automatic logic [7:0] ref_median(logic [8:0][7:0] a);
    logic [7:0] s [9];
    for (int i = 0; i < 9; i++) s[i] = a[i];
    s.sort();
    return s[4];
  endfunction

  initial begin
    #100000 failures++; $display("watchdog"); `TB_DONE
  end

  initial begin
    in = '0; #1 `TB_CHECK(out == 0, "all zero")
    in = '1; #1 `TB_CHECK(out == 255, "all max")
    for (int i = 0; i < 9; i++) in[i] = 8'(i * 10);
    #1 `TB_CHECK(out == 40, "ramp")
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 9; i++) in[i] = (t % 3 == 0) ? 8'($urandom_range(0, 3)) : 8'($urandom);
      #1 `TB_CHECK(out == ref_median(in), $sformatf("random %0d got %0d exp %0d", t, out, ref_median(in)))
    end
    `TB_DONE
  end
endmodule
