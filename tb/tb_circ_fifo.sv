// tb_circ_fifo: random push pattern; after every push the output must be
// the sample pushed DEPTH pushes earlier.
//
// Expected values follow the rules of the document as implemented; sizes,
// stimulus and randomisation are this testbench's own choices.
`include "tb_util.svh"
module tb_circ_fifo;
  localparam int D = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0;
  logic [7:0] d, q;
  circ_fifo #(.DEPTH(D), .DW(8)) dut (.clk, .rst_n, .push, .d, .q);

  logic [7:0] hist [$];
  bit check_next = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); `TB_DONE
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      push <= ($urandom_range(0, 3) != 0);
      d    <= 8'($urandom);
      @(posedge clk);
      if (push) begin
        hist.push_back(d);
        #1;
        if (hist.size() > D) begin
          `TB_CHECK(q == hist[hist.size() - 1 - D], $sformatf("q %0d exp %0d", q, hist[hist.size() - 1 - D]))
        end
      end
    end
    `TB_DONE
  end
endmodule
