// vs_arbiter: arbiter of the shared external memory bus.
//
// Masters are in two groups. Group B (indices 0..NB-1: warped-depth writes
// and warped-texture reads) makes fragmented, random accesses during the
// column pipeline and is time-critical: a group-B master that keeps its
// request up keeps the bus. Group A (indices NB..NB+NA-1: regular column
// transfers such as memory clearing) is served round-robin: a master that
// keeps requesting keeps the bus for its burst, and when it lets go the next
// requester after it gets the bus. When the bus is free and both groups
// request, group B goes first (this priority between the groups, and
// round-robin inside group B, are this design's choices).
//
// Timing: the owner is chosen combinationally in the cycle the bus is free
// and registered; gnt[i] marks the cycle in which master i's request is
// transferred (owner and bus_ready). sel is the owner's index for the
// payload multiplexer.
//
// From the document: group B keeps the bus while it requests, group A is
// served round robin (Sec. 5.5, Fig. 5-13). Own choice: group B wins over
// group A, round robin also inside group B, and gnt qualified by bus_ready.
module vs_arbiter #(
  parameter int unsigned NB = 4,
  parameter int unsigned NA = 1,
  localparam int unsigned N  = NB + NA,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          bus_ready,
  output logic [N-1:0]  gnt,
  output logic          bus_valid,
  output logic [IW-1:0] sel
);
  logic          own_v;
  logic [IW-1:0] own;
  logic [IW-1:0] last_b, last_a;
  logic          pick_v;
  logic [IW-1:0] pick;

  always_comb begin
    pick_v = 1'b0;
    pick   = '0;
    if (own_v && req[own]) begin
      pick_v = 1'b1;
      pick   = own;
    end else begin
      for (int k = 1; k <= int'(NB); k++) begin
        automatic int i = (int'(last_b) + k) % int'(NB);
        if (!pick_v && req[i]) begin
          pick_v = 1'b1;
          pick   = IW'(i);
        end
      end
      for (int k = 1; k <= int'(NA); k++) begin
        automatic int i = int'(NB) + ((int'(last_a) - int'(NB) + k) % int'(NA));
        if (!pick_v && req[i]) begin
          pick_v = 1'b1;
          pick   = IW'(i);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_v  <= 1'b0;
      own    <= '0;
      last_b <= IW'(NB - 1);
      last_a <= IW'(N - 1);
    end else begin
      own_v <= pick_v;
      own   <= pick;
      if (pick_v && int'(pick) < int'(NB))  last_b <= pick;
      if (pick_v && int'(pick) >= int'(NB)) last_a <= pick;
    end
  end

  assign bus_valid = pick_v;
  assign sel       = pick;
  always_comb begin
    gnt = '0;
    if (pick_v && bus_ready) gnt[pick] = 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("vs_arbiter: more than one grant");
endmodule
