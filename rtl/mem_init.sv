// mem_init: clears the two warped-depth frames (left-to-virtual and
// right-to-virtual) in external memory before forward warping writes them.
//
// After forward warping, a warped-depth pixel that nothing was written to
// must read as depth 0, which marks a hole. The frames are therefore zeroed
// at the start of each frame by a DMA-like master that writes H*W/8 64-bit
// zero words to each frame, one word per bus grant, while the homographies
// are being prepared. start begins a pass; done is high from the end of a
// pass until the next start. Addresses are byte addresses (the bases must be
// 8-byte aligned).
//
// From the document: the warped-depth frames are reset in external memory at
// the start of a frame (Sec. 5.6.1). Own choice: plain zero writes of whole
// words, one frame after the other, as a group-A master.
module mem_init
  import vs_pkg::*;
#(
  parameter int unsigned H = 1080,
  parameter int unsigned W = 1920,
  parameter logic [BUS_IDW-1:0] ID = ID_INIT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] base0,
  input  logic [31:0] base1,
  output logic        done,
  output logic        req,
  output bus_req_t    req_pl,
  input  logic        gnt
);
  localparam int unsigned NWORDS = (H * W + 7) / 8;
  localparam int unsigned CW     = $clog2(NWORDS + 1);

  logic          busy, frame;
  logic [CW-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      frame <= 1'b0;
      idx   <= '0;
      done  <= 1'b0;
    end else if (start) begin
      busy  <= 1'b1;
      frame <= 1'b0;
      idx   <= '0;
      done  <= 1'b0;
    end else if (busy && gnt) begin
      if (idx == CW'(NWORDS - 1)) begin
        idx <= '0;
        if (frame) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        frame <= ~frame;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

  assign req          = busy;
  assign req_pl.we    = 1'b1;
  assign req_pl.addr  = (frame ? base1[31:3] : base0[31:3]) + BUS_AW'(idx);
  assign req_pl.wdata = '0;
  assign req_pl.wstrb = '1;
  assign req_pl.id    = ID;
endmodule
