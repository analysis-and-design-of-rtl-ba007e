// burst_packer: write combiner for warped depth (the output I/O buffer of
// the forward warper).
//
// Warped depth bytes arrive one per pixel at scattered byte addresses of the
// warped-depth frame in external memory. A column of the virtual view is one
// row of memory, so pixels of a run of equal depth land on consecutive
// addresses. The packer keeps one open 64-bit word: a byte that falls into
// the open word is merged into it (a later byte for the same lane replaces
// the earlier one, keeping warping order, which is what resolves occlusion
// without a Z-buffer); a byte for another word closes the open word into the
// write FIFO and opens a new one. The open word is also closed on flush or
// after IDLE cycles without input, so a stream that pauses is not held back.
// Closed words leave as bus write requests with a byte strobe.
//
// Interface: in_valid/in_addr/in_data cannot be stalled; the caller keeps
// enough free FIFO space (out free). Bus side: req with payload; gnt pops
// the head word. Counters give the number of words written and of bytes
// merged into a word that already had one (burst merges).
//
// From the document: warped depth is written through a column-sized output
// buffer over the 64-bit bus (Sec. 4.3, 5.2.1). Own choice: merging into the
// open word only, the IDLE time-out and the free/idle flow-control outputs.
module burst_packer
  import vs_pkg::*;
#(
  parameter int unsigned DEPTH = 136,   // words: one 1080-pixel column
  parameter int unsigned IDLE  = 4,
  parameter logic [BUS_IDW-1:0] ID = ID_DLV
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [31:0]                in_addr,
  input  logic [7:0]                 in_data,
  input  logic                       flush,
  output logic [$clog2(DEPTH+1)-1:0] free,
  output logic                       idle,      // nothing open, nothing queued
  output logic                       req,
  output bus_req_t                   req_pl,
  input  logic                       gnt,
  output logic [31:0]                n_words,
  output logic [31:0]                n_merged
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic              open;
  logic [BUS_AW-1:0] o_addr;
  logic [63:0]       o_data;
  logic [7:0]        o_strb;
  logic [$clog2(IDLE+1)-1:0] idle_cnt;

  logic     push;
  bus_req_t push_pl;
  logic     same;
  logic     empty;
  logic [CW-1:0] cnt;

  assign same = open && (in_addr[31:3] == o_addr);

  always_comb begin
    push           = 1'b0;
    push_pl.we     = 1'b1;
    push_pl.addr   = o_addr;
    push_pl.wdata  = o_data;
    push_pl.wstrb  = o_strb;
    push_pl.id     = ID;
    if (in_valid) push = open && !same;
    else          push = open && (flush || idle_cnt == ($bits(idle_cnt))'(IDLE));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open     <= 1'b0;
      o_addr   <= '0;
      o_data   <= '0;
      o_strb   <= '0;
      idle_cnt <= '0;
      n_words  <= '0;
      n_merged <= '0;
    end else begin
      if (push) n_words <= n_words + 1;
      if (in_valid) begin
        idle_cnt <= '0;
        if (same) begin
          o_data[8*in_addr[2:0] +: 8] <= in_data;
          o_strb[in_addr[2:0]]        <= 1'b1;
          n_merged <= n_merged + 1;
        end else begin
          open   <= 1'b1;
          o_addr <= in_addr[31:3];
          o_data <= 64'(in_data) << (8 * in_addr[2:0]);
          o_strb <= 8'(1) << in_addr[2:0];
        end
      end else if (push) begin
        open <= 1'b0;
      end else if (open) begin
        idle_cnt <= idle_cnt + 1'b1;
      end
    end
  end

  sync_fifo #(.DEPTH(DEPTH), .DW($bits(bus_req_t))) u_fifo (
    .clk, .rst_n, .push, .d(push_pl), .pop(gnt), .q(req_pl),
    .full(), .empty, .count(cnt)
  );

  assign req  = !empty;
  assign free = CW'(DEPTH) - cnt;
  assign idle = empty && !open;
endmodule
