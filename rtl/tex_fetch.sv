// tex_fetch: fetches the reference texture that reverse warping points to
// and hands it back in pixel order (index table, valid table and reorder
// buffer of the texture-mapping stage).
//
// Reverse-warped positions are scattered, but neighbouring virtual pixels of
// equal depth map to consecutive bytes of a reference column, which is one
// row of external memory. Consecutive byte addresses inside one 64-bit word
// are therefore gathered into a single word read. For every read the index
// table records where in the word the run starts and how long it is (up to 8
// bytes); this is the valid-byte information. When the word returns, the
// bytes of the run are taken out one per cycle, in order, and pushed into
// the reorder buffer, from which the blender pops one byte per mapped pixel.
// A run is closed when the next pixel does not continue it, on flush, or
// after IDLE cycles without a mapped pixel.
//
// Interface: the pixel input (in_valid, in_need = the pixel needs a texture
// byte, in_addr = byte address) cannot be stalled; the caller bounds the
// number of pixels in flight to the buffer depths. Bus side: req/req_pl with
// gnt, and read data rsp_valid/rsp_data in request order. Output: a FIFO
// interface (out_valid, out_data, out_pop).
//
// From the document: index table, valid table and reorder buffer that merge
// texture reads into 64-bit words and return bytes in order (Sec. 5.2.2, Fig.
// 5-8). Own choice: the tables are FIFOs of {start, length} per read word
// instead of ping-pong tables, the outstanding-read limit RSPD and the IDLE
// time-out.
module tex_fetch
  import vs_pkg::*;
#(
  parameter int unsigned FD   = 4096,  // reorder buffer and index table depth
  parameter int unsigned RSPD = 16,    // outstanding reads / response buffer
  parameter int unsigned IDLE = 4,
  parameter logic [BUS_IDW-1:0] ID = ID_YL
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_need,
  input  logic [31:0]  in_addr,
  input  logic         flush,
  output logic         req,
  output bus_req_t     req_pl,
  input  logic         gnt,
  input  logic         rsp_valid,
  input  logic [63:0]  rsp_data,
  output logic         out_valid,
  output logic [7:0]   out_data,
  input  logic         out_pop,
  output logic [31:0]  n_reads,
  output logic [31:0]  n_bytes
);
  // ---------------- run gathering ----------------
  logic              open;
  logic [BUS_AW-1:0] o_word;
  logic [2:0]        o_start, o_lenm1;
  logic [$clog2(IDLE+1)-1:0] idle_cnt;
  logic              cont, close;
  logic              need;

  assign need  = in_valid && in_need;
  assign cont  = open && (in_addr[31:3] == o_word) && ({1'b0, in_addr[2:0]} == {1'b0, o_start} + {1'b0, o_lenm1} + 4'd1);
  assign close = open && (need ? !cont : (flush || idle_cnt == ($bits(idle_cnt))'(IDLE)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open     <= 1'b0;
      o_word   <= '0;
      o_start  <= '0;
      o_lenm1  <= '0;
      idle_cnt <= '0;
      n_bytes  <= '0;
    end else begin
      if (need) begin
        idle_cnt <= '0;
        n_bytes  <= n_bytes + 1;
        if (cont) begin
          o_lenm1 <= o_lenm1 + 1'b1;
        end else begin
          open    <= 1'b1;
          o_word  <= in_addr[31:3];
          o_start <= in_addr[2:0];
          o_lenm1 <= '0;
        end
      end else if (close) begin
        open <= 1'b0;
      end else if (open) begin
        idle_cnt <= idle_cnt + 1'b1;
      end
    end
  end

  // ---------------- request queue and index table ----------------
  localparam int unsigned FCW = $clog2(FD + 1);
  localparam int unsigned RCW = $clog2(RSPD + 1);
  logic          rq_empty;
  logic [BUS_AW-1:0] rq_addr;
  logic [5:0]    ix_q;
  logic          ix_empty;
  logic [RCW-1:0] inflight;
  logic          rsp_pop;

  sync_fifo #(.DEPTH(FD), .DW(BUS_AW)) u_rq (
    .clk, .rst_n, .push(close), .d(o_word), .pop(gnt), .q(rq_addr),
    .full(), .empty(rq_empty), .count()
  );
  sync_fifo #(.DEPTH(FD), .DW(6)) u_index (
    .clk, .rst_n, .push(close), .d({o_start, o_lenm1}), .pop(rsp_pop), .q(ix_q),
    .full(), .empty(ix_empty), .count()
  );

  assign req          = !rq_empty && (inflight < RCW'(RSPD));
  assign req_pl.we    = 1'b0;
  assign req_pl.addr  = rq_addr;
  assign req_pl.wdata = '0;
  assign req_pl.wstrb = '0;
  assign req_pl.id    = ID;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= '0;
      n_reads  <= '0;
    end else begin
      inflight <= inflight + RCW'(gnt) - RCW'(rsp_pop);
      if (gnt) n_reads <= n_reads + 1;
    end
  end

  // ---------------- response buffer and unpacking ----------------
  logic [63:0] rs_q;
  logic        rs_empty;
  logic [2:0]  k;
  logic        ro_full, ro_push;
  logic [7:0]  ro_d;
  logic [2:0]  lane;

  sync_fifo #(.DEPTH(RSPD), .DW(64)) u_rsp (
    .clk, .rst_n, .push(rsp_valid), .d(rsp_data), .pop(rsp_pop), .q(rs_q),
    .full(), .empty(rs_empty), .count()
  );

  assign lane    = ix_q[5:3] + k;
  assign ro_d    = rs_q[8*lane +: 8];
  assign ro_push = !rs_empty && !ix_empty && !ro_full;
  assign rsp_pop = ro_push && (k == ix_q[2:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) k <= '0;
    else if (ro_push) k <= rsp_pop ? '0 : k + 1'b1;
  end

  logic ro_empty;
  sync_fifo #(.DEPTH(FD), .DW(8)) u_reorder (
    .clk, .rst_n, .push(ro_push), .d(ro_d), .pop(out_pop), .q(out_data),
    .full(ro_full), .empty(ro_empty), .count()
  );
  assign out_valid = !ro_empty;
endmodule
