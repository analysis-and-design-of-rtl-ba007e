// make_homography: estimates one homography matrix from four point pairs
// by Gauss-Seidel iteration (the MakeHomography step of the preprocessing).
//
// The four source points are the frame corners, numbered 1 = (W-1, 0),
// 2 = (0, H-1), 3 = (0, 0), 4 = (W-1, H-1); their destinations (dst_u,
// dst_v, signed with FD fraction bits) come from the projection transform.
// The eight unknowns h00..h21 (h22 = 1) solve the 8x8 linear system
// A h = b, whose rows are ordered so that large entries sit on the diagonal:
//   rows 0-2: u-equations of points 1-3, rows 3-6: v-equations of points
//   1-4, row 7: u-equation of point 4,
// with a u-equation  us*h00 + vs*h01 + h02 - ud*us*h20 - ud*vs*h21 = ud  and a
// v-equation  us*h10 + vs*h11 + h12 - vd*us*h20 - vd*vs*h21 = vd.
// One Gauss-Seidel sweep updates the unknowns in order,
//   h_i = (b_i - sum_{j != i} a_ij h_j) / a_ii,
// using the values already updated in this sweep; IT sweeps are run.
//
// Datapath: one multiply-accumulate per cycle over the eight columns, then
// a restoring divider with one quotient bit per cycle. The unknowns are
// kept with FH = 40 fraction bits and rounded at the end to the stored
// coefficient formats (2.16, 8.5, 1.27). One sweep takes 8 * (10 + NW)
// cycles (NW = 101 accumulator bits), about 17.8k cycles for IT = 20; the
// preprocessing runs once per frame, outside the pixel pipeline.
//
// Interface: a start pulse with dst_u/dst_v stable until done; done pulses
// for one cycle with the result on h, which then holds until the next start.
//
// From the document: the rearranged system with the frame corners as source
// points, Gauss-Seidel iteration, fewer than 20 iterations for the needed
// precision, and the coefficient formats. This design's own choices: the
// fixed-point formats inside (the document uses floating point for parts of
// the preprocessing), the sequential single-multiplier datapath, and
// starting every solve from h = 0.
module make_homography
  import vs_pkg::*;
#(
  parameter int unsigned W  = 1920,
  parameter int unsigned H  = 1080,
  parameter int unsigned IT = 20,
  parameter int unsigned FD = 6      // fraction bits of the destination points
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [FD+13:0]   dst_u [4],
  input  logic signed [FD+13:0]   dst_v [4],
  output logic                    busy,
  output logic                    done,
  output homo_t                   h
);
  localparam int unsigned PW   = FD + 14;     // destination point width
  localparam int unsigned AW   = PW + 13;     // matrix entry width
  localparam int unsigned FH   = 40;          // fraction bits of the unknowns
  localparam int unsigned HW   = FH + 24;     // unknown width
  localparam int unsigned NW   = AW + HW + 4; // accumulator width
  localparam int unsigned DIVB = HW;          // quotient bits produced
  localparam int unsigned ITW  = $clog2(IT + 1);

  typedef enum logic [2:0] {S_IDLE, S_MAC, S_DLD, S_DIV, S_OUT} state_t;
  state_t state;

  logic signed [HW-1:0] x [8];
  logic [2:0]           row, col;
  logic [ITW-1:0]       iter;
  logic signed [NW-1:0] acc;

  // ---------------- matrix and right-hand side ----------------
  function automatic logic signed [AW-1:0] ent(logic [2:0] i, logic [2:0] j,
                                               logic signed [PW-1:0] du [4],
                                               logic signed [PW-1:0] dv [4]);
    int                   p;
    logic                 is_u;
    logic signed [AW-1:0] us, vs, d, one;
    case (i)
      3'd0: begin p = 0; is_u = 1'b1; end
      3'd1: begin p = 1; is_u = 1'b1; end
      3'd2: begin p = 2; is_u = 1'b1; end
      3'd3: begin p = 0; is_u = 1'b0; end
      3'd4: begin p = 1; is_u = 1'b0; end
      3'd5: begin p = 2; is_u = 1'b0; end
      3'd6: begin p = 3; is_u = 1'b0; end
      default: begin p = 3; is_u = 1'b1; end
    endcase
    us  = (p == 0 || p == 3) ? AW'(W - 1) : '0;
    vs  = (p == 1 || p == 3) ? AW'(H - 1) : '0;
    d   = is_u ? AW'(du[p]) : AW'(dv[p]);
    one = AW'(1) <<< FD;
    case (j)
      3'd0: return is_u ? us <<< FD : '0;
      3'd1: return is_u ? vs <<< FD : '0;
      3'd2: return is_u ? one : '0;
      3'd3: return is_u ? '0 : us <<< FD;
      3'd4: return is_u ? '0 : vs <<< FD;
      3'd5: return is_u ? '0 : one;
      3'd6: return -(d * us);
      default: return -(d * vs);
    endcase
  endfunction

  function automatic logic signed [AW-1:0] rhs(logic [2:0] i,
                                               logic signed [PW-1:0] du [4],
                                               logic signed [PW-1:0] dv [4]);
    case (i)
      3'd0: return AW'(du[0]);
      3'd1: return AW'(du[1]);
      3'd2: return AW'(du[2]);
      3'd3: return AW'(dv[0]);
      3'd4: return AW'(dv[1]);
      3'd5: return AW'(dv[2]);
      3'd6: return AW'(dv[3]);
      default: return AW'(du[3]);
    endcase
  endfunction

  logic signed [AW-1:0] a_ij, a_ii, b_i;
  assign a_ij = ent(row, col, dst_u, dst_v);
  assign a_ii = ent(row, row, dst_u, dst_v);
  assign b_i  = rhs(row, dst_u, dst_v);

  // ---------------- divider ----------------
  logic [NW-1:0]        num;      // magnitude, shifted out MSB first
  logic [AW-1:0]        den;
  logic [AW-1:0]        rem;
  logic [DIVB-1:0]      quo;
  logic                 neg;
  logic [$clog2(NW+1)-1:0] dcnt;
  logic [AW:0]          rem_sh;
  assign rem_sh = {rem, num[NW-1]};

  logic signed [NW-1:0] acc_base;
  assign acc_base = (col == 3'd0) ? (NW'(b_i) <<< FH) : acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      row   <= '0;
      col   <= '0;
      iter  <= '0;
      acc   <= '0;
      num   <= '0;
      den   <= '0;
      rem   <= '0;
      quo   <= '0;
      neg   <= 1'b0;
      dcnt  <= '0;
      done  <= 1'b0;
      h     <= '0;
      for (int k = 0; k < 8; k++) x[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int k = 0; k < 8; k++) x[k] <= '0;
          row   <= '0;
          col   <= '0;
          iter  <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          // acc = b_i - sum_{j != i} a_ij x_j, one column per cycle
          acc <= (col != row) ? acc_base - NW'(a_ij) * NW'(x[col]) : acc_base;
          col <= col + 1'b1;
          if (col == 3'd7) state <= S_DLD;
        end
        S_DLD: begin
          num   <= acc[NW-1] ? NW'(-acc) : NW'(acc);
          den   <= a_ii[AW-1] ? AW'(-a_ii) : AW'(a_ii);
          neg   <= acc[NW-1] ^ a_ii[AW-1];
          rem   <= '0;
          quo   <= '0;
          dcnt  <= ($clog2(NW+1))'(NW);
          state <= S_DIV;
        end
        S_DIV: begin
          if (dcnt != '0) begin
            num  <= num << 1;
            dcnt <= dcnt - 1'b1;
            if (rem_sh >= {1'b0, den}) begin
              rem <= AW'(rem_sh - {1'b0, den});
              quo <= {quo[DIVB-2:0], 1'b1};
            end else begin
              rem <= AW'(rem_sh);
              quo <= {quo[DIVB-2:0], 1'b0};
            end
          end else begin
            x[row] <= neg ? -$signed(quo) : $signed(quo);
            col    <= '0;
            row    <= row + 1'b1;
            if (row != 3'd7) state <= S_MAC;
            else if (iter == ITW'(IT - 1)) state <= S_OUT;
            else begin
              iter  <= iter + 1'b1;
              state <= S_MAC;
            end
          end
        end
        default: begin   // S_OUT
          h.h00 <= rnd18(x[0], FH - 16);
          h.h01 <= rnd18(x[1], FH - 16);
          h.h02 <= HB_W'(rnd18w(x[2], FH - 5));
          h.h10 <= rnd18(x[3], FH - 16);
          h.h11 <= rnd18(x[4], FH - 16);
          h.h12 <= HB_W'(rnd18w(x[5], FH - 5));
          h.h20 <= HC_W'(rnd18w(x[6], FH - 27));
          h.h21 <= HC_W'(rnd18w(x[7], FH - 27));
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  function automatic logic signed [HA_W-1:0] rnd18(logic signed [HW-1:0] v, int sh);
    return HA_W'(rnd18w(v, sh));
  endfunction
  function automatic logic signed [HW-1:0] rnd18w(logic signed [HW-1:0] v, int sh);
    return (v + (HW'(1) <<< (sh - 1))) >>> sh;
  endfunction

  assign busy = (state != S_IDLE);

  initial assert (FH >= 27) else $error("make_homography: FH too small for 1.27");
endmodule
