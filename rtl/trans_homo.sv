// trans_homo: pipelined homography transform of one pixel per cycle
// (the "TransHomo" unit of the warper).
//
//     u' = (h00 u + h01 v + h02) / (h20 u + h21 v + 1)
//     v' = (h10 u + h11 v + h12) / (h20 u + h21 v + 1)
//
// Stage 1 registers the two numerators (16 fractional bits) and the common
// denominator (27 fractional bits). Two 16-stage pipelined dividers then
// compute |num| * 2**13 / |den|, a quotient with 2 fractional bits, and the
// last stage restores the sign, rounds to the nearest integer pixel and
// checks that the result lies inside the W x H frame. Total latency is 18
// cycles, as in the engine's 18-stage transform; throughput is one pixel per
// cycle. Results that are negative, at or beyond the frame size, overflow
// the 14-bit integer quotient or have a zero denominator are flagged
// outside. The quotient precision and rounding are this design's choice.
//
// From the document: the 18-stage transform with two 16-stage dividers, one
// pixel per cycle (Sec. 5.2, Fig. 5-6). Own choice: two fraction bits in the
// quotient, rounding half away from zero, and the in-frame test.
module trans_homo
  import vs_pkg::*;
#(
  parameter int unsigned H   = 1080,
  parameter int unsigned W   = 1920,
  parameter int unsigned SBW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  homo_t                hm,
  input  logic [$clog2(W)-1:0] in_u,
  input  logic [$clog2(H)-1:0] in_v,
  input  logic [SBW-1:0]       in_side,
  output logic                 out_valid,
  output logic [$clog2(W)-1:0] out_u,
  output logic [$clog2(H)-1:0] out_v,
  output logic                 out_inside,
  output logic [SBW-1:0]       out_side
);
  localparam int unsigned UW  = $clog2(W);
  localparam int unsigned VW  = $clog2(H);
  localparam int unsigned PW  = 34;          // numerator width, 16 fractional bits
  localparam int unsigned DNW = 44;          // denominator width, 27 fractional bits
  localparam int unsigned SH  = HC_F - HA_F + 2;  // 13: align and keep 2 fraction bits
  localparam int unsigned NW  = PW + SH;     // dividend width
  localparam int unsigned QW  = 16;
  localparam int unsigned LAT = 18;

  // ---------------- stage 1: products ----------------
  logic                    s1_v;
  logic signed [PW-1:0]    s1_nu, s1_nv;
  logic signed [DNW-1:0]   s1_dn;
  logic [SBW-1:0]          s1_sb;

  logic signed [12:0] su, sv;
  logic signed [HA_W-1:0] c00, c01, c10, c11;
  logic signed [HB_W-1:0] c02, c12;
  logic signed [HC_W-1:0] c20, c21;
  assign {c00, c01, c02, c10, c11, c12, c20, c21} = hm;
  assign su = $signed({1'b0, 12'(in_u)});
  assign sv = $signed({1'b0, 12'(in_v)});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_v <= 1'b0;
    else        s1_v <= in_valid;
  end
  always_ff @(posedge clk) begin
    s1_nu <= PW'(c00) * PW'(su) + PW'(c01) * PW'(sv) + (PW'(c02) <<< (HA_F - HB_F));
    s1_nv <= PW'(c10) * PW'(su) + PW'(c11) * PW'(sv) + (PW'(c12) <<< (HA_F - HB_F));
    s1_dn <= DNW'(c20) * DNW'(su) + DNW'(c21) * DNW'(sv) + (DNW'(1) <<< HC_F);
    s1_sb <= in_side;
  end

  // ---------------- dividers ----------------
  logic [PW-1:0]  mag_u, mag_v;
  logic [DNW-1:0] mag_d;
  logic [NW-1:0]  dvd_u, dvd_v;
  logic           neg_u, neg_v, ovf_u, ovf_v, dz;

  always_comb begin
    mag_u = s1_nu[PW-1]  ? PW'(-s1_nu)  : PW'(s1_nu);
    mag_v = s1_nv[PW-1]  ? PW'(-s1_nv)  : PW'(s1_nv);
    mag_d = s1_dn[DNW-1] ? DNW'(-s1_dn) : DNW'(s1_dn);
    dvd_u = NW'(mag_u) << SH;
    dvd_v = NW'(mag_v) << SH;
    neg_u = s1_nu[PW-1] ^ s1_dn[DNW-1];
    neg_v = s1_nv[PW-1] ^ s1_dn[DNW-1];
    dz    = (mag_d == '0);
    ovf_u = dz || ((NW + QW)'(dvd_u) >= ((NW + QW)'(mag_d) << QW));
    ovf_v = dz || ((NW + QW)'(dvd_v) >= ((NW + QW)'(mag_d) << QW));
  end

  localparam int unsigned XSB = SBW + 4;
  logic           du_v, dv_v;
  logic [QW-1:0]  qu, qv;
  logic [XSB-1:0] du_sb;
  logic [SBW+1:0] dv_sb;

  div_pipe #(.NW(NW), .DW(DNW), .QW(QW), .SBW(XSB)) u_div_u (
    .clk, .rst_n, .in_valid(s1_v), .dividend(ovf_u ? '0 : dvd_u), .divisor(dz ? DNW'(1) : mag_d),
    .in_side({s1_sb, neg_u, ovf_u, neg_v, ovf_v}),
    .out_valid(du_v), .quotient(qu), .out_side(du_sb)
  );
  div_pipe #(.NW(NW), .DW(DNW), .QW(QW), .SBW(SBW + 2)) u_div_v (
    .clk, .rst_n, .in_valid(s1_v), .dividend(ovf_v ? '0 : dvd_v), .divisor(dz ? DNW'(1) : mag_d),
    .in_side({s1_sb, neg_v, ovf_v}),
    .out_valid(dv_v), .quotient(qv), .out_side(dv_sb)
  );

  // ---------------- last stage: sign, rounding, range ----------------
  logic [QW-2:0] ru, rv;
  logic          in_u_ok, in_v_ok;
  always_comb begin
    ru      = (QW-1)'((17'(qu) + 17'd2) >> 2);
    rv      = (QW-1)'((17'(qv) + 17'd2) >> 2);
    in_u_ok = !du_sb[2] && (!du_sb[3] || ru == '0) && (ru < (QW-1)'(W));
    in_v_ok = !du_sb[0] && (!du_sb[1] || rv == '0) && (rv < (QW-1)'(H));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= du_v;
  end
  always_ff @(posedge clk) begin
    out_u      <= UW'(ru);
    out_v      <= VW'(rv);
    out_inside <= in_u_ok && in_v_ok;
    out_side   <= du_sb[XSB-1:4];
  end

  logic unused;
  assign unused = ^{dv_v, dv_sb};

  initial assert (LAT == QW + 2);
endmodule
