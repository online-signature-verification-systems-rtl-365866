// dtw_g_unit: arithmetic of one G-matrix point, Eq. (4) of the DTW recursion.
//
//   g(i,j) = min( g(i-1,j-2) + 2 d(i,j-1) + d(i,j),
//                 g(i-1,j-1) + 2 d(i,j),
//                 g(i-2,j-1) + 2 d(i-1,j) + d(i,j) )
//
// All operands are G_W-bit costs in which G_INF (all ones) means "outside the
// region": a sum with an infinite operand stays infinite, and a sum that would
// overflow saturates to G_INF. Distances arrive already widened to G_W bits
// (or set to G_INF by the caller when they lie outside R).
//
// Pipeline: stage 1 forms the three candidate sums, stage 2 takes their
// minimum, so g appears 2 cycles after the operands, one point per clock.
// The TAG_W-bit tag travels with the point. The recursion is the reference
// one; the two-stage pipeline and the saturating infinity are this design's
// choice.
module dtw_g_unit
  import dtw_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [TAG_W-1:0]  in_tag,
  input  logic [G_W-1:0]    d_cur,    // d(i,j)
  input  logic [G_W-1:0]    d_left,   // d(i,j-1)
  input  logic [G_W-1:0]    d_up,     // d(i-1,j)
  input  logic [G_W-1:0]    g_ul,     // g(i-1,j-1)
  input  logic [G_W-1:0]    g_ul2,    // g(i-1,j-2)
  input  logic [G_W-1:0]    g_uu,     // g(i-2,j-1)
  output logic              out_valid,
  output logic [TAG_W-1:0]  out_tag,
  output logic [G_W-1:0]    g
);

  logic [G_W-1:0]   c1, c2, c3;
  logic             v1;
  logic [TAG_W-1:0] t1;

  always_ff @(posedge clk) begin
    c1 <= sat_add(sat_add(g_ul2, sat_add(d_left, d_left)), d_cur);
    c2 <= sat_add(g_ul, sat_add(d_cur, d_cur));
    c3 <= sat_add(sat_add(g_uu, sat_add(d_up, d_up)), d_cur);
    t1 <= in_tag;
    out_tag <= t1;
    g <= (c1 < c2) ? ((c1 < c3) ? c1 : c3) : ((c2 < c3) ? c2 : c3);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; out_valid <= v1;
    end
  end

endmodule
