// dtw_dist_unit: pipelined Euclidean distance between two 2-D samples.
//
// d = sqrt((tx - sx)^2 + (ty - sy)^2), computed on Q1.27 samples with
// fixed-point arithmetic: the differences are exact (Q2.27), the squares and
// their sum are exact (Q.54) and the sum is truncated to the Q4.40 radicand of
// the square root, whose root is the Q2.20 distance. Since every sample lies
// in [-1, 1), the sum stays below 8 and never overflows the radicand.
//
// Pipeline: subtract (1) -> square (1) -> add and truncate (1) -> square root
// (22) = 25 cycles of latency, one distance per clock, no stall. A TAG_W-bit
// tag travels alongside each operand pair and comes out with its distance.
// The reference design computes the distance in fixed point with a
// pipelined square-root core; the split into stages and the radicand
// truncation are this design's choice.
module dtw_dist_unit
  import dtw_pkg::*;
#(
  parameter int unsigned TAG_W = 8,
  localparam int unsigned LAT  = 3 + D_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic [TAG_W-1:0]           in_tag,
  input  logic signed [SAMPLE_W-1:0] tx,
  input  logic signed [SAMPLE_W-1:0] ty,
  input  logic signed [SAMPLE_W-1:0] sx,
  input  logic signed [SAMPLE_W-1:0] sy,
  output logic                       out_valid,
  output logic [TAG_W-1:0]           out_tag,
  output logic [D_W-1:0]             d
);

  localparam int unsigned SQ_W = 2 * DIFF_W;   // holds a product of two differences

  // stage 1: differences
  logic signed [DIFF_W-1:0] dx1, dy1;
  logic                     v1;
  // stage 2: squares
  logic [SQ_W-1:0]          qx2, qy2;
  logic                     v2;
  // stage 3: radicand
  logic [RAD_W-1:0]         rad3;
  logic                     v3;
  logic [SQ_W:0]            sum;

  always_ff @(posedge clk) begin
    dx1 <= DIFF_W'(tx) - DIFF_W'(sx);
    dy1 <= DIFF_W'(ty) - DIFF_W'(sy);
    qx2 <= SQ_W'(dx1 * dx1);
    qy2 <= SQ_W'(dy1 * dy1);
    rad3 <= RAD_W'(sum >> SQ_SHIFT);
  end

  assign sum = {1'b0, qx2} + {1'b0, qy2};

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; v3 <= v2;
    end
  end

  dtw_sqrt #(.IN_W(RAD_W)) u_sqrt (
    .clk, .rst, .in_valid(v3), .x(rad3), .out_valid, .q(d)
  );

  // tag delay line matching the datapath latency
  logic [TAG_W-1:0] tag_q [LAT];
  always_ff @(posedge clk) begin
    tag_q[0] <= in_tag;
    for (int k = 1; k < int'(LAT); k++) tag_q[k] <= tag_q[k-1];
  end
  assign out_tag = tag_q[LAT-1];

endmodule
