// dtw_d_circuit: the D-matrix computing circuit.
//
// For every point (i, j) issued by the controller it reads t(i) from the
// template sample RAM and s(j) from the signature sample RAM and computes
// d(i,j) = |t(i) - s(j)| with the pipelined distance unit. The controller
// issues the points of row i+1 while the G-matrix circuit works on row i.
// Distances leave on the wr_* port, tagged with their row and column, and are
// written by the G-matrix circuit into its distance row buffers.
//
// Loading: t_we/s_we write one sample pair per clock into the template and
// signature RAMs (done by the pre-processing stage before a DTW run).
//
// Timing: one point per clock, no stall; wr_valid follows iss_valid by
// 1 (RAM read) + 25 (distance unit) = 26 cycles. Computing row i+1 of D
// while G works on row i follows the reference design; the tag that carries
// the point's address to the write port is this design's choice.
module dtw_d_circuit
  import dtw_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                       clk,
  input  logic                       rst,
  // sample loading
  input  logic                       t_we,
  input  logic [AW-1:0]              t_addr,
  input  logic signed [SAMPLE_W-1:0] t_x,
  input  logic signed [SAMPLE_W-1:0] t_y,
  input  logic                       s_we,
  input  logic [AW-1:0]              s_addr,
  input  logic signed [SAMPLE_W-1:0] s_x,
  input  logic signed [SAMPLE_W-1:0] s_y,
  // point issue from the controller
  input  logic                       iss_valid,
  input  idx_t                       iss_row,
  input  idx_t                       iss_col,
  // distance result
  output logic                       wr_valid,
  output idx_t                       wr_row,
  output idx_t                       wr_col,
  output logic [D_W-1:0]             wr_d
);

  logic signed [SAMPLE_W-1:0] tx, ty, sx, sy;
  logic                       v_rd;
  logic [23:0]                tag_rd, tag_out;

  dtw_sample_ram #(.N(N)) u_tmpl (
    .clk, .we(t_we), .wr_addr(t_addr), .wr_x(t_x), .wr_y(t_y),
    .rd_addr(iss_row[AW-1:0]), .rd_x(tx), .rd_y(ty)
  );

  dtw_sample_ram #(.N(N)) u_sig (
    .clk, .we(s_we), .wr_addr(s_addr), .wr_x(s_x), .wr_y(s_y),
    .rd_addr(iss_col[AW-1:0]), .rd_x(sx), .rd_y(sy)
  );

  always_ff @(posedge clk) begin
    if (rst) v_rd <= 1'b0;
    else     v_rd <= iss_valid;
    tag_rd <= {iss_row, iss_col};
  end

  dtw_dist_unit #(.TAG_W(24)) u_dist (
    .clk, .rst, .in_valid(v_rd), .in_tag(tag_rd),
    .tx, .ty, .sx, .sy,
    .out_valid(wr_valid), .out_tag(tag_out), .d(wr_d)
  );

  assign wr_row = tag_out[23:12];
  assign wr_col = tag_out[11:0];

endmodule
