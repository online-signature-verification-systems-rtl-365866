// dtw_top: DTW computing circuit of the fixed-point signature verifier.
//
// Dynamic time warping aligns the presented signature s = {s_x, s_y} with the
// enrolled template t = {t_x, t_y} (N samples each) by filling the cost
// matrix G on the Itakura parallelogram R:
//   g(-1,-1) = 0,  g(i,j) = infinity outside R,
//   g(i,j) = min( g(i-1,j-2) + 2d(i,j-1) + d(i,j),
//                 g(i-1,j-1) + 2d(i,j),
//                 g(i-2,j-1) + 2d(i-1,j) + d(i,j) ),
// with d(i,j) the Euclidean distance between t(i) and s(j). The circuit
// computes the distances of row i+1 (D-matrix circuit) while it computes the
// costs of row i (G-matrix circuit), so that after the pipelines fill it
// produces one g(i,j) per clock. Only two rows of D and two of G are kept on
// chip; every g(i,j) is sent out on the g_wr port for storage in an external
// memory, where the later feature-extraction stage reads the whole matrix.
//
// Interface:
//   t_we/t_addr/t_x/t_y, s_we/s_addr/s_x/s_y  load the Q1.27 samples (idle only)
//   start (pulse), busy, done (pulse when g(N-1,N-1) has been written)
//   g_wr_valid/row/col/data  one Q12.20 cost per valid cycle, rows in order,
//                            all-ones = infinity (unreachable point)
// Timing: start to done takes about |R| + 33 cycles plus the stall cycles of
// the short first and last rows (see the controller). The structure
// (D and G circuits, two-row buffers, external G storage) follows the
// reference design; the load ports and the g_wr interface are this design's.
module dtw_top
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
  // control
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  // G matrix to the external memory
  output logic                       g_wr_valid,
  output idx_t                       g_wr_row,
  output idx_t                       g_wr_col,
  output logic [G_W-1:0]             g_wr_data
);

  localparam int unsigned RW = $clog2(N) + 1;

  logic [RW-1:0] romd_addr, romg_addr;
  idx_t          romd_j0, romd_j1, romg_j0, romg_j1;
  logic          d_iss_valid, dwr_valid, g_iss_valid;
  idx_t          d_iss_row, d_iss_col, dwr_row, dwr_col;
  logic [D_W-1:0] dwr_d;
  gtag_t         g_iss_tag;
  logic          d_stall, g_stall_d, g_stall_g;

  dtw_region_rom #(.N(N)) u_rom_d (.clk, .addr(romd_addr), .j0(romd_j0), .j1(romd_j1));
  dtw_region_rom #(.N(N)) u_rom_g (.clk, .addr(romg_addr), .j0(romg_j0), .j1(romg_j1));

  dtw_controller #(.N(N)) u_ctrl (
    .clk, .rst, .start, .busy, .done,
    .romd_addr, .romd_j0, .romd_j1,
    .romg_addr, .romg_j0, .romg_j1,
    .d_iss_valid, .d_iss_row, .d_iss_col,
    .dwr_valid, .dwr_row, .dwr_col,
    .g_iss_valid, .g_iss_tag,
    .gwr_valid(g_wr_valid), .gwr_row(g_wr_row), .gwr_col(g_wr_col),
    .d_stall, .g_stall_d, .g_stall_g
  );

  dtw_d_circuit #(.N(N)) u_dcirc (
    .clk, .rst,
    .t_we, .t_addr, .t_x, .t_y, .s_we, .s_addr, .s_x, .s_y,
    .iss_valid(d_iss_valid), .iss_row(d_iss_row), .iss_col(d_iss_col),
    .wr_valid(dwr_valid), .wr_row(dwr_row), .wr_col(dwr_col), .wr_d(dwr_d)
  );

  dtw_g_circuit #(.N(N)) u_gcirc (
    .clk, .rst,
    .dwr_valid, .dwr_row, .dwr_col, .dwr_d,
    .iss_valid(g_iss_valid), .iss_tag(g_iss_tag),
    .g_wr_valid, .g_wr_row, .g_wr_col, .g_wr_data
  );

endmodule
