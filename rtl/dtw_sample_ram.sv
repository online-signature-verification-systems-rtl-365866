// dtw_sample_ram: block RAM holding N two-dimensional samples {x, y}.
//
// One instance holds the enrolled template {t_x, t_y}, a second one the
// presented signature {s_x, s_y}. The write port is used by the stage that
// produces the normalised samples; the read port feeds the distance datapath.
// Samples are signed Q1.27. Keeping template and signature in two block
// RAMs follows the reference design; the packed {x, y} word is this
// design's choice.
//
// Timing: the write happens on the rising edge when we is high; the read is
// synchronous with one cycle of latency (rd_x/rd_y hold the sample at rd_addr
// from the previous cycle).
module dtw_sample_ram
  import dtw_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned W = SAMPLE_W
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(N)-1:0]      wr_addr,
  input  logic signed [W-1:0]       wr_x,
  input  logic signed [W-1:0]       wr_y,
  input  logic [$clog2(N)-1:0]      rd_addr,
  output logic signed [W-1:0]       rd_x,
  output logic signed [W-1:0]       rd_y
);

  logic [2*W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= {wr_x, wr_y};
    {rd_x, rd_y} <= mem[rd_addr];
  end

endmodule
