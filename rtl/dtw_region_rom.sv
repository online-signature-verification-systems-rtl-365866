// dtw_region_rom: block RAM used as a ROM holding the column bounds of the
// DTW region R, one entry per row.
//
// Entry i holds {j0(i), j1(i)}: the first and last column of row i inside the
// Itakura parallelogram with slopes 1/2 and 2 joining (0,0) and (N-1,N-1)
// (formula in dtw_pkg::region_j0/region_j1). The contents are computed at
// elaboration, so no data file is needed. Storing the row bounds in block
// RAMs used as ROMs follows the reference design; the exact slopes of the
// parallelogram are this design's reading of it (they give 21,846 points for
// N = 256, against 21,845 quoted for the reference).
//
// Interface: addr is sampled on the rising clock edge; j0/j1 are valid in the
// following cycle (one-cycle synchronous read, like a block RAM). Reading an
// address >= N returns an empty range (j0 > j1).
module dtw_region_rom
  import dtw_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic                 clk,
  input  logic [$clog2(N):0]   addr,
  output idx_t                 j0,
  output idx_t                 j1
);

  logic [23:0] rom [N];

  initial begin
    for (int i = 0; i < int'(N); i++) rom[i] = {region_j0(int'(N), i), region_j1(int'(N), i)};
  end

  always_ff @(posedge clk) begin
    if (addr < ($clog2(N)+1)'(N)) begin
      j0 <= rom[addr[$clog2(N)-1:0]][23:12];
      j1 <= rom[addr[$clog2(N)-1:0]][11:0];
    end else begin
      j0 <= idx_t'(1);
      j1 <= idx_t'(0);
    end
  end

endmodule
