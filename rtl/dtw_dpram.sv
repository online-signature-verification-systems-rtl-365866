// dtw_dpram: dual-port block RAM holding one row of the D or the G matrix.
//
// The G-matrix circuit uses four of them: d_a/d_b for two rows of distances
// and g_a/g_b for two rows of accumulated costs; their roles swap on every
// row. Both ports can read and write. Port A is used for reading only in this
// design; port B either writes a result or, at the start of a row, performs a
// second read. The four row buffers come from the reference design; using
// port B for the row-start read is this design's choice.
//
// Timing: synchronous; a read returns the word at the address of the previous
// cycle. A read and a write of the same address in the same cycle on the two
// ports returns the old word.
module dtw_dpram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 32
) (
  input  logic                      clk,
  // port A
  input  logic                      a_we,
  input  logic [$clog2(DEPTH)-1:0]  a_addr,
  input  logic [W-1:0]              a_wdata,
  output logic [W-1:0]              a_rdata,
  // port B
  input  logic                      b_we,
  input  logic [$clog2(DEPTH)-1:0]  b_addr,
  input  logic [W-1:0]              b_wdata,
  output logic [W-1:0]              b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    b_rdata <= mem[b_addr];
  end

endmodule
