// dtw_g_circuit: the G-matrix computing circuit.
//
// It owns four dual-port row buffers. d_buf[0]/d_buf[1] hold the distances of
// the even and the odd rows, g_buf[0]/g_buf[1] the costs of the even and odd
// rows, so the "a" and "b" roles of each pair swap automatically on every new
// row (row parity selects the buffer). While it computes row i:
//   * d(i,j) is read from d_buf[i%2], d(i-1,j) from d_buf[(i+1)%2], and the
//     D-matrix circuit writes d(i+1,j) into d_buf[(i+1)%2] through port B;
//   * g(i-1,j-1) is read from g_buf[(i+1)%2], g(i-2,j) from g_buf[i%2], and
//     the new g(i,j) is written into g_buf[i%2] through port B.
// d(i,j-1), g(i-1,j-2) and g(i-2,j-1) of the next column are the values read
// for the previous column, kept in registers, so each buffer sees at most one
// read and one write per cycle. At the first column of a row, d(i,j-1) is
// outside R; g(i-2,j0-1) is read through port B of g_buf[i%2] (which no write
// can use at that moment), and g(i-1,j0-2) comes from a register that caught
// that value when it was written during the previous row.
// Values outside R, as flagged by the controller in the point's tag, are
// replaced by infinity; g(-1,-1) is 0.
//
// Timing: a point issued in cycle t is read at t+1, its candidate sums are
// registered at t+2 and g(i,j) at t+3; it is written (and appears on the g_wr
// port for the external memory) in cycle t+3, stored at the edge ending it.
// One point per clock. The controller guarantees that a point is issued only
// after the values it reads have been written. The two D and two G row
// buffers with swapping roles follow the reference design; selecting them by
// row parity, keeping reused operands in registers and the row-start paths
// are this design's choice.
module dtw_g_circuit
  import dtw_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst,
  // distances from the D-matrix circuit
  input  logic            dwr_valid,
  input  idx_t            dwr_row,
  input  idx_t            dwr_col,
  input  logic [D_W-1:0]  dwr_d,
  // point issue from the controller
  input  logic            iss_valid,
  input  gtag_t           iss_tag,
  // G-matrix results (to the controller and the external memory)
  output logic            g_wr_valid,
  output idx_t            g_wr_row,
  output idx_t            g_wr_col,
  output logic [G_W-1:0]  g_wr_data
);

  localparam int unsigned TAG_W = $bits(gtag_t);

  logic           iss_p;
  logic [AW-1:0]  col_a, colm1_a;

  assign iss_p   = iss_tag.row[0];
  assign col_a   = iss_tag.col[AW-1:0];
  assign colm1_a = AW'(iss_tag.col - idx_t'(1));

  // ---------------- distance row buffers ----------------
  logic [D_W-1:0] d_rd [2];
  for (genvar k = 0; k < 2; k++) begin : g_dbuf
    logic [D_W-1:0] unused_b;
    dtw_dpram #(.DEPTH(N), .W(D_W)) u_dbuf (
      .clk,
      .a_we(1'b0), .a_addr(col_a), .a_wdata('0), .a_rdata(d_rd[k]),
      .b_we(dwr_valid && (dwr_row[0] == 1'(k))), .b_addr(dwr_col[AW-1:0]),
      .b_wdata(dwr_d), .b_rdata(unused_b)
    );
  end

  // ---------------- cost row buffers ----------------
  logic [G_W-1:0] g_rda [2], g_rdb [2];
  for (genvar k = 0; k < 2; k++) begin : g_gbuf
    logic          we_b;
    logic [AW-1:0] addr_a, addr_b;
    assign we_b   = g_wr_valid && (g_wr_row[0] == 1'(k));
    // the row being computed (parity iss_p) reads column j for the next
    // column's g(i-2,j); the previous row's buffer is read at column j-1
    assign addr_a = (iss_p == 1'(k)) ? col_a : colm1_a;
    assign addr_b = we_b ? g_wr_col[AW-1:0] : colm1_a;
    dtw_dpram #(.DEPTH(N), .W(G_W)) u_gbuf (
      .clk,
      .a_we(1'b0), .a_addr(addr_a), .a_wdata('0), .a_rdata(g_rda[k]),
      .b_we(we_b), .b_addr(addr_b), .b_wdata(g_wr_data), .b_rdata(g_rdb[k])
    );
  end

  // ---------------- read stage ----------------
  logic  v1;
  gtag_t t1;
  always_ff @(posedge clk) begin
    if (rst) v1 <= 1'b0;
    else     v1 <= iss_valid;
    t1 <= iss_tag;
  end

  logic           p1;
  logic [G_W-1:0] d_cur, d_left, d_up, g_ul, g_ul2, g_uu;
  logic [G_W-1:0] d_prev, gul_prev, guu_next_prev, cap_reg;

  assign p1 = t1.row[0];

  always_comb begin
    d_cur  = G_W'(d_rd[p1]);
    d_left = t1.first ? G_INF : d_prev;
    d_up   = t1.v_dup ? G_W'(d_rd[~p1]) : G_INF;
    g_ul   = t1.org_ul ? '0 : (t1.v_gul ? g_rda[~p1] : G_INF);
    if (t1.first) g_ul2 = t1.v_gul2s ? cap_reg : G_INF;
    else          g_ul2 = gul_prev;
    if (t1.org_uu)      g_uu = '0;
    else if (!t1.v_guu) g_uu = G_INF;
    else if (t1.first)  g_uu = g_rdb[p1];
    else                g_uu = guu_next_prev;
  end

  always_ff @(posedge clk) begin
    if (v1) begin
      d_prev        <= d_cur;
      gul_prev      <= g_ul;
      guu_next_prev <= g_rda[p1];
    end
  end

  // ---------------- arithmetic ----------------
  logic [TAG_W-1:0] tag_out;
  gtag_t            t_out;

  dtw_g_unit #(.TAG_W(TAG_W)) u_gunit (
    .clk, .rst, .in_valid(v1), .in_tag(TAG_W'(t1)),
    .d_cur, .d_left, .d_up, .g_ul, .g_ul2, .g_uu,
    .out_valid(g_wr_valid), .out_tag(tag_out), .g(g_wr_data)
  );

  assign t_out     = gtag_t'(tag_out);
  assign g_wr_row  = t_out.row;
  assign g_wr_col  = t_out.col;

  // keep g(i, j0(i+1)-2) for the first column of row i+1
  always_ff @(posedge clk) begin
    if (g_wr_valid && t_out.cap) cap_reg <= g_wr_data;
  end

endmodule
