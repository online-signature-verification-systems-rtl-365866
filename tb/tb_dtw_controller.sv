// tb_dtw_controller: runs the controller with its two region ROMs against
// delay-line models of the D-matrix circuit (26 cycles from issue to written
// distance) and the G-matrix circuit (3 cycles from issue to written cost).
// It checks that both walks issue exactly the points of R in row-major
// order, that every G point is issued only after the distances and costs it
// reads are written, that no distance is issued before the G point that
// still reads the value it overwrites, that the region flags sent with every
// G point are right, and that done pulses once after g(N-1,N-1) is written.
module tb_dtw_controller;
  import dtw_pkg::*;
  localparam int N = 256, LD = 26, LG = 3;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  logic [$clog2(N):0] romd_addr, romg_addr;
  idx_t romd_j0, romd_j1, romg_j0, romg_j1;
  logic d_iss_valid, g_iss_valid;
  idx_t d_iss_row, d_iss_col;
  gtag_t g_iss_tag;
  logic d_stall, g_stall_d, g_stall_g;

  // pipeline models
  logic dv [LD]; idx_t dr [LD], dc [LD];
  logic gv [LG]; idx_t gr [LG], gc [LG];
  logic dwr_valid, gwr_valid;
  idx_t dwr_row, dwr_col, gwr_row, gwr_col;

  dtw_region_rom #(.N(N)) u_rd (.clk, .addr(romd_addr), .j0(romd_j0), .j1(romd_j1));
  dtw_region_rom #(.N(N)) u_rg (.clk, .addr(romg_addr), .j0(romg_j0), .j1(romg_j1));
  dtw_controller #(.N(N)) dut (.*);

  always_ff @(posedge clk) begin
    dv[0] <= d_iss_valid && !rst; dr[0] <= d_iss_row; dc[0] <= d_iss_col;
    gv[0] <= g_iss_valid && !rst; gr[0] <= g_iss_tag.row; gc[0] <= g_iss_tag.col;
    for (int k = 1; k < LD; k++) begin dv[k] <= dv[k-1]; dr[k] <= dr[k-1]; dc[k] <= dc[k-1]; end
    for (int k = 1; k < LG; k++) begin gv[k] <= gv[k-1]; gr[k] <= gr[k-1]; gc[k] <= gc[k-1]; end
  end
  // the last model stage is the write cycle
  assign dwr_valid = dv[LD-2]; assign dwr_row = dr[LD-2]; assign dwr_col = dc[LD-2];
  assign gwr_valid = gv[LG-2]; assign gwr_row = gr[LG-2]; assign gwr_col = gc[LG-2];

  int checks = 0, failures = 0, cyc = 0;
  bit d_written [N][N], g_written [N][N], g_issued [N][N];
  int di_exp, dj_exp, gi_exp, gj_exp, n_done, n_dst, n_gsd, n_gsg;

  function automatic bit in_r(int i, int j);
    if (i < 0 || j < 0 || i >= N || j >= N) return 0;
    return (j <= 2 * i) && (i <= 2 * j) && ((N - 1 - j) <= 2 * (N - 1 - i)) &&
           ((N - 1 - i) <= 2 * (N - 1 - j));
  endfunction
  function automatic void next_pt(inout int i, inout int j);
    do begin
      j++;
      if (j >= N) begin j = 0; i++; end
    end while (i < N && !in_r(i, j));
  endfunction
  function automatic bit gw(int i, int j);   // written, or not needed
    if (!in_r(i, j)) return 1;
    return g_written[i][j];
  endfunction
  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("cycle %0d: %s", cyc, m);
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      if (d_stall) n_dst++;
      if (g_stall_d) n_gsd++;
      if (g_stall_g) n_gsg++;
      if (d_iss_valid) begin
        int i, j;
        i = int'(d_iss_row); j = int'(d_iss_col);
        checks++;
        if (i != di_exp || j != dj_exp) fail($sformatf("D issued (%0d,%0d) expected (%0d,%0d)", i, j, di_exp, dj_exp));
        next_pt(di_exp, dj_exp);
        // buffer reuse: G must have issued every point up to (i-1, j)
        checks++;
        if (i >= 2) for (int jj = 0; jj <= j; jj++)
          if (in_r(i - 1, jj) && !g_issued[i-1][jj]) begin fail($sformatf("D (%0d,%0d) before G (%0d,%0d)", i, j, i-1, jj)); break; end
      end
      if (g_iss_valid) begin
        int i, j, nlo;
        i = int'(g_iss_tag.row); j = int'(g_iss_tag.col);
        checks++;
        if (i != gi_exp || j != gj_exp) fail($sformatf("G issued (%0d,%0d) expected (%0d,%0d)", i, j, gi_exp, gj_exp));
        next_pt(gi_exp, gj_exp);
        g_issued[i][j] = 1;
        checks++;
        if (!d_written[i][j]) fail("G before its distance");
        checks++;
        if (!gw(i-1, j-1) || !gw(i-1, j-2) || !gw(i-2, j-1)) fail($sformatf("G (%0d,%0d) before its costs", i, j));
        if (!in_r(i, j - 1)) begin   // row start: row i-2 must be complete
          checks++;
          for (int jj = 0; jj < N; jj++) if (i >= 2 && in_r(i - 2, jj) && !g_written[i-2][jj]) begin
            fail("row start with row i-2 pending"); break;
          end
        end
        nlo = -100;
        for (int jj = N - 1; jj >= 0; jj--) if (in_r(i + 1, jj)) nlo = jj;
        checks++;
        if (g_iss_tag.first != !in_r(i, j - 1) || g_iss_tag.v_dup != in_r(i - 1, j) ||
            g_iss_tag.v_gul != in_r(i - 1, j - 1) || g_iss_tag.org_ul != (i == 0 && j == 0) ||
            g_iss_tag.v_gul2s != in_r(i - 1, j - 2) || g_iss_tag.v_guu != in_r(i - 2, j - 1) ||
            g_iss_tag.org_uu != (i == 1 && j == 0) || g_iss_tag.cap != (j == nlo - 2))
          fail($sformatf("flags of (%0d,%0d): %b", i, j, g_iss_tag[7:0]));
      end
      if (dwr_valid) d_written[int'(dwr_row)][int'(dwr_col)] = 1;
      if (gwr_valid) g_written[int'(gwr_row)][int'(gwr_col)] = 1;
      if (done) n_done++;
    end
  end

  initial begin
    int t0;
    di_exp = 0; dj_exp = 0; gi_exp = 0; gj_exp = 0; n_done = 0;
    n_dst = 0; n_gsd = 0; n_gsg = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (di_exp != N || gi_exp != N) fail("walks incomplete");
    checks++;
    if (n_done != 1 || busy) fail("done/busy");
    checks++;
    if (n_dst == 0 || n_gsd == 0 || n_gsg == 0) fail("an interlock never acted");
    $display("start to done %0d cycles; stalls D %0d, G-d %0d, G-g %0d", cyc - t0 - 5, n_dst, n_gsd, n_gsg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
