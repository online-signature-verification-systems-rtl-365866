// tb_dtw_g_circuit: drives the G-matrix circuit directly, row by row. For
// each row it first writes the row's distances through the D-result port,
// then issues the row's points with random gaps (0 to 5 idle cycles), with
// the region flags worked out here from a brute-force region test. Every
// g(i,j) leaving the circuit is compared with a software model of the DTW
// recursion. Also checks the 3-cycle issue-to-result latency.
module tb_dtw_g_circuit;
  import dtw_pkg::*;
  localparam int N = 256, LAT = 3;
  localparam longint INF = 64'hFFFF_FFFF;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic dwr_valid = 0, iss_valid = 0, g_wr_valid;
  idx_t dwr_row = '0, dwr_col = '0, g_wr_row, g_wr_col;
  logic [D_W-1:0] dwr_d = '0;
  gtag_t iss_tag = '0;
  logic [G_W-1:0] g_wr_data;

  dtw_g_circuit #(.N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  longint dref[N][N], gref[N][N];
  int exp_t [$], exp_r [$], exp_c [$];
  int n_cap = 0, n_portb = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit in_r(int i, int j);
    if (i < 0 || j < 0 || i >= N || j >= N) return 0;
    return (j <= 2 * i) && (i <= 2 * j) && ((N - 1 - j) <= 2 * (N - 1 - i)) &&
           ((N - 1 - i) <= 2 * (N - 1 - j));
  endfunction
  function automatic longint sadd(longint a, longint b);
    if (a >= INF || b >= INF || a + b >= INF) return INF;
    return a + b;
  endfunction
  function automatic longint gget(int i, int j);
    if (i == -1 && j == -1) return 0;
    if (!in_r(i, j)) return INF;
    return gref[i][j];
  endfunction
  function automatic longint dget(int i, int j);
    if (!in_r(i, j)) return INF;
    return dref[i][j];
  endfunction

  always @(posedge clk) begin
    #1;
    if (!rst && g_wr_valid) begin
      checks++;
      if (exp_r.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        int t, r, c;
        t = exp_t.pop_front(); r = exp_r.pop_front(); c = exp_c.pop_front();
        if (int'(g_wr_row) != r || int'(g_wr_col) != c || longint'(g_wr_data) != gref[r][c] ||
            cyc - t != LAT) begin
          failures++;
          if (failures < 8) $display("g(%0d,%0d)=%0d exp g(%0d,%0d)=%0d lat %0d",
                                     g_wr_row, g_wr_col, g_wr_data, r, c, gref[r][c], cyc - t);
        end
      end
    end
  end

  initial begin
    longint c1, c2, c3, m;
    // reference: random distances in Q2.20, recursion of the DTW
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) dref[i][j] = longint'($urandom_range(0, (1 << D_W) - 1));
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (in_r(i, j)) begin
          c1 = sadd(sadd(gget(i-1, j-2), 2 * dget(i, j-1)), dget(i, j));
          c2 = sadd(gget(i-1, j-1), 2 * dget(i, j));
          c3 = sadd(sadd(gget(i-2, j-1), 2 * dget(i-1, j)), dget(i, j));
          m = c1 < c2 ? c1 : c2;
          gref[i][j] = m < c3 ? m : c3;
        end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      int lo, hi, nlo;
      lo = -1; hi = -2; nlo = -100;
      for (int j = N - 1; j >= 0; j--) if (in_r(i, j)) lo = j;
      for (int j = 0; j < N; j++) if (in_r(i, j)) hi = j;
      for (int j = N - 1; j >= 0; j--) if (in_r(i + 1, j)) nlo = j;
      // distances of row i
      for (int j = lo; j <= hi; j++) begin
        @(negedge clk);
        dwr_valid = 1; dwr_row = idx_t'(i); dwr_col = idx_t'(j); dwr_d = D_W'(dref[i][j]);
      end
      @(negedge clk); dwr_valid = 0;
      // points of row i
      for (int j = lo; j <= hi; j++) begin
        int gap;
        gap = $urandom_range(0, 5);
        if (gap > 2) begin iss_valid = 0; repeat (gap - 2) @(negedge clk); end
        iss_valid = 1;
        iss_tag.row     = idx_t'(i);
        iss_tag.col     = idx_t'(j);
        iss_tag.first   = (j == lo);
        iss_tag.v_dup   = in_r(i - 1, j);
        iss_tag.v_gul   = in_r(i - 1, j - 1);
        iss_tag.org_ul  = (i == 0 && j == 0);
        iss_tag.v_gul2s = in_r(i - 1, j - 2);
        iss_tag.v_guu   = in_r(i - 2, j - 1);
        iss_tag.org_uu  = (i == 1 && j == 0);
        iss_tag.cap     = (j == nlo - 2);
        if (iss_tag.first && iss_tag.v_gul2s) n_cap++;
        if (iss_tag.first && iss_tag.v_guu) n_portb++;
        exp_t.push_back(cyc); exp_r.push_back(i); exp_c.push_back(j);
        @(negedge clk);
        iss_valid = 0;
      end
      repeat (LAT + 2) @(negedge clk);
    end
    checks++;
    if (exp_r.size() != 0 || n_cap == 0 || n_portb == 0) begin
      failures++; $display("results missing or row-start paths unused");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
