// tb_dtw_top: end-to-end test of the DTW circuit.
//
// Loads Q1.27 template and signature samples and runs the circuit three
// times: random samples with extreme values, a smooth pen trace against a
// time-warped copy of itself (genuine), and the same trace against an
// unrelated one (forgery). It compares every g(i,j) written to the
// external-memory port, at the default size N = 256, with a plain software
// model of the fixed-point recursion. It also checks the write order (row-major inside R), the number
// of points, the start-to-done cycle count, and that every mechanism of the
// circuit was exercised: the three controller interlocks, the row-start
// g(i-1,j0-2) register, the row-start second read of g(i-2,j0-1), buffer
// swaps and neighbours outside R replaced by infinity. The genuine copy
// must score well below the forgery.
module tb_dtw_top;
  import dtw_pkg::*;

  localparam int N = int'(N_DEF);   // the design's default size
  localparam longint INF = 64'h0000_0000_FFFF_FFFF;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic t_we = 0, s_we = 0, start = 0;
  logic [$clog2(N)-1:0] t_addr = '0, s_addr = '0;
  logic signed [SAMPLE_W-1:0] t_x = '0, t_y = '0, s_x = '0, s_y = '0;
  logic busy, done, g_wr_valid;
  idx_t g_wr_row, g_wr_col;
  logic [G_W-1:0] g_wr_data;

  dtw_top dut (.*);   // default parameters: full-size run

  int checks = 0, failures = 0;
  longint tx[N], ty[N], sx[N], sy[N];
  longint dref[N][N], gref[N][N];
  longint gout[N][N];
  int npts;
  longint score[3];

  // mechanism counters
  int n_dstall = 0, n_gstall_d = 0, n_gstall_g = 0, n_cap = 0, n_portb = 0, n_swap = 0, n_inf = 0;  // n_inf: points with a neighbour outside R

  function automatic bit in_r(int i, int j);
    if (i < 0 || j < 0 || i >= N || j >= N) return 0;
    return j >= int'(region_j0(N, i)) && j <= int'(region_j1(N, i));
  endfunction

  function automatic longint isqrt(longint x);
    longint lo = 0, hi = 64'd1 << 23, mid;
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      if (mid * mid <= x) lo = mid; else hi = mid;
    end
    return lo;
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

  task automatic build_ref();
    longint dx, dy, c1, c2, c3, m;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        dx = tx[i] - sx[j];
        dy = ty[i] - sy[j];
        dref[i][j] = isqrt((dx * dx + dy * dy) >> 14);
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (in_r(i, j)) begin
          c1 = sadd(sadd(gget(i-1, j-2), 2 * dget(i, j-1)), dget(i, j));
          c2 = sadd(gget(i-1, j-1), 2 * dget(i, j));
          c3 = sadd(sadd(gget(i-2, j-1), 2 * dget(i-1, j)), dget(i, j));
          m = c1 < c2 ? c1 : c2;
          gref[i][j] = m < c3 ? m : c3;
        end
  endtask

  function automatic longint rnd_sample();
    logic signed [SAMPLE_W-1:0] v;
    v = SAMPLE_W'($urandom);
    return longint'(v);
  endfunction

  task automatic run_one(int mode);
    int cyc, li, lj, exp_cycles;
    bit order_ok;
    // mode 0: random template and signature, with extreme values at k = 0
    // mode 1: smooth pen trace as template; the signature is the same trace
    //         with a non-linear time warp and a little noise (genuine)
    // mode 2: the same template against a different random trace (forgery)
    for (int k = 0; k < N; k++) begin
      real u, w;
      if (mode == 0) begin
        tx[k] = rnd_sample(); ty[k] = rnd_sample();
        sx[k] = rnd_sample(); sy[k] = rnd_sample();
      end else begin
        u = real'(k) / real'(N);
        w = u + 0.08 * $sin(6.2831853 * u);          // time warp
        tx[k] = longint'(0.8 * $sin(12.566 * u) * 134217728.0);
        ty[k] = longint'(0.7 * $cos(6.2831853 * u + 0.5 * $sin(18.85 * u)) * 134217728.0);
        if (mode == 1) begin
          sx[k] = longint'(0.8 * $sin(12.566 * w) * 134217728.0) + (rnd_sample() >>> 8);
          sy[k] = longint'(0.7 * $cos(6.2831853 * w + 0.5 * $sin(18.85 * w)) * 134217728.0)
                  + (rnd_sample() >>> 8);
        end else begin
          sx[k] = rnd_sample() >>> 1; sy[k] = rnd_sample() >>> 1;
        end
      end
    end
    if (mode == 0) begin
      tx[0] = -(64'sd1 << 27); sx[0] = (64'sd1 << 27) - 1;
      ty[0] = -(64'sd1 << 27); sy[0] = (64'sd1 << 27) - 1;
    end
    build_ref();
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      t_we = 1; t_addr = k[$clog2(N)-1:0]; t_x = SAMPLE_W'(tx[k]); t_y = SAMPLE_W'(ty[k]);
      s_we = 1; s_addr = k[$clog2(N)-1:0]; s_x = SAMPLE_W'(sx[k]); s_y = SAMPLE_W'(sy[k]);
    end
    @(negedge clk);
    t_we = 0; s_we = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) gout[i][j] = -1;
    npts = 0; li = -1; lj = -1; order_ok = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
      if (g_wr_valid) begin
        int r, c;
        r = int'(g_wr_row); c = int'(g_wr_col);
        if (!(r > li || (r == li && c > lj))) order_ok = 0;
        if (r != li) n_swap++;
        li = r; lj = c;
        if (in_r(r, c)) gout[r][c] = longint'(g_wr_data);
        else order_ok = 0;
        npts++;
      end
    end
    // compare
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (in_r(i, j)) begin
          checks++;
          if (gout[i][j] != gref[i][j]) begin
            failures++;
            if (failures < 10) $display("MISMATCH g(%0d,%0d) got %0d exp %0d", i, j, gout[i][j], gref[i][j]);
          end
        end
    checks++;
    if (!order_ok) begin failures++; $display("FAIL: write order"); end
    exp_cycles = 0;
    for (int i = 0; i < N; i++) exp_cycles += int'(region_j1(N, i)) - int'(region_j0(N, i)) + 1;
    checks++;
    if (npts != exp_cycles) begin failures++; $display("FAIL: %0d points written, expected %0d", npts, exp_cycles); end
    $display("run %0d: |R| = %0d points, start to done = %0d cycles, g(N-1,N-1) = %0d",
             mode, exp_cycles, cyc, gout[N-1][N-1]);
    score[mode] = gout[N-1][N-1];
    // throughput: one g(i,j) per clock apart from pipeline fill and the
    // interlock stalls of the short first and last rows (at most 3 per row)
    checks++;
    if (cyc > exp_cycles + 3 * N) begin failures++; $display("FAIL: too slow"); end
  endtask

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.d_stall)   n_dstall++;
    if (dut.g_stall_d) n_gstall_d++;
    if (dut.g_stall_g) n_gstall_g++;
    if (dut.u_gcirc.v1 && dut.u_gcirc.t1.first && dut.u_gcirc.t1.v_gul2s) n_cap++;
    if (dut.u_gcirc.v1 && dut.u_gcirc.t1.first && dut.u_gcirc.t1.v_guu) n_portb++;
    if (dut.u_gcirc.v1 && (!dut.u_gcirc.t1.v_dup || !dut.u_gcirc.t1.v_gul || !dut.u_gcirc.t1.v_guu ||
        (dut.u_gcirc.t1.first && !dut.u_gcirc.t1.v_gul2s))) n_inf++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    run_one(0);
    run_one(1);
    run_one(2);
    // the time-warped genuine trace must align far better than the forgery
    checks++;
    if (!(score[1] * 4 < score[2])) begin failures++; $display("FAIL: genuine score not below forgery"); end
    $display("mechanisms: D waits=%0d, G waits for d=%0d, G waits for g=%0d, row-start g(i-1,j0-2) register=%0d, row-start port-B read=%0d, rows=%0d, points with a neighbour outside R=%0d",
             n_dstall, n_gstall_d, n_gstall_g, n_cap, n_portb, n_swap, n_inf);
    checks++; if (n_dstall == 0)   begin failures++; $display("FAIL: no D interlock stall"); end
    checks++; if (n_gstall_d == 0) begin failures++; $display("FAIL: no G wait for d"); end
    checks++; if (n_gstall_g == 0) begin failures++; $display("FAIL: no G wait for g"); end
    checks++; if (n_cap == 0)      begin failures++; $display("FAIL: row-start register never used"); end
    checks++; if (n_portb == 0)    begin failures++; $display("FAIL: row-start port-B read never used"); end
    checks++; if (n_inf == 0)      begin failures++; $display("FAIL: region edge never reached"); end
    checks++; if (n_swap != 3 * N) begin failures++; $display("FAIL: %0d row swaps", n_swap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000 + 40 * N * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
