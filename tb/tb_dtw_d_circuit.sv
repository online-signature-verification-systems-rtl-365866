// tb_dtw_d_circuit: loads random template and signature samples, issues
// random (i, j) points (with gaps) and checks each distance d(i,j), its row
// and column tag, and the 26-cycle latency from issue to result.
module tb_dtw_d_circuit;
  import dtw_pkg::*;
  localparam int N = 256, LAT = 26;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic t_we = 0, s_we = 0, iss_valid = 0, wr_valid;
  logic [7:0] t_addr = '0, s_addr = '0;
  logic signed [SAMPLE_W-1:0] t_x = '0, t_y = '0, s_x = '0, s_y = '0;
  idx_t iss_row = '0, iss_col = '0, wr_row, wr_col;
  logic [D_W-1:0] wr_d;

  dtw_d_circuit #(.N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  longint tx[N], ty[N], sx[N], sy[N];
  longint exp_d [$];
  int exp_t [$], exp_r [$], exp_c [$];

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint nsqrt(longint v);
    longint r, rn;
    if (v < 2) return v;
    r = v;
    rn = (r + v / r) / 2;
    while (rn < r) begin r = rn; rn = (r + v / r) / 2; end
    return r;
  endfunction

  always @(posedge clk) begin
    #1;
    if (!rst && wr_valid) begin
      checks++;
      if (exp_d.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        longint e; int t, r, c;
        e = exp_d.pop_front(); t = exp_t.pop_front(); r = exp_r.pop_front(); c = exp_c.pop_front();
        if (longint'(wr_d) != e || cyc - t != LAT || int'(wr_row) != r || int'(wr_col) != c) begin
          failures++;
          if (failures < 5) $display("d(%0d,%0d)=%0d exp d(%0d,%0d)=%0d lat %0d", wr_row, wr_col, wr_d, r, c, e, cyc - t);
        end
      end
    end
  end

  initial begin
    logic signed [SAMPLE_W-1:0] v;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      t_we = 1; s_we = 1; t_addr = 8'(k); s_addr = 8'(N - 1 - k);
      t_x = SAMPLE_W'($urandom); t_y = SAMPLE_W'($urandom);
      s_x = SAMPLE_W'($urandom); s_y = SAMPLE_W'($urandom);
      v = t_x; tx[k] = longint'(v); v = t_y; ty[k] = longint'(v);
      v = s_x; sx[N-1-k] = longint'(v); v = s_y; sy[N-1-k] = longint'(v);
    end
    @(negedge clk); t_we = 0; s_we = 0;
    for (int n = 0; n < 3000; n++) begin
      int i, j;
      longint dx, dy;
      @(negedge clk);
      if (n % 8 == 5) begin iss_valid = 0; continue; end
      i = $urandom_range(0, N - 1); j = $urandom_range(0, N - 1);
      iss_valid = 1; iss_row = idx_t'(i); iss_col = idx_t'(j);
      dx = tx[i] - sx[j]; dy = ty[i] - sy[j];
      exp_d.push_back(nsqrt((dx * dx + dy * dy) >> 14));
      exp_t.push_back(cyc); exp_r.push_back(i); exp_c.push_back(j);
    end
    @(negedge clk); iss_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_d.size() != 0) begin failures++; $display("%0d results missing", exp_d.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
