// tb_dtw_g_unit: random operands, some of them infinite (all ones) and some
// near the top of the range, checked against the three-candidate minimum of
// the DTW recursion with saturating arithmetic; also checks the 2-cycle
// latency and the tag.
module tb_dtw_g_unit;
  import dtw_pkg::*;
  localparam int LAT = 2;
  localparam longint INF = 64'hFFFF_FFFF;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [7:0] in_tag = '0, out_tag;
  logic [G_W-1:0] d_cur = '0, d_left = '0, d_up = '0, g_ul = '0, g_ul2 = '0, g_uu = '0, g;

  dtw_g_unit #(.TAG_W(8)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  longint exp_g [$];
  int exp_t [$], exp_tag [$];
  int n_c1 = 0, n_c2 = 0, n_c3 = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint s(longint a, longint b);
    if (a == INF || b == INF || a + b >= INF) return INF;
    return a + b;
  endfunction

  function automatic logic [G_W-1:0] pick(int kind);
    case (kind)
      0: return G_INF;
      1: return G_W'($urandom_range(0, 4194303));            // a distance
      2: return 32'hFFFF_0000 + G_W'($urandom_range(0, 65000)); // near the top
      default: return G_W'($urandom_range(0, 1 << 30));
    endcase
  endfunction

  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      checks++;
      if (exp_g.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        longint e; int t, tg;
        e = exp_g.pop_front(); t = exp_t.pop_front(); tg = exp_tag.pop_front();
        if (longint'(g) != e || cyc - t != LAT || int'(out_tag) != tg) begin
          failures++;
          if (failures < 5) $display("g=%0d exp %0d lat %0d", g, e, cyc - t);
        end
      end
    end
  end

  initial begin
    longint c1, c2, c3, m;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 10 == 7) begin in_valid = 0; continue; end
      d_cur  = (n % 17 == 0) ? G_INF : pick(1);
      d_left = pick($urandom_range(0, 6) == 0 ? 0 : 1);
      d_up   = pick($urandom_range(0, 6) == 0 ? 0 : 1);
      g_ul   = pick($urandom_range(0, 3));
      g_ul2  = pick($urandom_range(0, 3));
      g_uu   = pick($urandom_range(0, 3));
      in_valid = 1; in_tag = 8'(n);
      c1 = s(s(longint'(g_ul2), s(longint'(d_left), longint'(d_left))), longint'(d_cur));
      c2 = s(longint'(g_ul), s(longint'(d_cur), longint'(d_cur)));
      c3 = s(s(longint'(g_uu), s(longint'(d_up), longint'(d_up))), longint'(d_cur));
      m = c1;
      if (c2 < m) m = c2;
      if (c3 < m) m = c3;
      if (m < INF) begin
        if (m == c1) n_c1++;
        else if (m == c2) n_c2++;
        else n_c3++;
      end
      exp_g.push_back(m);
      exp_t.push_back(cyc);
      exp_tag.push_back(n % 256);
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_g.size() != 0 || n_c1 == 0 || n_c2 == 0 || n_c3 == 0) begin
      failures++; $display("missing results or a candidate never won");
    end
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
