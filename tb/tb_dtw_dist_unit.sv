// tb_dtw_dist_unit: streams random and extreme Q1.27 sample pairs through the
// distance unit and checks d = floor(sqrt(((tx-sx)^2 + (ty-sy)^2) >> 14))
// (a Q2.20 Euclidean distance), the returned tag and the 25-cycle latency.
module tb_dtw_dist_unit;
  import dtw_pkg::*;
  localparam int LAT = 25;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [7:0] in_tag = '0, out_tag;
  logic signed [SAMPLE_W-1:0] tx = '0, ty = '0, sx = '0, sy = '0;
  logic [D_W-1:0] d;

  dtw_dist_unit #(.TAG_W(8)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  longint exp_d [$];
  int exp_t [$], exp_g [$];

  always @(posedge clk) cyc <= cyc + 1;

  // integer square root by Newton iteration
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
    if (!rst && out_valid) begin
      checks++;
      if (exp_d.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        longint e; int t, g;
        e = exp_d.pop_front(); t = exp_t.pop_front(); g = exp_g.pop_front();
        if (longint'(d) != e || cyc - t != LAT || int'(out_tag) != g) begin
          failures++;
          if (failures < 5) $display("d=%0d exp %0d lat %0d tag %0d/%0d", d, e, cyc - t, out_tag, g);
        end
      end
    end
  end

  initial begin
    longint a, b, c, e, dx, dy;
    repeat (3) @(negedge clk);
    rst = 0;
    // sanity of the reference on small numbers
    checks++;
    if (nsqrt(99) != 9 || nsqrt(100) != 10) failures++;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n % 9 == 4) begin in_valid = 0; continue; end
      tx = SAMPLE_W'($urandom); ty = SAMPLE_W'($urandom);
      sx = SAMPLE_W'($urandom); sy = SAMPLE_W'($urandom);
      if (n % 11 == 0) begin   // extreme corners
        tx = {1'b1, {(SAMPLE_W-1){1'b0}}}; ty = tx;
        sx = {1'b0, {(SAMPLE_W-1){1'b1}}}; sy = sx;
      end
      if (n % 13 == 0) begin sx = tx; sy = ty; end  // zero distance
      in_valid = 1; in_tag = 8'(n);
      a = longint'(tx); b = longint'(sx); c = longint'(ty); e = longint'(sy);
      dx = a - b; dy = c - e;
      exp_d.push_back(nsqrt((dx * dx + dy * dy) >> 14));
      exp_t.push_back(cyc);
      exp_g.push_back(n % 256);
    end
    @(negedge clk); in_valid = 0;
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
