// tb_dtw_region_rom: checks every ROM entry against a brute-force scan of the
// Itakura parallelogram (slopes 1/2 and 2 through (0,0) and (N-1,N-1)), the
// one-cycle read latency, the empty range past the last row, and the number
// of region points (21,846 for N = 256).
module tb_dtw_region_rom;
  import dtw_pkg::*;
  localparam int N = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [$clog2(N):0] addr = '0;
  idx_t j0, j1;

  dtw_region_rom #(.N(N)) dut (.clk, .addr, .j0, .j1);

  int checks = 0, failures = 0;

  function automatic bit inside_par(int i, int j);
    return (j <= 2 * i) && (i <= 2 * j) && ((N - 1 - j) <= 2 * (N - 1 - i)) &&
           ((N - 1 - i) <= 2 * (N - 1 - j));
  endfunction

  initial begin
    int lo, hi, total;
    total = 0;
    for (int i = 0; i <= N; i++) begin
      @(negedge clk); addr = ($clog2(N)+1)'(i);
      @(negedge clk);
      lo = -1; hi = -2;
      if (i < N) for (int j = 0; j < N; j++) if (inside_par(i, j)) begin
        if (lo < 0) lo = j;
        hi = j;
      end
      checks++;
      if (i < N) begin
        total += hi - lo + 1;
        if (int'(j0) != lo || int'(j1) != hi) begin
          failures++;
          $display("row %0d: rom %0d..%0d expected %0d..%0d", i, j0, j1, lo, hi);
        end
      end else if (!(j0 > j1)) begin
        failures++; $display("row N not empty");
      end
    end
    // latency: change the address and look before the next edge
    @(negedge clk); addr = 5;
    @(negedge clk); addr = 200;
    #1; checks++;
    if (int'(j0) != 3) begin failures++; $display("latency: j0 %0d", j0); end
    checks++;
    if (total != 21846) begin failures++; $display("points %0d", total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
