// tb_dtw_sample_ram: writes random sample pairs to every address, then reads
// them back in random order, checking the data and the one-cycle latency,
// including a write and a read in the same cycle.
module tb_dtw_sample_ram;
  import dtw_pkg::*;
  localparam int N = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [7:0] wr_addr = '0, rd_addr = '0;
  logic signed [SAMPLE_W-1:0] wr_x = '0, wr_y = '0, rd_x, rd_y;

  dtw_sample_ram #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  logic [SAMPLE_W-1:0] mx [N], my [N];

  initial begin
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      we = 1; wr_addr = 8'(k);
      wr_x = SAMPLE_W'($urandom); wr_y = SAMPLE_W'($urandom);
      mx[k] = wr_x; my[k] = wr_y;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 600; n++) begin
      int a;
      a = $urandom_range(0, N - 1);
      rd_addr = 8'(a);
      // sometimes write another address in the same cycle
      if (n % 3 == 0) begin
        int b;
        b = (a + 1) % N;
        we = 1; wr_addr = 8'(b); wr_x = SAMPLE_W'($urandom); wr_y = SAMPLE_W'($urandom);
        mx[b] = wr_x; my[b] = wr_y;
      end else we = 0;
      @(posedge clk); #1;
      checks++;
      if (rd_x !== mx[a] || rd_y !== my[a]) begin
        failures++;
        if (failures < 5) $display("addr %0d: %h %h exp %h %h", a, rd_x, rd_y, mx[a], my[a]);
      end
      @(negedge clk);
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
