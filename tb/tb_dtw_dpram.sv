// tb_dtw_dpram: random reads and writes on both ports of the row buffer,
// compared with a model memory; a read returns the word stored before the
// edge (one-cycle latency, old data on a same-cycle write).
module tb_dtw_dpram;
  localparam int DEPTH = 256, W = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic a_we = 0, b_we = 0;
  logic [7:0] a_addr = '0, b_addr = '0;
  logic [W-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;

  dtw_dpram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] m [DEPTH];

  initial begin
    logic [W-1:0] ea, eb;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      a_we = 1; a_addr = 8'(k); a_wdata = $urandom; m[k] = a_wdata;
      b_we = 0;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a_addr = 8'($urandom_range(0, 255));
      b_addr = 8'($urandom_range(0, 255));
      if (b_addr == a_addr) b_addr = b_addr + 8'd1;
      a_we = ($urandom_range(0, 3) == 0);
      b_we = ($urandom_range(0, 1) == 0);
      a_wdata = $urandom; b_wdata = $urandom;
      ea = m[a_addr]; eb = m[b_addr];
      @(posedge clk); #1;
      if (a_we) m[a_addr] = a_wdata;
      if (b_we) m[b_addr] = b_wdata;
      checks += 2;
      if (a_rdata !== ea) begin failures++; if (failures < 5) $display("A %h exp %h", a_rdata, ea); end
      if (b_rdata !== eb) begin failures++; if (failures < 5) $display("B %h exp %h", b_rdata, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
