// tb_dtw_sqrt: streams radicands (edge cases, perfect squares and their
// neighbours, random values) through the square root one per clock and
// checks q = floor(sqrt(x)) and the 22-cycle latency of every result.
module tb_dtw_sqrt;
  localparam int IN_W = 44, LAT = 22;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [IN_W-1:0] x = '0;
  logic [IN_W/2-1:0] q;

  dtw_sqrt #(.IN_W(IN_W)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_q [$];
  int     exp_t [$];
  int     cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint ref_sqrt(longint v);
    longint r = 0;
    for (int b = IN_W/2 - 1; b >= 0; b--)
      if ((r | (64'd1 << b)) * (r | (64'd1 << b)) <= v) r = r | (64'd1 << b);
    return r;
  endfunction

  // checker
  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        longint e; int t;
        e = exp_q.pop_front(); t = exp_t.pop_front();
        if (longint'(q) != e || cyc - t != LAT) begin
          failures++;
          if (failures < 5) $display("q=%0d exp %0d latency %0d", q, e, cyc - t);
        end
      end
    end
  end

  initial begin
    longint v, r;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 7 == 3) begin in_valid = 0; continue; end
      case (n % 5)
        0: v = {$urandom, $urandom} & ((64'd1 << IN_W) - 1);
        1: begin r = longint'($urandom_range(0, 32'h3f_ffff)); v = r * r; end
        2: begin r = longint'($urandom_range(0, 32'h3f_ffff)); v = r * r - 1; if (r == 0) v = 0; end
        3: v = (64'd1 << IN_W) - 1 - longint'($urandom_range(0, 3));
        default: v = longint'($urandom_range(0, 1000));
      endcase
      in_valid = 1; x = IN_W'(v);
      exp_q.push_back(ref_sqrt(v));
      exp_t.push_back(cyc);
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
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
