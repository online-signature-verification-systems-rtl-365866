// dtw_sqrt: fully pipelined integer square root, one result per clock.
//
// Computes q = floor(sqrt(x)) for an unsigned IN_W-bit radicand, producing an
// IN_W/2-bit root. It is a digit-by-digit (restoring) square root with one
// pipeline stage per result bit, so the latency is IN_W/2 cycles: 22 cycles
// for the 44-bit radicand used here, the same latency and throughput as the
// square-root core of the reference design. Interpreted in fixed point, a
// Q4.40 radicand gives a Q2.20 root.
//
// Interface: in_valid/x are sampled every clock; out_valid/q appear LAT
// cycles later. There is no stall; rst clears the valid pipeline.
module dtw_sqrt #(
  parameter int unsigned IN_W = 44,
  localparam int unsigned Q_W = IN_W / 2,
  localparam int unsigned LAT = Q_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  x,
  output logic             out_valid,
  output logic [Q_W-1:0]   q
);

  // Per stage: remaining radicand bits, partial remainder and partial root.
  logic [IN_W-1:0] rad_s [LAT+1];
  logic [Q_W+1:0]  rem_s [LAT+1];
  logic [Q_W-1:0]  root_s[LAT+1];
  logic            val_s [LAT+1];

  assign rad_s[0]  = x;
  assign rem_s[0]  = '0;
  assign root_s[0] = '0;
  assign val_s[0]  = in_valid;

  for (genvar k = 0; k < int'(LAT); k++) begin : g_stage
    logic [Q_W+1:0] rem_sh, trial;
    always_comb begin
      // bring down the next two radicand bits
      rem_sh = {rem_s[k][Q_W-1:0], rad_s[k][IN_W-1 -: 2]};
      trial  = {root_s[k], 2'b01};
    end
    always_ff @(posedge clk) begin
      rad_s[k+1] <= {rad_s[k][IN_W-3:0], 2'b00};
      if (rem_sh >= trial) begin
        rem_s[k+1]  <= rem_sh - trial;
        root_s[k+1] <= {root_s[k][Q_W-2:0], 1'b1};
      end else begin
        rem_s[k+1]  <= rem_sh;
        root_s[k+1] <= {root_s[k][Q_W-2:0], 1'b0};
      end
    end
    always_ff @(posedge clk) begin
      if (rst) val_s[k+1] <= 1'b0;
      else     val_s[k+1] <= val_s[k];
    end
  end

  assign q         = root_s[LAT];
  assign out_valid = val_s[LAT];

endmodule
