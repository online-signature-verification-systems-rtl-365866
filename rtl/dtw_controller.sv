// dtw_controller: controller of the DTW circuit.
//
// It walks region R row by row twice at once: once for the D-matrix circuit
// (issuing the distance points of row i+1) and once for the G-matrix circuit
// (issuing the cost points of row i). Each walk issues at most one point per
// clock. The column range of each row comes from a region ROM; each walk
// has its own ROM, addressed one row ahead so that the next row's bounds are
// ready when the walk reaches the row's last column, even for a one-point row.
//
// Because the distance and cost row buffers hold only two rows each, the two
// walks are kept in step by three interlocks (instead of a fixed schedule):
//   * D waits before issuing (i,j), i >= 2, until G has issued (i-1,j): that
//     point still has to read d(i-2,j), which d(i,j) will overwrite;
//   * G waits before issuing (i,j) until d(i,j) has been written;
//   * G waits before issuing (i,j) until g(i-1,min(j-1,j1(i-1))) has been
//     written, so that every cost it reads is already stored.
// Each interlock has a status output that is high in the cycles it stalls.
//
// With every G point the controller sends flags telling the G circuit which
// neighbours lie outside R (they count as infinity), which one is the origin
// g(-1,-1) = 0, and whether the point must be kept for the start of the next
// row. Both walks follow the reference order: rows 0..N-1, columns j0..j1.
//
// Interface: pulse start while idle; busy is high during the run; done pulses
// for one cycle after g(N-1,N-1) has been written. The reference design
// states the controller's duties (row order, region bounds from ROM, D one
// row ahead of G); the two walks and the interlocks are this design's choice.
module dtw_controller
  import dtw_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  localparam int unsigned RW = $clog2(N) + 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // region ROM of the D walk
  output logic [RW-1:0]  romd_addr,
  input  idx_t           romd_j0,
  input  idx_t           romd_j1,
  // region ROM of the G walk
  output logic [RW-1:0]  romg_addr,
  input  idx_t           romg_j0,
  input  idx_t           romg_j1,
  // D-matrix circuit
  output logic           d_iss_valid,
  output idx_t           d_iss_row,
  output idx_t           d_iss_col,
  input  logic           dwr_valid,
  input  idx_t           dwr_row,
  input  idx_t           dwr_col,
  // G-matrix circuit
  output logic           g_iss_valid,
  output gtag_t          g_iss_tag,
  input  logic           gwr_valid,
  input  idx_t           gwr_row,
  input  idx_t           gwr_col,
  // status: a walk that has work but waits this cycle
  output logic           d_stall,       // D waits for G (buffer reuse)
  output logic           g_stall_d,     // G waits for a distance
  output logic           g_stall_g      // G waits for a cost of the previous row
);

  localparam idx_t LAST = idx_t'(N - 1);

  logic running;
  // D walk
  idx_t di, dj, dj1;
  logic d_fin;
  // G walk
  idx_t gi, gj;
  idx_t c_j0, c_j1, p1_j0, p1_j1, p2_j0, p2_j1;
  logic g_fin;
  // written positions
  idx_t dwi, dwj, gwi, gwj;
  logic d_any, g_any;

  // ---------------- D walk ----------------
  logic d_war_ok, d_go, d_row_end;
  assign d_war_ok  = (di < idx_t'(2)) || (gi > di - idx_t'(1)) ||
                     ((gi == di - idx_t'(1)) && (gj > dj)) || g_fin;
  assign d_go      = running && !d_fin && d_war_ok;
  assign d_row_end = (dj == dj1);
  assign d_stall   = running && !d_fin && !d_war_ok;

  assign d_iss_valid = d_go;
  assign d_iss_row   = di;
  assign d_iss_col   = dj;

  idx_t di_next;
  always_comb begin
    di_next = di;
    if (d_go && d_row_end && di != LAST) di_next = di + idx_t'(1);
  end
  assign romd_addr = running ? RW'(di_next + idx_t'(1)) : (start ? RW'(1) : '0);

  // ---------------- G walk ----------------
  idx_t need_col;
  logic g_raw_d, g_raw_g, g_go, g_row_end;
  assign need_col  = (gj - idx_t'(1) < p1_j1) ? gj - idx_t'(1) : p1_j1;
  assign g_raw_d   = d_any && ((dwi > gi) || ((dwi == gi) && (dwj >= gj)));
  assign g_raw_g   = (gi == idx_t'(0)) ||
                     (g_any && ((gwi > gi - idx_t'(1)) ||
                                ((gwi == gi - idx_t'(1)) && (gwj >= need_col))));
  assign g_go      = running && !g_fin && g_raw_d && g_raw_g;
  assign g_row_end = (gj == c_j1);
  assign g_stall_d = running && !g_fin && !g_raw_d;
  assign g_stall_g = running && !g_fin && g_raw_d && !g_raw_g;

  idx_t gi_next;
  always_comb begin
    gi_next = gi;
    if (g_go && g_row_end && gi != LAST) gi_next = gi + idx_t'(1);
  end
  assign romg_addr = running ? RW'(gi_next + idx_t'(1)) : (start ? RW'(1) : '0);

  function automatic logic inside_row(idx_t j, idx_t lo, idx_t hi);
    return (j >= lo) && (j <= hi);
  endfunction

  always_comb begin
    g_iss_valid       = g_go;
    g_iss_tag.row     = gi;
    g_iss_tag.col     = gj;
    g_iss_tag.first   = (gj == c_j0);
    g_iss_tag.v_dup   = inside_row(gj, p1_j0, p1_j1);
    g_iss_tag.v_gul   = inside_row(gj - idx_t'(1), p1_j0, p1_j1);
    g_iss_tag.org_ul  = (gi == idx_t'(0)) && (gj == idx_t'(0));
    g_iss_tag.v_gul2s = inside_row(gj - idx_t'(2), p1_j0, p1_j1);
    g_iss_tag.v_guu   = inside_row(gj - idx_t'(1), p2_j0, p2_j1);
    g_iss_tag.org_uu  = (gi == idx_t'(1)) && (gj == idx_t'(0));
    g_iss_tag.cap     = (gi != LAST) && (gj == romg_j0 - idx_t'(2));
  end

  // ---------------- state ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      done    <= 1'b0;
      d_fin   <= 1'b0;
      g_fin   <= 1'b0;
      d_any   <= 1'b0;
      g_any   <= 1'b0;
      di <= '0; dj <= '0; dj1 <= '0;
      gi <= '0; gj <= '0;
      c_j0 <= '0; c_j1 <= '0;
      p1_j0 <= idx_t'(1); p1_j1 <= '0; p2_j0 <= idx_t'(1); p2_j1 <= '0;
      dwi <= '0; dwj <= '0; gwi <= '0; gwj <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          // both ROMs show row 0 while idle
          running <= 1'b1;
          d_fin <= 1'b0; g_fin <= 1'b0; d_any <= 1'b0; g_any <= 1'b0;
          di <= '0; dj <= romd_j0; dj1 <= romd_j1;
          gi <= '0; gj <= romg_j0; c_j0 <= romg_j0; c_j1 <= romg_j1;
          p1_j0 <= idx_t'(1); p1_j1 <= '0;   // rows -1 and -2 are empty
          p2_j0 <= idx_t'(1); p2_j1 <= '0;
        end
      end else begin
        // D walk
        if (d_go) begin
          if (d_row_end) begin
            if (di == LAST) d_fin <= 1'b1;
            else begin
              di <= di_next; dj <= romd_j0; dj1 <= romd_j1;
            end
          end else dj <= dj + idx_t'(1);
        end
        // G walk
        if (g_go) begin
          if (g_row_end) begin
            if (gi == LAST) g_fin <= 1'b1;
            else begin
              gi <= gi_next; gj <= romg_j0;
              p2_j0 <= p1_j0; p2_j1 <= p1_j1;
              p1_j0 <= c_j0;  p1_j1 <= c_j1;
              c_j0  <= romg_j0; c_j1 <= romg_j1;
            end
          end else gj <= gj + idx_t'(1);
        end
        // written positions
        if (dwr_valid) begin
          d_any <= 1'b1; dwi <= dwr_row; dwj <= dwr_col;
        end
        if (gwr_valid) begin
          g_any <= 1'b1; gwi <= gwr_row; gwj <= gwr_col;
          if (gwr_row == LAST && gwr_col == LAST) begin
            running <= 1'b0;
            done    <= 1'b1;
          end
        end
      end
    end
  end

  assign busy = running;

endmodule
