// dtw_pkg: constants, types and helper functions shared by the DTW circuit.
//
// The DTW circuit aligns a 2-D signature {s_x, s_y} with an enrolled template
// {t_x, t_y}, both N samples long, on an Itakura parallelogram region R.
// Samples are Q1.27 fixed point (28 bits), as in the reference design.
// Distances d(i,j) are Q2.20 (22 bits) and accumulated costs g(i,j) are
// Q12.20 (32 bits); both widths are this design's choice. The all-ones G
// value stands for "infinity" (a point outside R) and saturates.
package dtw_pkg;

  // Default sizes
  localparam int unsigned N_DEF    = 256;  // samples per vector
  localparam int unsigned SAMPLE_W = 28;   // Q1.27 sample
  localparam int unsigned DIFF_W   = SAMPLE_W + 1;     // Q2.27 difference
  localparam int unsigned RAD_W    = 44;   // Q4.40 radicand of the square root
  localparam int unsigned D_W      = RAD_W / 2;        // Q2.20 distance
  localparam int unsigned G_W      = 32;   // Q12.20 accumulated cost
  localparam int unsigned SQ_SHIFT = 2 * (SAMPLE_W - 1) - 40;  // Q.54 -> Q.40

  localparam logic [G_W-1:0] G_INF = '1;

  // Index type wide enough for row/column numbers and their -1/-2 offsets.
  typedef logic signed [11:0] idx_t;

  // Column bounds of the Itakura parallelogram: slopes 1/2 and 2 through
  // (0,0) and (n-1,n-1). Row i holds the columns j0..j1 satisfying
  //   j <= 2i,  i <= 2j,  (n-1-j) <= 2(n-1-i),  (n-1-i) <= 2(n-1-j).
  function automatic idx_t region_j0(int n, int i);
    int a, b;
    a = (i + 1) / 2;              // ceil(i/2)
    b = 2 * i - (n - 1);
    return idx_t'((a > b) ? a : b);
  endfunction

  function automatic idx_t region_j1(int n, int i);
    int a, b;
    a = 2 * i;
    b = (n - 1 + i) / 2;          // floor((n-1+i)/2)
    return idx_t'((a < b) ? a : b);
  endfunction

  // Saturating addition with infinity propagation.
  function automatic logic [G_W-1:0] sat_add(logic [G_W-1:0] a, logic [G_W-1:0] b);
    logic [G_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (a == G_INF || b == G_INF || s >= {1'b0, G_INF}) return G_INF;
    return s[G_W-1:0];
  endfunction

  // Sideband carried with every G-matrix point through the G pipeline.
  typedef struct packed {
    idx_t row;       // i
    idx_t col;       // j
    logic first;     // j == j0(i): first point of the row
    logic v_dup;     // d(i-1,j) lies in R
    logic v_gul;     // g(i-1,j-1) lies in R
    logic org_ul;    // g(i-1,j-1) is the origin g(-1,-1) = 0
    logic v_gul2s;   // at row start: g(i-1,j-2) lies in R
    logic v_guu;     // g(i-2,j-1) lies in R
    logic org_uu;    // g(i-2,j-1) is the origin g(-1,-1) = 0
    logic cap;       // j == j0(i+1)-2: keep g(i,j) for the start of row i+1
  } gtag_t;

endpackage
