// pe_array: R x C systolic array of PEs (8 x 8 by default).
//
// Activations enter at the left edge, one per row, and move one PE to the
// right per cycle; weights enter at the top edge, one per column, and move
// one PE down per cycle. Each PE accumulates the products that pass through
// it (output-stationary), so PE(r,c) ends with sum_k A[r][k]*W[k][c] when
// row r is fed A[r][k] at step k+r and column c is fed W[k][c] at step k+c.
// The skew is the feeder's job (accel_ctrl). The partial sums, the
// timing-error signal and the approximate-accumulation flag of every PE are
// brought out flat, index r*C+c.
module pe_array #(
  parameter int unsigned R  = 8,
  parameter int unsigned C  = 8,
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic                  am_sm,
  input  logic [R-1:0][DW-1:0]  a_left,
  input  logic [R-1:0]          a_vld,
  input  logic [C-1:0][DW-1:0]  w_top,
  input  logic [C-1:0]          w_vld,
  output logic [R*C-1:0][AW-1:0] psum,
  output logic [R*C-1:0]        err,
  output logic [R*C-1:0]        am_seen
);
  // horizontal links: ah[r][c] feeds PE(r,c); vertical links: wv[r][c] feeds PE(r,c)
  logic [DW-1:0] ah  [R][C+1];
  logic          ahv [R][C+1];
  logic [DW-1:0] wv  [R+1][C];
  logic          wvv [R+1][C];

  for (genvar r = 0; r < R; r++) begin : g_left
    assign ah[r][0]  = a_left[r];
    assign ahv[r][0] = a_vld[r];
  end
  for (genvar c = 0; c < C; c++) begin : g_top
    assign wv[0][c]  = w_top[c];
    assign wvv[0][c] = w_vld[c];
  end

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < C; c++) begin : g_col
      pe #(.DW(DW), .AW(AW)) u_pe (
        .clk(clk), .rst_n(rst_n), .clr(clr), .am_sm(am_sm),
        .a_in(ah[r][c]), .a_vld_in(ahv[r][c]),
        .w_in(wv[r][c]), .w_vld_in(wvv[r][c]),
        .a_out(ah[r][c+1]), .a_vld_out(ahv[r][c+1]),
        .w_out(wv[r+1][c]), .w_vld_out(wvv[r+1][c]),
        .psum(psum[r*C+c]), .err(err[r*C+c]), .am_seen(am_seen[r*C+c])
      );
    end
  end
endmodule
