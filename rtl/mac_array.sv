// mac_array: N x N weight-stationary systolic MAC array with outlier row
// skipping.
//
// Activations enter at the left edge, one per physical row, and move one
// unit to the right per cycle; partial sums move one unit down per cycle
// and leave at the bottom edge, one per column. A weight row is written
// into physical row r when w_row_we[r] is set (w_data gives one weight per
// column).
//
// Outlier skipping: skip[r] marks physical row r as too slow after
// post-fabrication test. The row below it then takes its partial sums from
// row r-1 over the bypass wire, so the skipped row is simply left out of
// the reduction chain. Only one neighbour can be bypassed, so two adjacent
// rows must not both be skipped (asserted). With R = N - popcount(skip)
// usable rows, the k-th usable row (k = 0..R-1) must receive its activation
// k cycles after the first usable row; column c of the result then leaves
// the bottom R + c cycles after the first usable row received the vector.
// The ifp_loader produces exactly this skew.
//
// The array size (32 x 32) and the bypass wire follow the design
// description; the row-addressed weight load is this design's choice.
module mac_array
  import mocca_pkg::*;
#(
  parameter int unsigned N = ARRAY_N
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  skip,       // outlier rows, held constant while running
  input  logic [N-1:0]  w_row_we,   // one-hot: physical row to load
  input  act_t          w_data   [N],
  input  act_t          x_in     [N],  // left edge, per physical row
  output psum_t         psum_out [N]   // bottom edge, per column
);

  act_t  x_w   [N][N+1];   // x_w[r][c] enters unit (r,c)
  psum_t p_w   [N+1][N];   // p_w[r][c] enters unit (r,c) from above

  for (genvar c = 0; c < N; c++) begin : g_top
    assign p_w[0][c] = '0;
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    assign x_w[r][0] = x_in[r];
    for (genvar c = 0; c < N; c++) begin : g_col
      psum_t byp;
      logic  skip_above;
      if (r >= 2) begin : g_byp
        assign byp        = p_w[r-1][c];   // output of row r-2
        assign skip_above = skip[r-1];
      end else if (r == 1) begin : g_byp1
        assign byp        = '0;            // row 0 skipped: start from zero
        assign skip_above = skip[0];
      end else begin : g_byp0
        assign byp        = '0;
        assign skip_above = 1'b0;
      end
      mac_pe u_pe (
        .clk        (clk),
        .rst_n      (rst_n),
        .w_we       (w_row_we[r]),
        .w_i        (w_data[c]),
        .skip_above (skip_above),
        .x_i        (x_w[r][c]),
        .psum_i     (p_w[r][c]),
        .psum_byp_i (byp),
        .x_o        (x_w[r][c+1]),
        .psum_o     (p_w[r+1][c])
      );
    end
  end

  // Bottom edge: if the last row is skipped, its bypass is the output.
  for (genvar c = 0; c < N; c++) begin : g_out
    if (N >= 2) begin : g_o2
      assign psum_out[c] = skip[N-1] ? p_w[N-1][c] : p_w[N][c];
    end else begin : g_o1
      assign psum_out[c] = p_w[N][c];
    end
  end

  // Only the direct neighbour can be bypassed.
  if (N >= 2) begin : g_chk
    a_no_adjacent_skip: assert property (@(posedge clk) disable iff (!rst_n)
      (skip & (skip >> 1)) == '0)
      else $error("mac_array: adjacent rows skipped");
  end

endmodule
