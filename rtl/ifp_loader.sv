// ifp_loader: feeds input feature map vectors into the rows of a MAC array
// with the systolic skew, steering around skipped (outlier) rows.
//
// A vector arrives as N logical elements; element k belongs to the k-th
// usable row of the array. Element k is delayed by k cycles (a register
// chain per element, element 0 undelayed) and then routed to the physical
// row whose usable-row index is k: physical row p carries logical element
// p - (number of skipped rows above p). Skipped rows receive zero. When
// vec_valid is low a zero bubble is inserted, which adds nothing to any
// partial sum. The bubble-insertion and the zero feed for skipped rows are
// choices of this design; placing the loader next to the rows and feeding
// from the left edge follow the design description.
//
// Timing: physical row p of logical element k sees the vector k cycles
// after it was presented.
module ifp_loader
  import mocca_pkg::*;
#(
  parameter int unsigned N = ARRAY_N
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  skip,
  input  logic          vec_valid,
  input  act_t          vec   [N],   // logical elements
  output act_t          x_row [N]    // to the array's left edge, physical rows
);

  localparam int unsigned IW = $clog2(N) + 1;

  // skewed[k] is logical element k after k cycles of delay
  act_t skewed [N];

  assign skewed[0] = vec_valid ? vec[0] : '0;

  for (genvar k = 1; k < N; k++) begin : g_skew
    act_t chain [k];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < k; j++) chain[j] <= '0;
      end else begin
        chain[0] <= vec_valid ? vec[k] : '0;
        for (int j = 1; j < k; j++) chain[j] <= chain[j-1];
      end
    end
    assign skewed[k] = chain[k-1];
  end

  // Logical index of every physical row
  logic [IW-1:0] lidx [N];
  always_comb begin
    logic [IW-1:0] cnt;
    cnt = '0;
    for (int p = 0; p < N; p++) begin
      lidx[p] = cnt;
      if (!skip[p]) cnt = cnt + 1'b1;
    end
  end

  always_comb begin
    for (int p = 0; p < N; p++) begin
      x_row[p] = skip[p] ? act_t'(0) : skewed[lidx[p][IW-2:0]];
    end
  end

endmodule
