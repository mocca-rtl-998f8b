// mac_pe: one multiply-and-accumulate unit of the weight-stationary
// systolic array, with the extra partial-sum wire used for outlier
// skipping.
//
// The weight is preloaded (w_we) and stays in the unit. Every cycle the
// activation arriving from the left neighbour is multiplied by the weight
// and added to the partial sum arriving from above; the product sum and the
// activation are registered and passed down and to the right. When the
// neighbour directly above has been marked as an outlier (too slow) its
// output is ignored and the partial sum is taken instead from the unit two
// rows up over the bypass wire (psum_byp_i), so the slow row drops out of
// the chain without adding a cycle.
//
// Timing: one cycle from x_i/psum to x_o/psum_o. int8 x int8 products,
// 32-bit partial sums (wrap-around on overflow). The 8-bit operands follow
// the design description; the 32-bit sum width and the reset to zero are
// this design's choices.
module mac_pe
  import mocca_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  w_we,        // load w_i into the stationary weight register
  input  act_t  w_i,
  input  logic  skip_above,  // the row above is skipped: use psum_byp_i
  input  act_t  x_i,         // activation from the left neighbour
  input  psum_t psum_i,      // partial sum from the unit above
  input  psum_t psum_byp_i,  // partial sum from the unit two rows above
  output act_t  x_o,         // activation to the right neighbour
  output psum_t psum_o       // partial sum to the unit below
);

  act_t  w_q;
  psum_t psum_sel;
  psum_t prod;

  always_comb begin
    psum_sel = skip_above ? psum_byp_i : psum_i;
    prod     = psum_t'(x_i) * psum_t'(w_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q    <= '0;
      x_o    <= '0;
      psum_o <= '0;
    end else begin
      if (w_we) w_q <= w_i;
      x_o    <= x_i;
      psum_o <= psum_sel + prod;
    end
  end

endmodule
