// activation_unit: applies the layer's activation function to a vector of
// accumulated output feature map values.
//
// Element-wise on N 32-bit values: ACT_NONE passes them unchanged, ACT_RELU
// replaces negative values by zero. One register stage: a vector presented
// with in_valid in cycle t appears with out_valid in cycle t+1. The design
// description names this unit but not its functions; ReLU is the one
// implemented here.
module activation_unit
  import mocca_pkg::*;
#(
  parameter int unsigned N = ARRAY_N
) (
  input  logic    clk,
  input  logic    rst_n,
  input  act_fn_e fn,
  input  logic    in_valid,
  input  psum_t   in_data  [N],
  output logic    out_valid,
  output psum_t   out_data [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int c = 0; c < N; c++) out_data[c] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int c = 0; c < N; c++) begin
          if (fn == ACT_RELU && in_data[c] < 0) out_data[c] <= '0;
          else                                  out_data[c] <= in_data[c];
        end
      end
    end
  end

endmodule
