// norm_pool_unit: re-quantises activated 32-bit values to int8 and pools
// consecutive output vectors.
//
// Normalisation (stage 1, registered): y = sat8((x * scale) >>> shift),
// with a signed 16-bit scale, an arithmetic right shift of 0..31 and
// saturation to [-128, 127]. This is the per-layer scaling that turns
// accumulator values back into the 8-bit activations the next layer reads.
// Pooling (stage 2): a window of W = 1 << pool_log2 consecutive vectors is
// reduced element-wise to one vector, by maximum (POOL_MAX) or by the mean
// rounded towards minus infinity (POOL_AVG); POOL_NONE, or W = 1, passes
// every vector. clear restarts the window count.
//
// Timing: a vector presented in cycle t is normalised in t+1; the pooled
// vector of a window whose last vector was presented in cycle t leaves with
// out_valid in cycle t+2. The design description only names a
// normalization/pooling unit; the arithmetic here is this design's choice.
module norm_pool_unit
  import mocca_pkg::*;
#(
  parameter int unsigned N = ARRAY_N
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [15:0] scale,
  input  logic [4:0]  shift,
  input  pool_mode_e  pool_mode,
  input  logic [1:0]  pool_log2,
  input  logic        in_valid,
  input  psum_t       in_data  [N],
  output logic        out_valid,
  output act_t        out_data [N]
);

  // ---- stage 1: scale, shift, saturate
  logic n_valid;
  act_t n_data [N];

  function automatic act_t norm(psum_t x, logic [15:0] s, logic [4:0] sh);
    logic signed [47:0] p;
    p = 48'(x) * 48'(signed'(s));
    p = p >>> sh;
    if (p > 48'sd127)       return act_t'(8'sd127);
    else if (p < -48'sd128) return act_t'(-8'sd128);
    else                    return act_t'(p[7:0]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_valid <= 1'b0;
      for (int c = 0; c < N; c++) n_data[c] <= '0;
    end else begin
      n_valid <= in_valid && !clear;
      if (in_valid) begin
        for (int c = 0; c < N; c++) n_data[c] <= norm(in_data[c], scale, shift);
      end
    end
  end

  // ---- stage 2: pooling over W consecutive vectors
  logic [1:0]  lg;
  logic [2:0]  cnt;        // vectors already in the window
  logic [2:0]  last;       // W - 1
  logic signed [10:0] acc [N];   // running max or sum (sum of up to 4 int8)

  assign lg   = (pool_mode == POOL_NONE) ? 2'd0 : (pool_log2 > 2'd2 ? 2'd2 : pool_log2);
  assign last = 3'((1 << lg) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int c = 0; c < N; c++) begin
        acc[c]      <= '0;
        out_data[c] <= '0;
      end
    end else if (clear) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (n_valid) begin
        for (int c = 0; c < N; c++) begin
          logic signed [10:0] v, nxt;
          v = 11'(n_data[c]);
          if (cnt == 0)                  nxt = v;
          else if (pool_mode == POOL_AVG) nxt = acc[c] + v;
          else                           nxt = (v > acc[c]) ? v : acc[c];
          acc[c] <= nxt;
          if (cnt == last) begin
            if (pool_mode == POOL_AVG) out_data[c] <= act_t'(nxt >>> lg);
            else                       out_data[c] <= act_t'(nxt);
          end
        end
        if (cnt == last) begin
          cnt       <= '0;
          out_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
