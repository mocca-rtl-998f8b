// ofp_accumulator: collects the partial sums leaving the bottom of a MAC
// array and accumulates them into output feature map entries.
//
// The array delivers column c of a result c cycles after column 0. The
// accumulator first de-skews the columns (column c is delayed N-1-c cycles)
// and delays the tag (in_valid, in_addr, in_accum), which arrives together
// with column 0, by N-1 cycles. The aligned vector is then written into
// entry in_addr: added to the stored value when in_accum is set, or
// overwriting it otherwise (the first pass over the reduction dimension).
// The read-modify-write happens in one cycle, so back-to-back updates of
// the same entry are safe. A separate read port (rd_en/rd_addr) returns the
// entry one cycle later on rd_valid/rd_data for draining. Accumulating
// output feature maps at the array edge follows the design description;
// the depth, the tag format and the de-skew placement are this design's.
//
// Latency: a tag presented in cycle t updates the entry at the end of cycle
// t+N-1.
module ofp_accumulator
  import mocca_pkg::*;
#(
  parameter int unsigned N     = ARRAY_N,
  parameter int unsigned DEPTH = ACC_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [$clog2(DEPTH)-1:0] in_addr,
  input  logic                     in_accum,
  input  psum_t                    in_psum [N],   // skewed: column c is c cycles late
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic                     rd_valid,
  output psum_t                    rd_data [N]
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned TW = AW + 2;

  // De-skew: column c goes through N-1-c registers
  psum_t aligned [N];
  for (genvar c = 0; c < N; c++) begin : g_dsk
    localparam int unsigned D = N - 1 - c;
    if (D == 0) begin : g_d0
      assign aligned[c] = in_psum[c];
    end else begin : g_dn
      psum_t sr [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int j = 0; j < D; j++) sr[j] <= '0;
        end else begin
          sr[0] <= in_psum[c];
          for (int j = 1; j < D; j++) sr[j] <= sr[j-1];
        end
      end
      assign aligned[c] = sr[D-1];
    end
  end

  // Tag delay: N-1 registers
  logic [TW-1:0] tag_in, tag_al;
  assign tag_in = {in_valid, in_accum, in_addr};
  if (N == 1) begin : g_t0
    assign tag_al = tag_in;
  end else begin : g_tn
    logic [TW-1:0] tsr [N-1];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < N-1; j++) tsr[j] <= '0;
      end else begin
        tsr[0] <= tag_in;
        for (int j = 1; j < N-1; j++) tsr[j] <= tsr[j-1];
      end
    end
    assign tag_al = tsr[N-2];
  end

  logic          wr_valid, wr_accum;
  logic [AW-1:0] wr_addr;
  assign {wr_valid, wr_accum, wr_addr} = tag_al;

  psum_t mem [DEPTH][N];

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      for (int c = 0; c < N; c++)
        mem[wr_addr][c] <= wr_accum ? mem[wr_addr][c] + aligned[c] : aligned[c];
    end
    if (rd_en) begin
      for (int c = 0; c < N; c++) rd_data[c] <= mem[rd_addr][c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

endmodule
