// comp_xbar: the compute layer's central crossbar, returning the words read
// from the SRAM banks to the requester that asked for them.
//
// Each bank answer carries its destination (the requester index the
// mem_xbar stamped on the request). The crossbar registers the answers and
// delivers them on the destination's output one cycle later. Requesters
// keep their reads to one bank at a time, so two banks never answer the
// same requester in the same cycle; this rule is asserted. direct_hit[r]
// marks a delivery from bank r to MAC array r, which in the chip uses the
// direct inter-layer via instead of the crossbars; the timing is the same
// either way. The register stage and the collision rule are this design's
// choices.
module comp_xbar
  import mocca_pkg::*;
#(
  parameter int unsigned NREQ  = NUM_REQ,
  parameter int unsigned NBANK = NUM_BANKS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic      [NBANK-1:0]    bk_valid,
  input  bank_rsp_t                bk      [NBANK],
  output logic      [NREQ-1:0]     rs_valid,
  output logic      [WORD_W-1:0]   rs_data [NREQ],
  output logic      [NREQ-1:0]     direct_hit
);

  logic [NREQ-1:0]   v_d;
  logic [WORD_W-1:0] d_d [NREQ];
  logic [NREQ-1:0]   dir_d;
  logic [NBANK-1:0]  hits [NREQ];

  always_comb begin
    for (int r = 0; r < NREQ; r++) begin
      v_d[r]   = 1'b0;
      d_d[r]   = '0;
      dir_d[r] = 1'b0;
      hits[r]  = '0;
      for (int b = 0; b < NBANK; b++) begin
        if (bk_valid[b] && int'(bk[b].dst) == r) begin
          v_d[r]     = 1'b1;
          d_d[r]     = bk[b].rdata;
          dir_d[r]   = (b == r) && (r < NREQ - 1);
          hits[r][b] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs_valid   <= '0;
      direct_hit <= '0;
      for (int r = 0; r < NREQ; r++) rs_data[r] <= '0;
    end else begin
      rs_valid   <= v_d;
      direct_hit <= dir_d;
      for (int r = 0; r < NREQ; r++) if (v_d[r]) rs_data[r] <= d_d[r];
    end
  end

  for (genvar r = 0; r < NREQ; r++) begin : g_chk
    a_one_source: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(hits[r]))
      else $error("comp_xbar: two banks answer requester %0d at once", r);
  end

endmodule
