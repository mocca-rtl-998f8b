// mem_xbar: the memory layer's central crossbar, carrying requests from
// the requesters (one per MAC array, plus the host port) to the SRAM banks.
//
// Every requester names a target bank with each request. Each bank has its
// own round-robin arbiter over the requesters that target it; the granted
// request is forwarded to the bank in the same cycle (valid/ready are
// passed through combinationally, and the request's src field is set to
// the requester's index so that the bank's answer can be routed back by
// comp_xbar). Requester i < NREQ-1 talking to bank i is the pair joined by
// the direct inter-layer via; direct_grant[b] flags such a grant, any other
// grant travels through the central crossbars. Both paths have the same
// timing, as the design description requires ("within the same cycle
// numbers"). The arbitration policy and handshake are this design's choice.
module mem_xbar
  import mocca_pkg::*;
#(
  parameter int unsigned NREQ  = NUM_REQ,
  parameter int unsigned NBANK = NUM_BANKS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // requesters
  input  logic      [NREQ-1:0]          rq_valid,
  output logic      [NREQ-1:0]          rq_ready,
  input  logic      [BANK_ID_W-1:0]     rq_bank [NREQ],
  input  bank_req_t                     rq      [NREQ],
  // banks
  output logic      [NBANK-1:0]         bk_valid,
  input  logic      [NBANK-1:0]         bk_ready,
  output bank_req_t                     bk      [NBANK],
  output logic      [NBANK-1:0]         direct_grant
);

  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic [IW-1:0]   ptr   [NBANK];   // requester with highest priority
  logic [IW-1:0]   gnt   [NBANK];
  logic [NBANK-1:0] has_gnt;

  always_comb begin
    rq_ready = '0;
    for (int b = 0; b < NBANK; b++) begin
      has_gnt[b] = 1'b0;
      gnt[b]     = '0;
      for (int k = 0; k < NREQ; k++) begin
        int i;
        i = (int'(ptr[b]) + k) % NREQ;
        if (!has_gnt[b] && rq_valid[i] && rq_bank[i] == BANK_ID_W'(b)) begin
          has_gnt[b] = 1'b1;
          gnt[b]     = IW'(i);
        end
      end
      bk_valid[b]     = has_gnt[b];
      bk[b]           = rq[gnt[b]];
      bk[b].src       = REQ_ID_W'(gnt[b]);
      direct_grant[b] = has_gnt[b] && (int'(gnt[b]) == b) && (b < NREQ - 1);
      if (has_gnt[b] && bk_ready[b]) rq_ready[gnt[b]] = 1'b1;
    end
  end

  // After a grant is taken, the next requester gets the highest priority.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANK; b++) ptr[b] <= '0;
    end else begin
      for (int b = 0; b < NBANK; b++)
        if (has_gnt[b] && bk_ready[b])
          ptr[b] <= (int'(gnt[b]) == NREQ - 1) ? '0 : gnt[b] + 1'b1;
    end
  end

endmodule
