// sram_bank: one bank of the memory layer, accessed at its own rate.
//
// The on-chip buffer is split into banks so that each bank can run as fast
// as its own (process-variation dependent) access delay allows. Here that
// rate is the run-time setting `period`: the number of accelerator clock
// cycles one access takes, found by post-fabrication test and written by
// the host (0 is treated as 1). A request is accepted when req_ready is
// high; a read returns its word on rsp_valid exactly `period` cycles later,
// and the bank accepts the next request in that same cycle, so a bank
// delivers one word every `period` cycles. Writes return nothing.
// The storage is a plain array with one synchronous port, standing for the
// bank's SRAM macro; it is not reset.
//
// The 4 MB bank size, six banks and a per-bank access rate follow the
// design description; expressing the rate as a cycle count of one common
// clock (instead of a clock per bank) and the word width are this design's.
module sram_bank
  import mocca_pkg::*;
#(
  parameter int unsigned WORDS = BANK_WORDS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PERIOD_W-1:0] period,
  input  logic                req_valid,
  output logic                req_ready,
  input  bank_req_t           req,
  output logic                rsp_valid,
  output bank_rsp_t           rsp
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [WORD_W-1:0]   mem [WORDS];
  logic [PERIOD_W-1:0] cnt;
  logic                pend;
  logic                accept;
  logic [PERIOD_W-1:0] per;
  logic [WORD_W-1:0]   rdata_q;
  logic [REQ_ID_W-1:0] dst_q;

  assign rsp.rdata = rdata_q;
  assign rsp.dst   = dst_q;

  assign per       = (period == '0) ? PERIOD_W'(1) : period;
  assign req_ready = (cnt == '0);
  assign accept    = req_valid && req_ready;
  assign rsp_valid = pend && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      pend    <= 1'b0;
      dst_q   <= '0;
    end else begin
      if (accept) begin
        cnt     <= per - 1'b1;
        pend    <= !req.we;
        dst_q   <= req.src;
      end else begin
        if (cnt != '0) cnt <= cnt - 1'b1;
        if (rsp_valid) pend <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      if (req.we) mem[req.addr[AW-1:0]] <= req.wdata;
      else        rdata_q <= mem[req.addr[AW-1:0]];
    end
  end

endmodule
