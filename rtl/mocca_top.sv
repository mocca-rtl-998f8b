// mocca_top: the MOCCA accelerator - six compute tiles (32 x 32 int8
// systolic MAC arrays with outlier skipping) under six 4 MB SRAM banks that
// each run at their own access rate, joined by the memory-layer and
// compute-layer central crossbars, plus the host control registers.
//
// Host interfaces:
//   cfg_*  register port of ctrl_regs (configuration and tile commands)
//   hq_*/hs_*  word access to any bank (requester NUM_CORES of the
//          crossbars); keep one read outstanding at a time
//   w_*    weight stream from off-chip memory: one weight row per
//          handshake, pushed into the weight FIFO of tile w_core
// Core c reaches bank bank_map[c]; by default bank c, the one stacked
// directly above it (direct inter-layer via). Any other pairing goes
// through the two central crossbars with identical timing, which is how the
// chip pairs a fast array with a fast bank that is not above it. The
// configuration (six arrays, six 4 MB banks, 32 x 32 arrays) follows the
// design description; interfaces and the register map are this design's.
module mocca_top
  import mocca_pkg::*;
#(
  parameter int unsigned N     = ARRAY_N,
  parameter int unsigned WORDS = BANK_WORDS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control registers
  input  logic                 cfg_we,
  input  logic [7:0]           cfg_addr,
  input  logic [31:0]          cfg_wdata,
  output logic [31:0]          cfg_rdata,
  // host access to the banks
  input  logic                 hq_valid,
  output logic                 hq_ready,
  input  logic [BANK_ID_W-1:0] hq_bank,
  input  logic                 hq_we,
  input  logic [ADDR_W-1:0]    hq_addr,
  input  logic [WORD_W-1:0]    hq_wdata,
  output logic                 hs_valid,
  output logic [WORD_W-1:0]    hs_rdata,
  // weight stream
  input  logic                 w_valid,
  output logic                 w_ready,
  input  logic [BANK_ID_W-1:0] w_core,
  input  act_t                 w_data [N],
  // status
  output logic [NUM_CORES-1:0] core_busy,
  output logic [NUM_CORES-1:0] core_done,
  // per-cycle flags: a bank request / answer used the direct via
  output logic [NUM_BANKS-1:0] ilv_direct_req,
  output logic [NUM_CORES-1:0] ilv_direct_rsp
);

  localparam int unsigned NC = NUM_CORES;
  localparam int unsigned NB = NUM_BANKS;
  localparam int unsigned NR = NUM_REQ;

  logic [N-1:0]         skip     [NC];
  logic [PERIOD_W-1:0]  period   [NB];
  logic [BANK_ID_W-1:0] bank_map [NC];
  tile_cmd_t            cmd      [NC];
  logic [NC-1:0]        start, k_clamped;
  logic [NC-1:0]        wf_ready;

  // requester side of the crossbars
  logic [NR-1:0]        rq_valid, rq_ready;
  logic [BANK_ID_W-1:0] rq_bank [NR];
  bank_req_t            rq      [NR];
  logic [NR-1:0]        rs_valid;
  logic [WORD_W-1:0]    rs_data [NR];
  logic [NR-1:0]        direct_hit;

  // bank side
  logic [NB-1:0]        bk_valid, bk_ready, bk_rsp_valid, direct_grant;
  bank_req_t            bk      [NB];
  bank_rsp_t            bk_rsp  [NB];

  ctrl_regs #(.N(N), .NCORE(NC), .NBANK(NB)) u_regs (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .skip, .period, .bank_map, .cmd, .start,
    .busy      (core_busy),
    .done      (core_done),
    .k_clamped (k_clamped)
  );

  assign w_ready = wf_ready[w_core];

  for (genvar c = 0; c < NC; c++) begin : g_core
    logic              c_we;
    logic [ADDR_W-1:0] c_addr;
    logic [WORD_W-1:0] c_wdata;

    mocca_core #(.N(N)) u_core (
      .clk, .rst_n,
      .start         (start[c]),
      .cmd           (cmd[c]),
      .skip          (skip[c]),
      .busy          (core_busy[c]),
      .done          (core_done[c]),
      .k_clamped     (k_clamped[c]),
      .wf_push_valid (w_valid && w_core == BANK_ID_W'(c)),
      .wf_push_ready (wf_ready[c]),
      .wf_push_data  (w_data),
      .rq_valid      (rq_valid[c]),
      .rq_ready      (rq_ready[c]),
      .rq_we         (c_we),
      .rq_addr       (c_addr),
      .rq_wdata      (c_wdata),
      .rs_valid      (rs_valid[c]),
      .rs_data       (rs_data[c])
    );

    assign rq_bank[c] = bank_map[c];
    assign rq[c]      = '{we: c_we, addr: c_addr, wdata: c_wdata, src: '0};
  end

  // host port is the last requester
  assign rq_valid[NC] = hq_valid;
  assign hq_ready     = rq_ready[NC];
  assign rq_bank[NC]  = hq_bank;
  assign rq[NC]       = '{we: hq_we, addr: hq_addr, wdata: hq_wdata, src: '0};
  assign hs_valid     = rs_valid[NC];
  assign hs_rdata     = rs_data[NC];

  mem_xbar #(.NREQ(NR), .NBANK(NB)) u_mem_xbar (
    .clk, .rst_n,
    .rq_valid, .rq_ready, .rq_bank, .rq,
    .bk_valid, .bk_ready, .bk,
    .direct_grant
  );

  for (genvar b = 0; b < NB; b++) begin : g_bank
    sram_bank #(.WORDS(WORDS)) u_bank (
      .clk, .rst_n,
      .period    (period[b]),
      .req_valid (bk_valid[b]),
      .req_ready (bk_ready[b]),
      .req       (bk[b]),
      .rsp_valid (bk_rsp_valid[b]),
      .rsp       (bk_rsp[b])
    );
  end

  comp_xbar #(.NREQ(NR), .NBANK(NB)) u_comp_xbar (
    .clk, .rst_n,
    .bk_valid (bk_rsp_valid),
    .bk       (bk_rsp),
    .rs_valid, .rs_data,
    .direct_hit
  );

  assign ilv_direct_req = direct_grant;
  assign ilv_direct_rsp = direct_hit[NC-1:0];

endmodule
