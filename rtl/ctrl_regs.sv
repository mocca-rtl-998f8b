// ctrl_regs: host-visible control registers of the accelerator (the
// interface and control logic placed on the memory layer).
//
// They hold the results of post-fabrication test that the chip is
// configured with - the outlier rows of every MAC array, the access period
// of every SRAM bank, and which bank feeds which MAC array (fast array with
// fast bank) - and one tile command per MAC array with its start trigger.
// Word-addressed, 32-bit, write in one cycle, combinational read:
//   0x00+c  outlier-row mask of array c (bit r = skip physical row r)
//   0x08+b  access period of bank b, in cycles (reset 1)
//   0x10+c  bank used by array c (reset c, the bank directly above it)
//   0x18    status: [5:0] busy, [13:8] done (sticky, write 1 to clear),
//           [21:16] K clamped to the usable rows
//   0x40+8c command of array c: +0 src_addr, +1 num_vec, +2 k_rows,
//           +3 acc_addr, +4 flags {pool_log2[9:8], pool_mode[7:6],
//           act_fn[5:4], writeback[1], accumulate[0]}, +5 dst_addr,
//           +6 {norm_shift[20:16], norm_scale[15:0]}, +7 start (any write)
// The design description says the chip is tested after fabrication and
// always pairs the fast array with the fast bank; the register map is this
// design's own.
module ctrl_regs
  import mocca_pkg::*;
#(
  parameter int unsigned N      = ARRAY_N,
  parameter int unsigned NCORE  = NUM_CORES,
  parameter int unsigned NBANK  = NUM_BANKS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [7:0]           cfg_addr,
  input  logic [31:0]          cfg_wdata,
  output logic [31:0]          cfg_rdata,
  output logic [N-1:0]         skip     [NCORE],
  output logic [PERIOD_W-1:0]  period   [NBANK],
  output logic [BANK_ID_W-1:0] bank_map [NCORE],
  output tile_cmd_t            cmd      [NCORE],
  output logic [NCORE-1:0]     start,
  input  logic [NCORE-1:0]     busy,
  input  logic [NCORE-1:0]     done,
  input  logic [NCORE-1:0]     k_clamped
);

  logic [NCORE-1:0] done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start  <= '0;
      done_q <= '0;
      for (int c = 0; c < NCORE; c++) begin
        skip[c]     <= '0;
        bank_map[c] <= BANK_ID_W'(c % NBANK);
        cmd[c]      <= '0;
      end
      for (int b = 0; b < NBANK; b++) period[b] <= PERIOD_W'(1);
    end else begin
      start  <= '0;
      done_q <= done_q | done;
      if (cfg_we) begin
        for (int c = 0; c < NCORE; c++) begin
          if (cfg_addr == 8'(c))        skip[c]     <= cfg_wdata[N-1:0];
          if (cfg_addr == 8'(8'h10 + c)) bank_map[c] <= cfg_wdata[BANK_ID_W-1:0];
          if (cfg_addr[7:3] == 5'(8 + c)) begin
            unique case (cfg_addr[2:0])
              3'd0: cmd[c].src_addr   <= cfg_wdata[ADDR_W-1:0];
              3'd1: cmd[c].num_vec    <= cfg_wdata[15:0];
              3'd2: cmd[c].k_rows     <= cfg_wdata[5:0];
              3'd3: cmd[c].acc_addr   <= cfg_wdata[ACC_AW-1:0];
              3'd4: begin
                cmd[c].accumulate <= cfg_wdata[0];
                cmd[c].writeback  <= cfg_wdata[1];
                cmd[c].act_fn     <= act_fn_e'(cfg_wdata[5:4]);
                cmd[c].pool_mode  <= pool_mode_e'(cfg_wdata[7:6]);
                cmd[c].pool_log2  <= cfg_wdata[9:8];
              end
              3'd5: cmd[c].dst_addr   <= cfg_wdata[ADDR_W-1:0];
              3'd6: begin
                cmd[c].norm_scale <= cfg_wdata[15:0];
                cmd[c].norm_shift <= cfg_wdata[20:16];
              end
              3'd7: start[c] <= 1'b1;
              default: ;
            endcase
          end
        end
        for (int b = 0; b < NBANK; b++)
          if (cfg_addr == 8'(8'h08 + b)) period[b] <= cfg_wdata[PERIOD_W-1:0];
        if (cfg_addr == 8'h18) done_q <= (done_q & ~cfg_wdata[8 +: NCORE]) | done;
      end
    end
  end

  always_comb begin
    cfg_rdata = '0;
    for (int c = 0; c < NCORE; c++) begin
      if (cfg_addr == 8'(c))         cfg_rdata = 32'(skip[c]);
      if (cfg_addr == 8'(8'h10 + c)) cfg_rdata = 32'(bank_map[c]);
    end
    for (int b = 0; b < NBANK; b++)
      if (cfg_addr == 8'(8'h08 + b)) cfg_rdata = 32'(period[b]);
    if (cfg_addr == 8'h18) begin
      cfg_rdata[NCORE-1:0]      = busy;
      cfg_rdata[8 +: NCORE]     = done_q;
      cfg_rdata[16 +: NCORE]    = k_clamped;
    end
  end

endmodule
